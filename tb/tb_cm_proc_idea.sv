// tb_cm_proc_idea: runs IDEA encryption (64-bit block, 128-bit key, 8 rounds
// and the output transform) on one processing element.
//
// IDEA mixes three groups: XOR, addition modulo 2^16 and multiplication
// modulo 2^16 + 1 with 0 standing for 2^16, which the MULMOD instruction
// performs. Additions are Add-And pairs (the AND with 0xffff keeps the sum
// to 16 bits); the packing of two 16-bit halves into a word is a Rol-Xor
// pair. The 52 16-bit subkeys are computed here and placed in data memory at
// 0x1000, one per word; each round loads six of them.
// Results are checked against a reference IDEA written here, and that
// reference against the example of the cipher's original description (key
// 0001 0002 ... 0008, plaintext 0000 0001 0002 0003).
// The instructions (SBOX, MULMOD, the combined pairs) and the one-element
// setup are the design's; the cipher kernel and its bundle schedule are this
// testbench's own, written for this RTL.
module tb_cm_proc_idea;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic imem_we = 0; logic [7:0] imem_waddr = 0; bundle_t imem_wdata = '0;
  logic dmem_ld_we = 0; word_t dmem_ld_addr = 0, dmem_ld_wdata = 0;
  logic in_valid, in_pop, out_valid, out_last, out_ready, ks_req;
  logic ks_gnt = 0; word_t ks_rdata = 0;
  word_t in_data, out_data, ks_addr;
  always #5 clk = ~clk;
  cm_proc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- IDEA model
  logic [15:0] z [52];
  function automatic logic [15:0] mm(logic [15:0] a, logic [15:0] b);
    longint unsigned x, y;
    x = a == 0 ? 65536 : a; y = b == 0 ? 65536 : b;
    return 16'((x * y) % 65537);
  endfunction
  function automatic void keysched(logic [127:0] key);
    logic [127:0] k = key;
    for (int i = 0; i < 52; i++) begin
      z[i] = k[127 - 16*(i % 8) -: 16];
      if (i % 8 == 7) k = {k[102:0], k[127:103]};
    end
  endfunction
  function automatic logic [63:0] ref_encrypt(logic [63:0] pt);
    logic [15:0] x1, x2, x3, x4, a, b, c, d, e, f, g, h, i, j;
    {x1, x2, x3, x4} = pt;
    for (int r = 0; r < 8; r++) begin
      a = mm(x1, z[6*r]); b = x2 + z[6*r+1]; c = x3 + z[6*r+2]; d = mm(x4, z[6*r+3]);
      e = a ^ c; f = b ^ d;
      g = mm(e, z[6*r+4]); h = f + g; i = mm(h, z[6*r+5]); j = g + i;
      x1 = a ^ i; x2 = c ^ i; x3 = b ^ j; x4 = d ^ j;
    end
    return {mm(x1, z[48]), 16'(x3 + z[49]), 16'(x2 + z[50]), mm(x4, z[51])};
  endfunction

  // ---------------------------------------------------------------- program
  bundle_t prog [256];
  int n = 0, LOOP;
  function automatic inst_t ld(ridx_t rd, ridx_t a); return mk_op(K_LOAD, rd, a, 0, 0); endfunction
  function automatic inst_t inc(ridx_t rd); return mk_pair(T_NOP, S_ADD, T_NOP, rd, rd, 13, 0); endfunction
  function automatic inst_t add16(ridx_t rd, ridx_t a, ridx_t b); return mk_pair(T_NOP, S_ADD, T_AND, rd, a, b, 11); endfunction
  function automatic inst_t xr(ridx_t rd, ridx_t a, ridx_t b); return mk_pair(T_XOR, S_NOP, T_NOP, rd, a, b, 0); endfunction
  function automatic inst_t mmod(ridx_t rd, ridx_t a, ridx_t b); return mk_long(L_MULMOD, rd, a, b); endfunction
  task automatic put(inst_t s0, inst_t s1 = '0, inst_t s2 = '0, inst_t s3 = '0);
    prog[n][0] = s0; prog[n][1] = s1; prog[n][2] = s2; prog[n][3] = s3; n++;
  endtask
  // r1..r4 X1..X4, r5..r10 subkeys, r11 = 0xffff, r12 key pointer, r13 = 4,
  // r14 rounds left, r15 = 1, r26 = 16, r16..r25 round temporaries
  task automatic build();
    for (int i = 0; i < 256; i++) prog[i] = '0;
    put(mk_op(K_RECV, 20, 0, 0, 0), mk_op(K_LDI, 11, 0, 0, 16'hffff), mk_op(K_LDI, 26, 0, 0, 16),
        mk_op(K_LDI, 12, 0, 0, 16'h1000));
    put(mk_op(K_RECV, 21, 0, 0, 0), mk_op(K_LDI, 13, 0, 0, 4), mk_op(K_LDI, 14, 0, 0, 8),
        mk_op(K_LDI, 15, 0, 0, 1));
    put(mk_pair(T_NOP, S_ROL, T_AND, 1, 20, 26, 11), mk_pair(T_AND, S_NOP, T_NOP, 2, 20, 11, 0),
        mk_pair(T_NOP, S_ROL, T_AND, 3, 21, 26, 11), mk_pair(T_AND, S_NOP, T_NOP, 4, 21, 11, 0));
    LOOP = n;
    put(ld(5, 12), inc(12));
    put(ld(6, 12), inc(12));
    put(ld(7, 12), inc(12));
    put(ld(8, 12), inc(12), mmod(16, 1, 5), add16(17, 2, 6));
    put(ld(9, 12), inc(12), add16(18, 3, 7), mmod(19, 4, 8));
    put(ld(10, 12), inc(12), xr(20, 16, 18), xr(21, 17, 19));
    put(mmod(22, 20, 9), mk_pair(T_NOP, S_SUB, T_NOP, 14, 14, 15, 0));
    put(add16(23, 21, 22));
    put(mmod(24, 23, 10));
    put(add16(25, 22, 24), xr(1, 16, 24), xr(2, 18, 24));
    put(xr(3, 17, 25), xr(4, 19, 25), mk_op(K_BNE, 0, 14, 0, 16'(LOOP)));
    // output transform
    put(ld(5, 12), inc(12));
    put(ld(6, 12), inc(12));
    put(ld(7, 12), inc(12));
    put(ld(8, 12), mmod(16, 1, 5), add16(17, 3, 6), add16(18, 2, 7));
    put(mmod(19, 4, 8));
    put(mk_pair(T_NOP, S_ROL, T_XOR, 20, 16, 26, 17), mk_pair(T_NOP, S_ROL, T_XOR, 21, 18, 26, 19));
    put(mk_op(K_SEND, 0, 20, 0, 0));
    put(mk_op(K_SENDL, 0, 21, 0, 0), mk_op(K_BEQ, 0, 0, 0, 0));
  endtask

  // ---------------------------------------------------------------- environment
  word_t inq [$], got [$];
  logic [63:0] expq [$];
  int nblk = 0;
  longint cyc = 0, t_done [$];
  always @(posedge clk) cyc++;
  assign in_valid  = inq.size() > 0;
  assign in_data   = inq.size() > 0 ? inq[0] : '0;
  assign out_ready = 1'b1;
  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    if (out_valid) begin
      got.push_back(out_data);
      if (out_last) begin
        logic [63:0] c;
        c = {got[0], got[1]};
        check($sformatf("block %0d: %h exp %h", nblk, c, expq[0]), got.size() == 2 && c == expq[0]);
        void'(expq.pop_front()); got.delete();
        t_done.push_back(cyc);
        nblk++;
      end
    end
  end

  localparam int NBLK = 20;
  initial begin
    keysched(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    check("reference model meets the published example",
          ref_encrypt(64'h0000_0001_0002_0003) == 64'h11fb_ed2b_0198_6de5);
    build();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    for (int a = 0; a < 52; a++) begin
      @(negedge clk); imem_we = 0; dmem_ld_we = 1; dmem_ld_addr = 32'h1000 + 4 * a; dmem_ld_wdata = {16'd0, z[a]};
    end
    @(negedge clk); dmem_ld_we = 0;
    inq.push_back(32'h0000_0001); inq.push_back(32'h0002_0003); expq.push_back(64'h11fb_ed2b_0198_6de5);
    for (int b = 1; b < NBLK; b++) begin
      logic [63:0] pt;
      pt = {$urandom, $urandom};
      if (b % 4 == 0) pt[63:48] = 16'd0;     // exercise the 0 = 2^16 case
      inq.push_back(pt[63:32]); inq.push_back(pt[31:0]); expq.push_back(ref_encrypt(pt));
    end
    run = 1;
    wait (nblk == NBLK);
    check("all blocks", expq.size() == 0);
    // 3 start bundles + 8 rounds of 11 + 8 for the output transform = 99,
    // plus 2 flushed bundles when the predictor misses the loop exit
    $display("IDEA: %0d blocks; steady state %0d cycles per block", NBLK, t_done[NBLK-1] - t_done[NBLK-2]);
    check("cycles per block", t_done[NBLK-1] - t_done[NBLK-2] <= 101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
