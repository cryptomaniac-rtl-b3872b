// tb_cm_proc_rc6: runs RC6 encryption (128-bit block, 128-bit key, 20
// rounds) on one processing element.
//
// An RC6 round squares-and-rotates two words, t = (B*(2B+1)) <<< 5 and
// u = (D*(2D+1)) <<< 5, and mixes them into the other two with XOR, a
// rotate by the other value and the addition of a subkey. On this element
// a round takes five bundles: Addinc for 2x+1 (with the two subkey loads),
// two MULs, ROL plus two Rol-Xor pairs, two data-dependent ROLs, and two
// ADDs. The rounds are unrolled in the program (no branch); the words change
// roles by register renaming. The 44 subkeys are computed here and placed in
// data memory at 0x1000.
// The round count of the standard cipher (20) is used; the benchmark list
// this design was measured with gives 18, which changes only the length of
// the unrolled program and of the key table.
// Results are checked against a reference RC6 written here and that against
// the published example for an all-zero key and plaintext. Cycles per block
// are reported and bounded.
// The instructions and the one-element setup are the design's; the kernel
// and its bundle schedule are this testbench's own, written for this RTL.
module tb_cm_proc_rc6;
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

  // ---------------------------------------------------------------- RC6 model
  localparam int R = 20;
  localparam int NS = 2 * R + 4;
  word_t s [NS];
  function automatic word_t rotl(word_t x, word_t n);
    return (x << n[4:0]) | (n[4:0] == 0 ? 32'd0 : x >> (6'd32 - {1'b0, n[4:0]}));
  endfunction
  function automatic void keysched(logic [7:0] key [16]);
    word_t l [4], a, b;
    int i, j;
    for (int k = 0; k < 4; k++) l[k] = {key[4*k+3], key[4*k+2], key[4*k+1], key[4*k]};
    s[0] = 32'hb7e15163;
    for (int k = 1; k < NS; k++) s[k] = s[k-1] + 32'h9e3779b9;
    a = 0; b = 0; i = 0; j = 0;
    for (int k = 0; k < 3 * NS; k++) begin
      a = rotl(s[i] + a + b, 3); s[i] = a;
      b = rotl(l[j] + a + b, a + b); l[j] = b;
      i = (i + 1) % NS; j = (j + 1) % 4;
    end
  endfunction
  function automatic logic [127:0] ref_encrypt(logic [127:0] pt);   // {A,B,C,D}
    word_t a, b, c, d, t, u, x;
    {a, b, c, d} = pt;
    b += s[0]; d += s[1];
    for (int r = 1; r <= R; r++) begin
      t = rotl(b * (2 * b + 1), 5); u = rotl(d * (2 * d + 1), 5);
      a = rotl(a ^ t, u) + s[2*r]; c = rotl(c ^ u, t) + s[2*r+1];
      x = a; a = b; b = c; c = d; d = x;
    end
    a += s[NS-2]; c += s[NS-1];
    return {a, b, c, d};
  endfunction

  // ---------------------------------------------------------------- program
  // r5 = 5, r6/r7 subkeys, r12 key pointer, r13 = 4, r20..r27 temporaries
  bundle_t prog [256];
  int n = 0;
  function automatic inst_t ld(ridx_t rd); return mk_op(K_LOAD, rd, 12, 0, 0); endfunction
  function automatic inst_t inc(); return mk_pair(T_NOP, S_ADD, T_NOP, 12, 12, 13, 0); endfunction
  function automatic inst_t sh(short_e op, ridx_t rd, ridx_t a, ridx_t b); return mk_pair(T_NOP, op, T_NOP, rd, a, b, 0); endfunction
  task automatic put(inst_t s0, inst_t s1 = '0, inst_t s2 = '0, inst_t s3 = '0);
    prog[n][0] = s0; prog[n][1] = s1; prog[n][2] = s2; prog[n][3] = s3; n++;
  endtask
  task automatic build();
    ridx_t w [4], a, b, c, d, x;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    put(mk_op(K_RECV, 1, 0, 0, 0), mk_op(K_LDI, 12, 0, 0, 16'h1000), mk_op(K_LDI, 5, 0, 0, 5),
        mk_op(K_LDI, 13, 0, 0, 4));
    put(mk_op(K_RECV, 2, 0, 0, 0), ld(6), inc());
    put(mk_op(K_RECV, 3, 0, 0, 0), ld(7), inc());
    put(mk_op(K_RECV, 4, 0, 0, 0), sh(S_ADD, 2, 2, 6));
    put(sh(S_ADD, 4, 4, 7));
    w = '{1, 2, 3, 4};
    for (int r = 1; r <= R; r++) begin
      {a, b, c, d} = {w[0], w[1], w[2], w[3]};
      put(sh(S_ADDINC, 20, b, b), sh(S_ADDINC, 21, d, d), ld(6), inc());
      put(mk_long(L_MUL, 22, b, 20), mk_long(L_MUL, 23, d, 21), ld(7), inc());
      put(sh(S_ROL, 24, 22, 5), sh(S_ROL, 25, 23, 5),
          mk_pair(T_NOP, S_ROL, T_XOR, 26, 22, 5, a), mk_pair(T_NOP, S_ROL, T_XOR, 27, 23, 5, c));
      put(sh(S_ROL, a, 26, 25), sh(S_ROL, c, 27, 24));
      put(sh(S_ADD, a, a, 6), sh(S_ADD, c, c, 7));
      w = '{b, c, d, a};
    end
    {a, b, c, d} = {w[0], w[1], w[2], w[3]};
    put(ld(6), inc());
    put(ld(7));
    put(sh(S_ADD, a, a, 6));
    put(sh(S_ADD, c, c, 7), mk_op(K_SEND, 0, a, 0, 0));
    put(mk_op(K_SEND, 0, b, 0, 0));
    put(mk_op(K_SEND, 0, c, 0, 0));
    put(mk_op(K_SENDL, 0, d, 0, 0), mk_op(K_BEQ, 0, 0, 0, 0));
  endtask

  // ---------------------------------------------------------------- environment
  word_t inq [$], got [$];
  logic [127:0] expq [$];
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
        logic [127:0] c;
        c = {got[0], got[1], got[2], got[3]};
        check($sformatf("block %0d: %h exp %h", nblk, c, expq[0]), got.size() == 4 && c == expq[0]);
        void'(expq.pop_front()); got.delete();
        t_done.push_back(cyc);
        nblk++;
      end
    end
  end

  localparam int NBLK = 12;
  initial begin
    logic [7:0] key [16];
    logic [127:0] pt;
    foreach (key[k]) key[k] = 8'h00;
    keysched(key);
    // published example: ciphertext bytes 8f c3 a5 36 56 b1 f7 78 c1 29 df 4e 98 48 a4 1e
    check("reference model meets the published example",
          ref_encrypt('0) == {32'h36a5c38f, 32'h78f7b156, 32'h4edf29c1, 32'h1ea44898});
    // a non-trivial key for the program runs
    foreach (key[k]) key[k] = 8'($urandom);
    keysched(key);
    build();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    for (int a = 0; a < NS; a++) begin
      @(negedge clk); imem_we = 0; dmem_ld_we = 1; dmem_ld_addr = 32'h1000 + 4 * a; dmem_ld_wdata = s[a];
    end
    @(negedge clk); dmem_ld_we = 0;
    for (int b = 0; b < NBLK; b++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 4; k++) inq.push_back(pt[127 - 32*k -: 32]);
      expq.push_back(ref_encrypt(pt));
    end
    run = 1;
    wait (nblk == NBLK);
    check("all blocks", expq.size() == 0);
    // 5 start bundles + 20 rounds of 5 + 7 closing bundles = 112, plus 2
    // flushed bundles when the jump back to the start is not yet predicted
    $display("RC6: %0d blocks in a %0d-bundle program; steady state %0d cycles per block",
             NBLK, n, t_done[NBLK-1] - t_done[NBLK-2]);
    check("cycles per block", t_done[NBLK-1] - t_done[NBLK-2] <= 114);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
