// tb_cm_proc_rc4: runs the RC4 stream cipher on one processing element.
//
// RC4's state is a 256-entry permutation S that every step reads and
// writes: i = i+1, j = j+S[i], swap S[i] and S[j], output S[S[i]+S[j]].
// Because the table changes all the time it lives in data memory and is
// accessed with LOAD and STORE (SBOX would see the stores only after
// SBOXSYNC). Each entry is kept as a word holding 4*S[x] at byte address
// 4x, so i, j and the sum are byte addresses directly: every index update is
// one Add-And pair with the mask 0x3fc. The single data-memory port is the
// limit: a byte costs three loads and two stores and takes 6 bundles. The
// key-stream byte is moved to the top of the word by a Rol-And pair and
// merged with a Ror-Xor pair into an accumulator that starts as the input
// word, so after four bytes the accumulator holds input ^ key stream
// (little-endian bytes). A request is one word of text; i and j stay in
// registers from request to request, as the state of a stream.
// The key setup (the host's job) runs in the reference model here; the
// result is checked against the published example (key "Key", plaintext
// "Plaintext") and against the reference for further random words. Cycles
// per word are reported and bounded.
// The instructions and the one-element setup are the design's; the kernel
// and its bundle schedule are this testbench's own.
module tb_cm_proc_rc4;
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

  // ---------------------------------------------------------------- RC4 model
  logic [7:0] st [256], st0 [256];
  logic [7:0] mi, mj;
  function automatic void ksa(logic [7:0] key [], int len);
    logic [7:0] j = 0, t;
    for (int i = 0; i < 256; i++) st[i] = 8'(i);
    for (int i = 0; i < 256; i++) begin
      j = j + st[i] + key[i % len];
      t = st[i]; st[i] = st[j]; st[j] = t;
    end
    mi = 0; mj = 0;
  endfunction
  function automatic logic [7:0] prga();
    logic [7:0] t;
    mi = mi + 1; mj = mj + st[mi];
    t = st[mi]; st[mi] = st[mj]; st[mj] = t;
    return st[8'(st[mi] + st[mj])];
  endfunction

  // ---------------------------------------------------------------- program
  // r1 = 4i, r2 = 4j, r3 = 0x3fc, r4 = 4, r5 = S[i], r6 = S[j], r7 = sum,
  // r8 = key-stream entry, r9 accumulator, r10 = 0xff000000, r11 = 22,
  // r13 = 8, r14 byte at the top, r15 = 16
  bundle_t prog [256];
  int n = 0, START;
  function automatic inst_t ldi(ridx_t rd, int v); return mk_op(K_LDI, rd, 0, 0, 16'(v)); endfunction
  function automatic inst_t aa(ridx_t rd, ridx_t a, ridx_t b); return mk_pair(T_NOP, S_ADD, T_AND, rd, a, b, 3); endfunction
  task automatic put(inst_t s0, inst_t s1 = '0, inst_t s2 = '0, inst_t s3 = '0);
    prog[n][0] = s0; prog[n][1] = s1; prog[n][2] = s2; prog[n][3] = s3; n++;
  endtask
  task automatic build();
    for (int i = 0; i < 256; i++) prog[i] = '0;
    put(ldi(1, 4), ldi(2, 0), ldi(3, 'h3fc), ldi(4, 4));
    put(ldi(10, 'hff00), ldi(11, 22), ldi(13, 8), ldi(15, 16));
    put(mk_pair(T_NOP, S_ROL, T_NOP, 10, 10, 15, 0));
    START = n;
    for (int k = 0; k < 4; k++) begin
      // the previous byte's tail runs in this byte's first two bundles
      put(mk_op(K_LOAD, 5, 1, 0, 0), k == 0 ? mk_op(K_RECV, 9, 0, 0, 0) : mk_pair(T_NOP, S_ROL, T_AND, 14, 8, 11, 10));
      put(aa(2, 2, 5), k == 0 ? inst_t'('0) : mk_pair(T_NOP, S_ROR, T_XOR, 9, 9, 13, 14));
      put(mk_op(K_LOAD, 6, 2, 0, 0));
      put(mk_op(K_STORE, 0, 2, 5, 0), aa(7, 5, 6));
      put(mk_op(K_STORE, 0, 1, 6, 0));
      put(mk_op(K_LOAD, 8, 7, 0, 0), aa(1, 1, 4));
    end
    put(mk_pair(T_NOP, S_ROL, T_AND, 14, 8, 11, 10));
    put(mk_pair(T_NOP, S_ROR, T_XOR, 9, 9, 13, 14));
    put(mk_op(K_SENDL, 0, 9, 0, 0), mk_op(K_BEQ, 0, 0, 0, 16'(START)));
  endtask

  // ---------------------------------------------------------------- environment
  word_t inq [$], expq [$];
  int nw = 0;
  longint cyc = 0, t_done [$];
  always @(posedge clk) cyc++;
  assign in_valid  = inq.size() > 0;
  assign in_data   = inq.size() > 0 ? inq[0] : '0;
  assign out_ready = 1'b1;
  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    if (out_valid) begin
      check($sformatf("word %0d: %h exp %h", nw, out_data, expq[0]), out_last && out_data == expq[0]);
      if (nw < 3) begin
        // published example: "Plaintext" under key "Key" -> bb f3 16 e8 d9 40 af 0a d3
        logic [7:0] ex [9] = '{8'hbb, 8'hf3, 8'h16, 8'he8, 8'hd9, 8'h40, 8'haf, 8'h0a, 8'hd3};
        for (int b = 0; b < 4; b++)
          if (4 * nw + b < 9) check("published example", out_data[8*b +: 8] == ex[4*nw + b]);
      end
      void'(expq.pop_front());
      t_done.push_back(cyc);
      nw++;
    end
  end

  localparam int NW = 24;
  initial begin
    logic [7:0] key [];
    logic [7:0] pt [$];
    string s = "Plaintext";
    key = new [3]; key[0] = "K"; key[1] = "e"; key[2] = "y";
    ksa(key, 3);
    st0 = st;
    for (int i = 0; i < s.len(); i++) pt.push_back(s[i]);
    while (pt.size() < 4 * NW) pt.push_back(8'($urandom));
    build();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 0; dmem_ld_we = 1; dmem_ld_addr = 4 * a; dmem_ld_wdata = {22'd0, st0[a], 2'b00};
    end
    @(negedge clk); dmem_ld_we = 0;
    for (int w = 0; w < NW; w++) begin
      word_t p, c;
      for (int b = 0; b < 4; b++) begin
        p[8*b +: 8] = pt[4*w + b];
        c[8*b +: 8] = pt[4*w + b] ^ prga();
      end
      inq.push_back(p); expq.push_back(c);
    end
    run = 1;
    wait (nw == NW);
    check("all words", expq.size() == 0);
    // 4 bytes of 6 bundles + 3 closing bundles = 27
    $display("RC4: %0d words; steady state %0d cycles per 4 bytes", NW, t_done[NW-1] - t_done[NW-2]);
    check("cycles per word", t_done[NW-1] - t_done[NW-2] <= 27);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
