// tb_cm_proc_blowfish: runs real Blowfish encryption (64-bit block, 16
// rounds) on one processing element, with the kernel of the shared test
// program (cm_tb_prog_pkg, action 0: four bundles per round).
//
// Blowfish's initial P array and S-boxes are the hexadecimal digits of the
// fraction of pi, 1042 words in order. The testbench computes them with
// Machin's formula, pi = 16 atan(1/5) - 4 atan(1/239), in fixed point with
// 32-bit limbs, and checks the first words against their well-known values.
// The key schedule (XOR the key into P, then replace P and the S-boxes by
// repeatedly encrypting a running block) runs in the testbench's reference
// model; it is the host's job, not the element's. The resulting tables are
// loaded into data memory as the program expects (S-box t at 0x400 t, P at
// 0x1000), and encryption requests are streamed through the element.
// The reference is checked against the published examples for an all-zero
// key and for key 0xffffffffffffffff with plaintext 0xffffffffffffffff; the
// element's results are checked against the reference for a random 128-bit
// key (the Benchmark Suite's key size) and random blocks, and the cycles per
// block are reported and bounded.
// The instructions, the 4-bundle round and the one-element setup follow the
// design; the request format and the tail of the kernel are the test
// program's own.
module tb_cm_proc_blowfish;
  import cm_pkg::*;
  import cm_tb_prog_pkg::*;
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

  // ---------------------------------------------------------------- pi
  // fixed point: limb 0 is the integer part, limbs 1..NL-1 the fraction
  localparam int NL = 1042 + 4;
  typedef logic [31:0] num_t [NL];
  function automatic void divsmall(ref num_t a, input longint unsigned d);
    longint unsigned rem = 0, cur;
    for (int i = 0; i < NL; i++) begin
      cur = (rem << 32) | a[i];
      a[i] = 32'(cur / d); rem = cur % d;
    end
  endfunction
  function automatic void addsub(ref num_t acc, const ref num_t b, input bit sub);
    longint c = 0, v;
    for (int i = NL - 1; i >= 0; i--) begin
      v = sub ? longint'(acc[i]) - longint'(b[i]) + c : longint'(acc[i]) + longint'(b[i]) + c;
      acc[i] = 32'(v); c = v >>> 32;
    end
  endfunction
  function automatic bit is_zero(const ref num_t a);
    foreach (a[i]) if (a[i] != 0) return 0;
    return 1;
  endfunction
  // acc += sign * mult * atan(1/x)
  function automatic void atan_inv(ref num_t acc, input int x, input int mult, input bit sub);
    num_t pw, t;
    longint unsigned k = 0;
    foreach (pw[i]) pw[i] = 0;
    pw[0] = 32'(mult);
    divsmall(pw, x);                              // mult / x
    while (!is_zero(pw)) begin
      t = pw;
      divsmall(t, 2 * k + 1);
      addsub(acc, t, sub ^ k[0]);
      divsmall(pw, longint'(x) * x);
      k++;
    end
  endfunction
  word_t pi_words [1042];
  function automatic void compute_pi();
    num_t acc;
    foreach (acc[i]) acc[i] = 0;
    atan_inv(acc, 5, 16, 0);
    atan_inv(acc, 239, 4, 1);
    for (int i = 0; i < 1042; i++) pi_words[i] = acc[i + 1];
  endfunction

  // ---------------------------------------------------------------- Blowfish
  word_t bs [4][256], bp [18];
  function automatic word_t bf_f(word_t x);
    return ((bs[0][x[31:24]] + bs[1][x[23:16]]) ^ bs[2][x[15:8]]) + bs[3][x[7:0]];
  endfunction
  function automatic logic [63:0] bf_enc(logic [63:0] blk);
    word_t l, r, t;
    {l, r} = blk;
    for (int i = 0; i < 16; i++) begin
      l ^= bp[i]; r ^= bf_f(l);
      t = l; l = r; r = t;
    end
    t = l; l = r; r = t;
    r ^= bp[16]; l ^= bp[17];
    return {l, r};
  endfunction
  function automatic void bf_key(logic [7:0] key [], int len);
    logic [63:0] blk = '0;
    int j = 0;
    for (int i = 0; i < 18; i++) bp[i] = pi_words[i];
    for (int t = 0; t < 4; t++) for (int e = 0; e < 256; e++) bs[t][e] = pi_words[18 + 256 * t + e];
    for (int i = 0; i < 18; i++) begin
      word_t w = 0;
      for (int b = 0; b < 4; b++) begin w = {w[23:0], key[j]}; j = (j + 1) % len; end
      bp[i] ^= w;
    end
    for (int i = 0; i < 18; i += 2) begin blk = bf_enc(blk); {bp[i], bp[i+1]} = blk; end
    for (int t = 0; t < 4; t++)
      for (int e = 0; e < 256; e += 2) begin blk = bf_enc(blk); {bs[t][e], bs[t][e+1]} = blk; end
  endfunction

  // ---------------------------------------------------------------- environment
  bundle_t prog [256];
  word_t inq [$], got [$], expq [$][$];
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
        check($sformatf("block %0d", nblk), got == expq[0]);
        void'(expq.pop_front()); got.delete();
        t_done.push_back(cyc);
        nblk++;
      end
    end
  end

  localparam int NBLK = 16;
  initial begin
    logic [7:0] key [];
    word_t res [$];
    logic [63:0] pt, ct;
    compute_pi();
    check("pi words", pi_words[0] == 32'h243f6a88 && pi_words[1] == 32'h85a308d3 &&
                      pi_words[18] == 32'hd1310ba6);
    key = new [8]; foreach (key[i]) key[i] = 8'h00;
    bf_key(key, 8);
    check("reference Blowfish, zero key", bf_enc(64'h0) == 64'h4ef997456198dd78);
    foreach (key[i]) key[i] = 8'hff;
    bf_key(key, 8);
    check("reference Blowfish, all-ones key", bf_enc('1) == 64'h51866fd5b85ecb8a);
    key = new [16]; foreach (key[i]) key[i] = 8'($urandom);
    bf_key(key, 16);
    // hand the schedule to the program's model and build the data memory image
    init_model();
    sbox = bs; parr = bp;
    build(prog);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    for (int a = 0; a < DMEM_INIT_WORDS; a++) begin
      @(negedge clk); imem_we = 0; dmem_ld_we = 1; dmem_ld_addr = 4 * a; dmem_ld_wdata = dmem_word(a);
    end
    @(negedge clk); dmem_ld_we = 0;
    for (int b = 0; b < NBLK; b++) begin
      pt = {$urandom, $urandom};
      req_bf(b, pt[63:32], pt[31:0], inq, res);
      ct = bf_enc(pt);
      check("program model is Blowfish", res[1] == ct[63:32] && res[2] == ct[31:0]);
      expq.push_back(res);
    end
    run = 1;
    wait (nblk == NBLK);
    check("all blocks", expq.size() == 0);
    // dispatch 4 + 3 start bundles + 16 rounds of 4 + 4 closing bundles = 75,
    // plus 2 flushed bundles when the loop exit is mispredicted
    $display("Blowfish: %0d blocks; steady state %0d cycles per block", NBLK, t_done[NBLK-1] - t_done[NBLK-2]);
    check("cycles per block", t_done[NBLK-1] - t_done[NBLK-2] <= 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
