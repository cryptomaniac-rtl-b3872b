// tb_cm_proc_3des: runs triple DES (encrypt-decrypt-encrypt with three
// 56-bit keys, 48 rounds) on one processing element.
//
// The DES round function is evaluated in the usual table form: each S-box
// merged with the permutation P into a table of 32-bit words, indexed by
// the S-box's six input bits. The expansion E needs no logic: in
// w = (R >>> 1) & 0xfcfcfcfc byte m holds the input bits of S-box 7-2m in its
// upper six bits, and in v = (R >>> 5) & 0xfcfcfcfc byte m holds those of
// S-box (6,4,2,8)[m] (Ror-And pairs). Every one of the eight lookups is an
// Xor-Sbox pair, SBOXm((w or v) ^ K) in slot m, which adds the round key on
// the way: the key words Ku and Kt carry the key's six bits for each S-box
// in the upper bits of each byte, and a selector in the two low bits (00 in
// Ku, 01 in Kt). Slot m's 256-word table at 0x400 m thus holds two merged
// tables (the u-side S-box at index 4i, the t-side one at 4i+1), so the four
// S-box caches cover all eight S-boxes and stay warm.
// A round is 5 bundles: the two Ror-And pairs, four lookups, four lookups,
// three Xor-Xor pairs, and the last Xor that updates the half. The round
// keys (96 words at 0x2000, computed here) are loaded in the free slots; the
// two rounds of each loop iteration use separate key registers so that a
// load never overtakes a use. Each DES stage is its own loop of 8
// iterations, and the halves swap roles between stages instead of moving.
// The initial and final permutations are done on the element as well, by
// the classic sequence of masked bit-group swaps between the two halves
// (four swaps by 4, 16, 2 and 8 bits and an exchange of odd bits, each swap
// three bundles), 15 bundles each way.
// Results are checked against a DES reference written here from the cipher's
// tables, itself checked against the well-known example (key 133457799BBCDFF1,
// plaintext 0123456789ABCDEF). Cycles per block are reported and bounded.
// The instructions and the one-element setup are the design's; the kernel,
// the table layout and the bundle schedule are this testbench's own.
module tb_cm_proc_3des;
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

  // ---------------------------------------------------------------- DES model
  // Bit i of the standard's numbering (1 = most significant) of an n-bit
  // value v is v[n-i].
  localparam byte SB [8][64] = '{
    '{14,4,13,1,2,15,11,8,3,10,6,12,5,9,0,7, 0,15,7,4,14,2,13,1,10,6,12,11,9,5,3,8,
      4,1,14,8,13,6,2,11,15,12,9,7,3,10,5,0, 15,12,8,2,4,9,1,7,5,11,3,14,10,0,6,13},
    '{15,1,8,14,6,11,3,4,9,7,2,13,12,0,5,10, 3,13,4,7,15,2,8,14,12,0,1,10,6,9,11,5,
      0,14,7,11,10,4,13,1,5,8,12,6,9,3,2,15, 13,8,10,1,3,15,4,2,11,6,7,12,0,5,14,9},
    '{10,0,9,14,6,3,15,5,1,13,12,7,11,4,2,8, 13,7,0,9,3,4,6,10,2,8,5,14,12,11,15,1,
      13,6,4,9,8,15,3,0,11,1,2,12,5,10,14,7, 1,10,13,0,6,9,8,7,4,15,14,3,11,5,2,12},
    '{7,13,14,3,0,6,9,10,1,2,8,5,11,12,4,15, 13,8,11,5,6,15,0,3,4,7,2,12,1,10,14,9,
      10,6,9,0,12,11,7,13,15,1,3,14,5,2,8,4, 3,15,0,6,10,1,13,8,9,4,5,11,12,7,2,14},
    '{2,12,4,1,7,10,11,6,8,5,3,15,13,0,14,9, 14,11,2,12,4,7,13,1,5,0,15,10,3,9,8,6,
      4,2,1,11,10,13,7,8,15,9,12,5,6,3,0,14, 11,8,12,7,1,14,2,13,6,15,0,9,10,4,5,3},
    '{12,1,10,15,9,2,6,8,0,13,3,4,14,7,5,11, 10,15,4,2,7,12,9,5,6,1,13,14,0,11,3,8,
      9,14,15,5,2,8,12,3,7,0,4,10,1,13,11,6, 4,3,2,12,9,5,15,10,11,14,1,7,6,0,8,13},
    '{4,11,2,14,15,0,8,13,3,12,9,7,5,10,6,1, 13,0,11,7,4,9,1,10,14,3,5,12,2,15,8,6,
      1,4,11,13,12,3,7,14,10,15,6,8,0,5,9,2, 6,11,13,8,1,4,10,7,9,5,0,15,14,2,3,12},
    '{13,2,8,4,6,15,11,1,10,9,3,14,5,0,12,7, 1,15,13,8,10,3,7,4,12,5,6,11,0,14,9,2,
      7,11,4,1,9,12,14,2,0,6,10,13,15,3,5,8, 2,1,14,7,4,10,8,13,15,12,9,0,3,5,6,11}};
  localparam byte PT [32] = '{16,7,20,21,29,12,28,17,1,15,23,26,5,18,31,10,
                              2,8,24,14,32,27,3,9,19,13,30,6,22,11,4,25};
  localparam byte PC1 [56] = '{57,49,41,33,25,17,9,1,58,50,42,34,26,18,10,2,59,51,43,35,27,19,11,3,
                               60,52,44,36,63,55,47,39,31,23,15,7,62,54,46,38,30,22,14,6,61,53,45,37,
                               29,21,13,5,28,20,12,4};
  localparam byte PC2 [48] = '{14,17,11,24,1,5,3,28,15,6,21,10,23,19,12,4,26,8,16,7,27,20,13,2,
                               41,52,31,37,47,55,30,40,51,45,33,48,44,49,39,56,34,53,46,42,50,36,29,32};
  localparam byte SHIFTS [16] = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};

  // IP: output bit 8r+c+1 is input bit base[r] - 8c
  function automatic int ip_src(int i);   // i = 1..64
    int base [8] = '{58,60,62,64,57,59,61,63};
    return base[(i-1)/8] - 8 * ((i-1) % 8);
  endfunction
  function automatic logic [63:0] ip(logic [63:0] x);
    logic [63:0] y;
    for (int i = 1; i <= 64; i++) y[64-i] = x[64-ip_src(i)];
    return y;
  endfunction
  function automatic logic [63:0] fp(logic [63:0] y);
    logic [63:0] x;
    for (int i = 1; i <= 64; i++) x[64-ip_src(i)] = y[64-i];
    return x;
  endfunction
  function automatic logic [31:0] sp(int j, logic [5:0] b);   // S-box j (1..8) then P
    logic [31:0] o, y;
    o = '0;
    o[35-4*j -: 4] = 4'(SB[j-1][{b[5], b[0]} * 16 + b[4:1]]);
    for (int i = 1; i <= 32; i++) y[32-i] = o[32-PT[i-1]];
    return y;
  endfunction
  function automatic logic [5:0] chunk(logic [47:0] k, int j); return k[53-6*j -: 6]; endfunction
  function automatic logic [31:0] f(logic [31:0] r, logic [47:0] k);
    logic [31:0] y = '0;
    for (int j = 1; j <= 8; j++) begin
      logic [5:0] e;
      for (int q = 1; q <= 6; q++) e[6-q] = r[32 - (((4*(j-1) + q - 2 + 32) % 32) + 1)];
      y ^= sp(j, e ^ chunk(k, j));
    end
    return y;
  endfunction
  function automatic void subkeys(logic [63:0] key, output logic [47:0] ks [16]);
    logic [55:0] cd;
    logic [27:0] c, d;
    for (int i = 1; i <= 56; i++) cd[56-i] = key[64-PC1[i-1]];
    {c, d} = cd;
    for (int r = 0; r < 16; r++) begin
      for (int s = 0; s < SHIFTS[r]; s++) begin c = {c[26:0], c[27]}; d = {d[26:0], d[27]}; end
      for (int i = 1; i <= 48; i++) ks[r][48-i] = {c, d}[56-PC2[i-1]];
    end
  endfunction
  // 16 rounds on (l, r) with the given round keys, returning the pre-output
  // block R16 L16 (no permutations)
  function automatic logic [63:0] rounds16(logic [63:0] lr, logic [47:0] ks [16], bit dec);
    logic [31:0] l, r, x;
    {l, r} = lr;
    for (int i = 0; i < 16; i++) begin
      x = r; r = l ^ f(r, ks[dec ? 15 - i : i]); l = x;
    end
    return {r, l};
  endfunction
  function automatic logic [63:0] des(logic [63:0] key, logic [63:0] x, bit dec);
    logic [47:0] ks [16];
    subkeys(key, ks);
    return fp(rounds16(ip(x), ks, dec));
  endfunction
  function automatic logic [63:0] tdes(logic [63:0] k1, k2, k3, logic [63:0] x);
    return des(k3, des(k2, des(k1, x, 0), 1), 0);
  endfunction

  // ---------------------------------------------------------------- program
  localparam int JT [4] = '{6, 4, 2, 8};   // S-box of byte m of t
  bundle_t prog [256];
  int n = 0;
  function automatic inst_t sh(short_e op, ridx_t rd, ridx_t a, ridx_t b); return mk_pair(T_NOP, op, T_NOP, rd, a, b, 0); endfunction
  function automatic inst_t x3(ridx_t rd, ridx_t a, ridx_t b, ridx_t c); return mk_pair(T_XOR, S_NOP, T_XOR, rd, a, b, c); endfunction
  function automatic inst_t ldi(ridx_t rd, int v); return mk_op(K_LDI, rd, 0, 0, 16'(v)); endfunction
  function automatic inst_t ld(ridx_t rd, ridx_t a); return mk_op(K_LOAD, rd, a, 0, 0); endfunction
  function automatic inst_t sbx(int m, ridx_t src, ridx_t key);
    return mk_pair(T_XOR, short_e'(S_SBOX0 + m), T_NOP, ridx_t'(src == 22 ? 24 + m : 28 + m), src, key, ridx_t'(5 + m));
  endfunction
  task automatic put(inst_t s0, inst_t s1 = '0, inst_t s2 = '0, inst_t s3 = '0);
    prog[n][0] = s0; prog[n][1] = s1; prog[n][2] = s2; prog[n][3] = s3; n++;
  endtask
  // r1/r2 the halves, r3 = 1, r4 = 5 (rotates), r5..r8 SBOX table bases,
  // r9/r17 key pointers (Ku/Kt words), r18 = 8, r11 = 0xfcfcfcfc, r12/r13
  // and r14/r15 the key words of the first and second round of an
  // iteration, r16 = 16, r19 loop
  // count, r22 w, r23 v, r24..r31 lookups
  // One round, y ^= f(x) with the key words in ku/kt; it reloads ku/kt with
  // the words of the round two later once their last use has passed (a load
  // is seen by the very next bundle)
  task automatic round(ridx_t x, ridx_t y, ridx_t ku, ridx_t kt, ridx_t nku, ridx_t nkt, bit dec_cnt, int br_to);
    put(mk_pair(T_NOP, S_ROR, T_AND, 22, x, 3, 11), mk_pair(T_NOP, S_ROR, T_AND, 23, x, 4, 11),
        sh(S_ADD, 9, 9, 18), sh(S_ADD, 17, 17, 18));
    put(sbx(0, 22, ku), sbx(1, 22, ku), sbx(2, 22, ku), sbx(3, 22, ku));
    put(sbx(0, 23, kt), sbx(1, 23, kt), sbx(2, 23, kt), sbx(3, 23, kt));
    put(x3(24, y, 24, 25), x3(26, 26, 27, 28), x3(29, 29, 30, 31), ld(nku, 9));
    put(x3(y, 24, 26, 29), ld(nkt, 17), dec_cnt ? mk_pair(T_NOP, S_SUB, T_NOP, 19, 19, 3, 0) : '0,
        br_to >= 0 ? mk_op(K_BNE, 0, 19, 0, 16'(br_to)) : '0);
  endtask
  // One masked swap of the initial/final permutation, on registers a and b
  // with shift amount register nr and mask register mr:
  // t = ((a >> n) ^ b) & m; b ^= t; a ^= t << n. A rotate stands in for each
  // shift, as the mask keeps only bits the two agree on. Up to two extra
  // instructions (x0, x1) ride in the free slots of the three bundles.
  task automatic swap(ridx_t a, ridx_t b, ridx_t nr, ridx_t mr, inst_t x [6] = '{default: '0});
    put(mk_pair(T_NOP, S_ROR, T_XOR, 22, a, nr, b), x[0], x[1]);
    put(mk_pair(T_AND, S_NOP, T_NOP, 22, 22, mr, 0), x[2], x[3]);
    put(mk_pair(T_XOR, S_NOP, T_NOP, b, b, 22, 0), mk_pair(T_NOP, S_ROL, T_XOR, a, 22, nr, a), x[4], x[5]);
  endtask
  // the odd-bit exchange between l and r rotated left by one
  task automatic oddswap(ridx_t l, ridx_t r);
    put(sh(S_ROL, 31, r, 3));
    put(mk_pair(T_XOR, S_NOP, T_AND, 22, l, 31, 28));
    put(mk_pair(T_XOR, S_NOP, T_NOP, l, l, 22, 0), mk_pair(T_XOR, S_ROR, T_NOP, r, 31, 22, 3));
  endtask
  // the permutation masks, rebuilt before each use since the rounds use
  // r22..r31: r24 0x0f0f0f0f, r25 0x0000ffff, r26 0x33333333,
  // r27 0x00ff00ff, r28 0xaaaaaaaa, r29 = 4, r30 = 2
  task automatic masks();
    put(ldi(24, 'h0f0f), ldi(26, 'h3333), ldi(27, 'h00ff), ldi(28, 'haaaa));
    put(mk_pair(T_NOP, S_ROL, T_XOR, 24, 24, 16, 24), mk_pair(T_NOP, S_ROL, T_XOR, 26, 26, 16, 26),
        mk_pair(T_NOP, S_ROL, T_XOR, 27, 27, 16, 27), mk_pair(T_NOP, S_ROL, T_XOR, 28, 28, 16, 28));
    put(ldi(25, 'hffff), ldi(29, 4), ldi(30, 2));
  endtask
  int START;
  task automatic build();
    int lp;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    put(ldi(3, 1), ldi(4, 5), ldi(18, 8), ldi(11, 'hfcfc));
    put(ldi(16, 16), ldi(5, 0), ldi(6, 'h400), ldi(7, 'h800));
    put(mk_pair(T_NOP, S_ROL, T_XOR, 11, 11, 16, 11), ldi(8, 'hc00));
    START = n;
    // the first two rounds' key words are loaded here; every round then
    // loads the words of the round two later
    put(mk_op(K_RECV, 1, 0, 0, 0), ldi(9, 'h2000), ldi(17, 'h2004), ldi(19, 8));
    put(mk_op(K_RECV, 2, 0, 0, 0));
    masks();
    // initial permutation on (r1, r2); the first two rounds' key words are
    // loaded alongside, and every round then loads those of the round two later
    swap(1, 2, 29, 24, '{ld(12, 9), sh(S_ADD, 9, 9, 18), ld(13, 17), sh(S_ADD, 17, 17, 18), ld(14, 9), '0});
    swap(1, 2, 16, 25, '{ld(15, 17), '0, '0, '0, '0, '0});
    swap(2, 1, 30, 26);
    swap(2, 1, 18, 27);
    oddswap(1, 2);
    for (int s = 0; s < 3; s++) begin
      ridx_t l = s == 1 ? 2 : 1, r = s == 1 ? 1 : 2;
      if (s > 0) put(ldi(19, 8));
      lp = n;
      round(r, l, 12, 13, 12, 13, 1, -1);
      round(l, r, 14, 15, 14, 15, 0, lp);
    end
    // final permutation of the pre-output block (R48, L48) = (r2, r1)
    masks();
    oddswap(2, 1);
    swap(1, 2, 18, 27);
    swap(1, 2, 30, 26);
    swap(2, 1, 16, 25);
    swap(2, 1, 29, 24);
    put(mk_op(K_SEND, 0, 2, 0, 0));
    put(mk_op(K_SENDL, 0, 1, 0, 0), mk_op(K_BEQ, 0, 0, 0, 16'(START)));
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

  localparam int NBLK = 8;
  initial begin
    logic [63:0] k [3], pt;
    logic [47:0] ks [3][16];
    word_t mem [word_t];
    bit okrow = 1;
    for (int j = 0; j < 8; j++)
      for (int row = 0; row < 4; row++) begin
        int seen = 0;
        for (int c = 0; c < 16; c++) seen |= 1 << SB[j][16*row + c];
        okrow &= seen == 'hffff;
      end
    check("every S-box row is a permutation", okrow);
    check("reference DES meets the well-known example",
          des(64'h133457799bbcdff1, 64'h0123456789abcdef, 0) == 64'h85e813540f0ab405);
    check("reference DES decrypts", des(64'h133457799bbcdff1, 64'h85e813540f0ab405, 1) == 64'h0123456789abcdef);
    for (int i = 0; i < 3; i++) begin k[i] = {$urandom, $urandom}; subkeys(k[i], ks[i]); end
    // slot m's table at 0x400 m: index 4i for the u side, 4i+1 for the t side
    for (int m = 0; m < 4; m++)
      for (int b = 0; b < 256; b++)
        mem[32'h400 * m + 4 * b] = b % 4 == 0 ? sp(7 - 2 * m, 6'(b >> 2)) :
                                   b % 4 == 1 ? sp(JT[m], 6'(b >> 2)) : 32'd0;
    // round keys in the order the program uses them
    for (int q = 0; q < 48; q++) begin
      logic [47:0] kk;
      word_t ku = 0, kt = 0;
      kk = ks[q / 16][(q / 16) == 1 ? 15 - q % 16 : q % 16];
      for (int m = 0; m < 4; m++) begin
        ku[8*m+7 -: 6] = chunk(kk, 7 - 2 * m);
        kt[8*m+7 -: 8] = {chunk(kk, JT[m]), 2'b01};
      end
      mem[32'h2000 + 8 * q] = ku; mem[32'h2004 + 8 * q] = kt;
    end
    build();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    @(negedge clk); imem_we = 0;
    foreach (mem[a]) begin
      @(negedge clk); dmem_ld_we = 1; dmem_ld_addr = a; dmem_ld_wdata = mem[a];
    end
    @(negedge clk); dmem_ld_we = 0;
    for (int b = 0; b < NBLK; b++) begin
      pt = {$urandom, $urandom};
      inq.push_back(pt[63:32]); inq.push_back(pt[31:0]);
      expq.push_back(tdes(k[0], k[1], k[2], pt));
    end
    run = 1;
    wait (nblk == NBLK);
    check("all blocks", expq.size() == 0);
    // 2 start + 3 mask + 15 IP bundles, 3 stages of (8 x 10 bundles), 2 extra
    // loop-count bundles, 3 mask + 15 FP + 2 closing bundles = 282, plus 2
    // flushed bundles at each of the three loop exits
    $display("3DES: %0d blocks; steady state %0d cycles per block", NBLK, t_done[NBLK-1] - t_done[NBLK-2]);
    check("cycles per block", t_done[NBLK-1] - t_done[NBLK-2] <= 288);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
