// cm_tb_prog_pkg: test program and reference model shared by the processing
// element and system testbenches.
//
// build() assembles a program that reads a request header, extracts the
// action field and runs one of three kernels:
//   action 0 (BF): a Blowfish-style Feistel cipher, 16 rounds, whose loop body
//     is four bundles: SBOX x4 / Add-Xor + Load + pointer and counter update /
//     Add-Xor / Xor + move + branch; it returns R ^ P[17] and L, which
//     is Blowfish encryption when the tables hold a Blowfish key schedule;
//   action 1 (A1): reads the session's key from the keystore (word
//     16*session/4, address bit 31 set), returns a*b, MULMOD(key, a) and
//     (a*b + MULMOD) xor key;
//   action 2 (A2): stores a new word into table 0 at a given index, and
//     returns the SBOX lookup of that index before and after SBOXSYNC.
// Every result starts with a copy of the request header.
// The req_* tasks append a request to an input word stream and its expected
// result words to an expectation queue, using the model state below.
package cm_tb_prog_pkg;
  import cm_pkg::*;

  localparam int BF = 5, A1 = 20, A2 = 40, LOOP = BF + 3;

  // reference state: S-box tables (data memory 0x000..0xFFF), the P array
  // (0x1000..0x1047) and the keystore
  word_t sbox [4][256];
  word_t parr [18];
  word_t keys [256];

  function automatic void init_model();
    for (int t = 0; t < 4; t++) for (int e = 0; e < 256; e++) sbox[t][e] = $urandom;
    for (int i = 0; i < 18; i++) parr[i] = $urandom;
    for (int i = 0; i < 256; i++) keys[i] = $urandom;
    keys[(7 * 16) / 4][15:0] = 16'h0000;   // session 7: key 0 stands for 2^16
  endfunction

  // data memory image word a (byte address 4*a), for a < DMEM_INIT_WORDS
  localparam int DMEM_INIT_WORDS = 1024 + 18;
  function automatic word_t dmem_word(int a);
    return a < 1024 ? sbox[a / 256][a % 256] : parr[a - 1024];
  endfunction

  function automatic inst_t ldi(ridx_t rd, int v); return mk_op(K_LDI, rd, 0, 0, 16'(v)); endfunction
  function automatic inst_t op2(kind_e k, ridx_t rd, ridx_t a, ridx_t b, int imm);
    return mk_op(k, rd, a, b, 16'(imm));
  endfunction

  function automatic void put(ref bundle_t prog [256], ref int npc,
                              input inst_t s0, input inst_t s1 = '0,
                              input inst_t s2 = '0, input inst_t s3 = '0);
    prog[npc][0] = s0; prog[npc][1] = s1; prog[npc][2] = s2; prog[npc][3] = s3;
    npc++;
  endfunction

  function automatic void build(ref bundle_t prog [256]);
    int n;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    n = 0;
    // header and dispatch: r20 header, r23 action, r22 = 0xff, r15 = 4
    put(prog, n, mk_op(K_RECV, 20, 0, 0, 0), ldi(21, 24), ldi(22, 8'hff), ldi(15, 4));
    put(prog, n, mk_pair(T_NOP, S_ROL, T_AND, 23, 20, 21, 22), ldi(10, 0), ldi(11, 'h400), ldi(12, 'h800));
    put(prog, n, op2(K_BEQ, 0, 23, 0, BF), ldi(13, 'hC00), ldi(14, 'h1000), ldi(17, 1));
    put(prog, n, op2(K_BEQ, 0, 23, 17, A1), ldi(19, 2));
    put(prog, n, op2(K_BEQ, 0, 0, 0, A2));
    // Blowfish-style kernel: r1 = L, r2 = R, r14 = P pointer, r16 = rounds left
    n = BF;
    put(prog, n, mk_op(K_RECV, 1, 0, 0, 0), ldi(16, 16), ldi(14, 'h1000), mk_op(K_SEND, 0, 20, 0, 0));
    put(prog, n, mk_op(K_RECV, 2, 0, 0, 0), op2(K_LOAD, 8, 14, 0, 0));
    put(prog, n, mk_pair(T_XOR, S_NOP, T_NOP, 1, 1, 8, 0), mk_pair(T_NOP, S_ADD, T_NOP, 14, 14, 15, 0));
    // LOOP
    put(prog, n, mk_pair(T_NOP, S_SBOX3, T_NOP, 3, 1, 10, 0), mk_pair(T_NOP, S_SBOX2, T_NOP, 4, 1, 11, 0),
                 mk_pair(T_NOP, S_SBOX1, T_NOP, 5, 1, 12, 0), mk_pair(T_NOP, S_SBOX0, T_NOP, 6, 1, 13, 0));
    put(prog, n, mk_pair(T_NOP, S_ADD, T_XOR, 7, 3, 4, 5), op2(K_LOAD, 8, 14, 0, 0),
                 mk_pair(T_NOP, S_ADD, T_NOP, 14, 14, 15, 0), mk_pair(T_NOP, S_SUB, T_NOP, 16, 16, 17, 0));
    put(prog, n, mk_pair(T_NOP, S_ADD, T_XOR, 2, 7, 6, 2));
    put(prog, n, mk_pair(T_XOR, S_NOP, T_NOP, 1, 2, 8, 0), mk_pair(T_NOP, S_NOP, T_NOP, 2, 1, 0, 0),
                 op2(K_BNE, 0, 16, 0, LOOP));
    // the pointer now addresses P[17], which whitens R
    put(prog, n, op2(K_LOAD, 8, 14, 0, 0));
    put(prog, n, mk_pair(T_XOR, S_NOP, T_NOP, 2, 2, 8, 0));
    put(prog, n, mk_op(K_SEND, 0, 2, 0, 0));
    put(prog, n, mk_op(K_SENDL, 0, 1, 0, 0), op2(K_BEQ, 0, 0, 0, 0));
    // action 1: keystore, MUL, MULMOD
    n = A1;
    put(prog, n, mk_op(K_RECV, 1, 0, 0, 0), ldi(24, 1), ldi(25, 31), ldi(26, 16));
    put(prog, n, mk_op(K_RECV, 2, 0, 0, 0), mk_pair(T_NOP, S_ROL, T_NOP, 24, 24, 25, 0),
                 mk_pair(T_NOP, S_ROL, T_AND, 27, 20, 26, 22));
    put(prog, n, mk_pair(T_NOP, S_ROL, T_XOR, 28, 27, 15, 24));
    put(prog, n, op2(K_LOAD, 29, 28, 0, 0));
    put(prog, n, mk_long(L_MUL, 30, 1, 2), mk_long(L_MULMOD, 31, 29, 1), mk_op(K_SEND, 0, 20, 0, 0));
    put(prog, n, mk_pair(T_NOP, S_ADD, T_XOR, 9, 30, 31, 29));
    put(prog, n, mk_op(K_SEND, 0, 30, 0, 0));
    put(prog, n, mk_op(K_SEND, 0, 31, 0, 0));
    put(prog, n, mk_op(K_SENDL, 0, 9, 0, 0), op2(K_BEQ, 0, 0, 0, 0));
    // action 2: store into table 0, SBOX before and after SBOXSYNC
    n = A2;
    put(prog, n, mk_op(K_RECV, 1, 0, 0, 0), mk_op(K_SEND, 0, 20, 0, 0));
    put(prog, n, mk_op(K_RECV, 2, 0, 0, 0), mk_pair(T_AND, S_ROL, T_NOP, 5, 1, 22, 19));
    put(prog, n, mk_pair(T_NOP, S_SBOX0, T_NOP, 6, 1, 10, 0), op2(K_STORE, 0, 5, 2, 0));
    put(prog, n, mk_pair(T_NOP, S_SBOX0, T_NOP, 7, 1, 10, 0));
    put(prog, n, mk_op(K_SBOXSYNC, 0, 0, 0, 0));
    put(prog, n, mk_pair(T_NOP, S_SBOX0, T_NOP, 8, 1, 10, 0));
    put(prog, n, mk_op(K_SEND, 0, 7, 0, 0));
    put(prog, n, mk_op(K_SENDL, 0, 8, 0, 0), op2(K_BEQ, 0, 0, 0, 0));
  endfunction

  function automatic word_t F(word_t x);
    return ((sbox[0][x[31:24]] + sbox[1][x[23:16]]) ^ sbox[2][x[15:8]]) + sbox[3][x[7:0]];
  endfunction

  // expected results are returned as a queue of words; the last one carries
  // the last flag
  function automatic void req_bf(int id, word_t l, word_t r, ref word_t inq [$], ref word_t res [$]);
    word_t h, L, R, R2;
    h = {8'(id), 8'd0, 8'd0, 8'd2};
    inq.push_back(h); inq.push_back(l); inq.push_back(r);
    L = l ^ parr[0]; R = r;
    for (int i = 0; i < 16; i++) begin
      R2 = R ^ F(L);
      R = L; L = R2 ^ parr[i + 1];
    end
    res = {h, R ^ parr[17], L};
  endfunction

  function automatic void req_a1(int id, int sess, word_t a, word_t b, ref word_t inq [$], ref word_t res [$]);
    word_t h, k, m, mm; longint unsigned xa, za;
    h = {8'(id), 8'(sess), 8'd1, 8'd2};
    inq.push_back(h); inq.push_back(a); inq.push_back(b);
    k = keys[(sess * 16) / 4];
    m = a * b;
    xa = k[15:0] == 0 ? 65536 : k[15:0]; za = a[15:0] == 0 ? 65536 : a[15:0];
    mm = word_t'((xa * za) % 65537) & 32'hFFFF;
    res = {h, m, mm, (m + mm) ^ k};
  endfunction

  // the new table word is only seen by SBOX after SBOXSYNC; the model table
  // is updated for later requests on the same element
  function automatic void req_a2(int id, logic [7:0] idx, word_t v, ref word_t inq [$], ref word_t res [$]);
    word_t h;
    h = {8'(id), 8'd0, 8'd2, 8'd2};
    inq.push_back(h); inq.push_back({24'($urandom), idx}); inq.push_back(v);
    res = {h, sbox[0][idx], v};
    sbox[0][idx] = v;
  endfunction
endpackage
