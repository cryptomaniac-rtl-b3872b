// cm_tb_aes_pkg: AES-128 (Rijndael with a 128-bit key and block) reference
// model and CryptoManiac program, shared by the single-element and the
// system AES testbenches.
//
// make_tables() computes the S-box from the inverse in GF(2^8) and the affine
// map, and from it the four T-tables Te0..Te3 (S-box output times the
// MixColumns column, each a byte rotation of the previous). expand() is the
// key expansion (44 words) and ref_encrypt() a byte-wise reference built from
// SubBytes, ShiftRows, MixColumns and AddRoundKey, independent of the tables.
// build() assembles the table-driven kernel into prog: Te_k at 0x400 k (one
// per S-box cache: slot k always looks up Te_k), round keys at 0x1000. Each
// of the nine full rounds is nine bundles: four bundles of four SBOX lookups
// (one output column each), then Xor-Xor pairs that fold the lookups and the
// round key, with the four round-key loads and pointer updates in the free
// slots. The last round masks bytes out of the same tables with Sbox-And
// pairs. With sys set, a request starts with a header word that is returned
// first, as the system's result format requires.
// The instructions are the design's; the kernel, its table layout and its
// bundle schedule are this test program's own.
package cm_tb_aes_pkg;
  import cm_pkg::*;

  // ---------------------------------------------------------------- AES model
  logic [7:0] sb [256];
  word_t te [4][256];
  word_t rk [44];

  function automatic logic [7:0] xt(logic [7:0] a); return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00); endfunction
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin if (b[i]) p ^= a; a = xt(a); end
    return p;
  endfunction
  function automatic void make_tables();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, s;
      inv = 0;
      for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      sb[x] = s;
    end
    for (int x = 0; x < 256; x++) begin
      logic [7:0] s, s2, s3;
      s = sb[x]; s2 = xt(s); s3 = s2 ^ s;
      te[0][x] = {s2, s, s, s3};
      te[1][x] = {s3, s2, s, s};
      te[2][x] = {s, s3, s2, s};
      te[3][x] = {s, s, s3, s2};
    end
  endfunction
  function automatic void expand(logic [127:0] key);
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) rk[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      word_t t = rk[i - 1];
      if (i % 4 == 0) begin
        t = {sb[t[23:16]], sb[t[15:8]], sb[t[7:0]], sb[t[31:24]]} ^ {rc, 24'd0};
        rc = xt(rc);
      end
      rk[i] = rk[i - 4] ^ t;
    end
  endfunction
  // byte-wise reference: state byte (r, c) is block byte 4c + r
  function automatic logic [127:0] ref_encrypt(logic [127:0] pt);
    logic [7:0] st [16], tmp [16];
    for (int i = 0; i < 16; i++) st[i] = pt[127 - 8*i -: 8];
    for (int i = 0; i < 16; i++) st[i] ^= rk[i / 4][31 - 8*(i % 4) -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) st[i] = sb[st[i]];
      for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) tmp[4*c + w] = st[4*((c + w) % 4) + w];
      st = tmp;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = st[4*c]; a1 = st[4*c+1]; a2 = st[4*c+2]; a3 = st[4*c+3];
          st[4*c]   = xt(a0) ^ (xt(a1) ^ a1) ^ a2 ^ a3;
          st[4*c+1] = a0 ^ xt(a1) ^ (xt(a2) ^ a2) ^ a3;
          st[4*c+2] = a0 ^ a1 ^ xt(a2) ^ (xt(a3) ^ a3);
          st[4*c+3] = (xt(a0) ^ a0) ^ a1 ^ a2 ^ xt(a3);
        end
      for (int i = 0; i < 16; i++) st[i] ^= rk[4*r + i / 4][31 - 8*(i % 4) -: 8];
    end
    for (int i = 0; i < 16; i++) ref_encrypt[127 - 8*i -: 8] = st[i];
  endfunction

  // ---------------------------------------------------------------- program
  bundle_t prog [256];
  int n = 0, LOOP;
  function automatic inst_t ldi(ridx_t rd, int v); return mk_op(K_LDI, rd, 0, 0, 16'(v)); endfunction
  function automatic inst_t ld(ridx_t rd, ridx_t a); return mk_op(K_LOAD, rd, a, 0, 0); endfunction
  function automatic inst_t add(ridx_t rd, ridx_t a, ridx_t b); return mk_pair(T_NOP, S_ADD, T_NOP, rd, a, b, 0); endfunction
  function automatic inst_t x3(ridx_t rd, ridx_t a, ridx_t b, ridx_t c); return mk_pair(T_XOR, S_NOP, T_XOR, rd, a, b, c); endfunction
  function automatic inst_t sbx(short_e s, ridx_t rd, ridx_t idx, ridx_t tbl); return mk_pair(T_NOP, s, T_NOP, rd, idx, tbl, 0); endfunction
  function automatic inst_t sba(short_e s, ridx_t rd, ridx_t idx, ridx_t tbl, ridx_t m); return mk_pair(T_NOP, s, T_AND, rd, idx, tbl, m); endfunction
  task automatic put(inst_t s0, inst_t s1 = '0, inst_t s2 = '0, inst_t s3 = '0);
    prog[n][0] = s0; prog[n][1] = s1; prog[n][2] = s2; prog[n][3] = s3; n++;
  endtask
  // registers: r1..r4 state columns, r5..r20 lookups, r21..r24 round key,
  // r25 key pointer, r26 = 4, r27 rounds left, r28 = 1, r29..r31 Te1..Te3
  // bases (Te0 is at 0 = r0)
  function automatic ridx_t S(int j); return ridx_t'(1 + (j % 4)); endfunction
  // sys = 1: requests carry a header word, which is parked in data memory at
  // 0x2000 while the block is encrypted and returned as the first result word
  task automatic build(bit sys = 0);
    ridx_t tb [4];
    tb = '{5'd0, 5'd29, 5'd30, 5'd31};
    n = 0;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    if (sys) begin
      put(mk_op(K_RECV, 5, 0, 0, 0), ldi(6, 'h2000));
      put(mk_op(K_STORE, 0, 6, 5, 0));
    end
    put(mk_op(K_RECV, 1, 0, 0, 0), ldi(26, 4), ldi(28, 1), ldi(25, 'h1000));
    put(mk_op(K_RECV, 2, 0, 0, 0), ldi(29, 'h400), ldi(30, 'h800), ldi(31, 'hC00));
    put(mk_op(K_RECV, 3, 0, 0, 0), ld(21, 25), add(25, 25, 26), ldi(27, 9));
    put(mk_op(K_RECV, 4, 0, 0, 0), ld(22, 25), add(25, 25, 26), mk_pair(T_XOR, S_NOP, T_NOP, 1, 1, 21, 0));
    put(ld(23, 25), add(25, 25, 26), mk_pair(T_XOR, S_NOP, T_NOP, 2, 2, 22, 0));
    put(ld(24, 25), add(25, 25, 26), mk_pair(T_XOR, S_NOP, T_NOP, 3, 3, 23, 0));
    put(mk_pair(T_XOR, S_NOP, T_NOP, 4, 4, 24, 0));
    LOOP = n;
    for (int j = 0; j < 4; j++)   // column j: Te0[s_j.3] Te1[s_j+1.2] Te2[s_j+2.1] Te3[s_j+3.0]
      put(sbx(S_SBOX3, ridx_t'(5 + j), S(j), tb[0]),     sbx(S_SBOX2, ridx_t'(9 + j), S(j + 1), tb[1]),
          sbx(S_SBOX1, ridx_t'(13 + j), S(j + 2), tb[2]), sbx(S_SBOX0, ridx_t'(17 + j), S(j + 3), tb[3]));
    put(ld(21, 25), add(25, 25, 26), x3(5, 5, 9, 13), x3(6, 6, 10, 14));
    put(ld(22, 25), add(25, 25, 26), x3(7, 7, 11, 15), x3(8, 8, 12, 16));
    put(ld(23, 25), add(25, 25, 26), x3(1, 5, 17, 21), mk_pair(T_NOP, S_SUB, T_NOP, 27, 27, 28, 0));
    put(ld(24, 25), add(25, 25, 26), x3(2, 6, 18, 22), x3(3, 7, 19, 23));
    put(x3(4, 8, 20, 24), mk_op(K_BNE, 0, 27, 0, 16'(LOOP)));
    // last round: masks 0xff, 0xff00, 0xff0000, 0xff000000 in r9..r12
    put(ldi(9, 'hff), ldi(10, 'hff00), ldi(11, 16), ldi(12, 24));
    put(mk_pair(T_NOP, S_ROL, T_NOP, 11, 9, 11, 0), mk_pair(T_NOP, S_ROL, T_NOP, 12, 9, 12, 0));
    for (int j = 0; j < 4; j++) begin
      put(sba(S_SBOX1, 13, S(j + 2), tb[0], 10), sba(S_SBOX0, 14, S(j + 3), tb[1], 9),
          sba(S_SBOX3, 15, S(j), tb[2], 12),     sba(S_SBOX2, 16, S(j + 1), tb[3], 11));
      put(ld(21, 25), add(25, 25, 26), x3(13, 13, 14, 15));
      put(x3(ridx_t'(17 + j), 13, 16, 21));
    end
    if (sys) begin
      put(ldi(9, 'h2000));
      put(ld(9, 9));
      put(mk_op(K_SEND, 0, 9, 0, 0));
    end
    put(mk_op(K_SEND, 0, 17, 0, 0));
    put(mk_op(K_SEND, 0, 18, 0, 0));
    put(mk_op(K_SEND, 0, 19, 0, 0));
    put(mk_op(K_SENDL, 0, 20, 0, 0), mk_op(K_BEQ, 0, 0, 0, 0));
  endtask
endpackage
