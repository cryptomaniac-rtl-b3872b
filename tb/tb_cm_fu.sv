// tb_cm_fu: drives random operation pairs (short-tiny, tiny-short,
// tiny-tiny, single operations) through the combining unit and compares
// with (R1 op_a R2) op_b R3 worked out here; checks MUL/MULMOD one cycle
// later and SBOX lookups after filling the unit's S-box cache.
module tb_cm_fu;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0, en, valid;
  inst_t inst; word_t r1, r2, r3, y_chain, y_long;
  logic sbox_miss, fill_we, fill_done, sbox_invalidate; logic [21:0] sbox_miss_tag, fill_tag;
  logic [7:0] fill_addr; word_t fill_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_fu dut (.*);

  function automatic word_t tiny(tiny_e o, word_t a, word_t b);
    case (o)
      T_XOR: return a ^ b;
      T_AND: return a & b;
      T_SEXT: return word_t'($signed(a[7:0]));
      default: return a;
    endcase
  endfunction
  function automatic word_t tword(int e); return 32'h5A5A0000 + e * 32'h01010101; endfunction
  function automatic word_t short_op(short_e o, word_t a, word_t b);
    case (o)
      S_ADD: return a + b;
      S_ADDINC: return a + b + 1;
      S_SUB: return a - b;
      S_ROL: return (a << b[4:0]) | (b[4:0] == 0 ? 0 : a >> (32 - b[4:0]));
      S_ROR: return (a >> b[4:0]) | (b[4:0] == 0 ? 0 : a << (32 - b[4:0]));
      S_SBOX0: return tword(a[7:0]);
      S_SBOX1: return tword(a[15:8]);
      S_SBOX2: return tword(a[23:16]);
      S_SBOX3: return tword(a[31:24]);
      default: return a;
    endcase
  endfunction
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    en = 1; valid = 1; inst = '0; r1 = 0; r2 = 0; r3 = 0;
    fill_we = 0; fill_done = 0; sbox_invalidate = 0; fill_addr = 0; fill_data = 0; fill_tag = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // fill the S-box cache with table base 0x400
    for (int e = 0; e < 256; e++) begin
      @(negedge clk); fill_we = 1; fill_addr = 8'(e); fill_data = tword(e); fill_done = e == 255; fill_tag = 22'd1;
    end
    @(negedge clk); fill_we = 0; fill_done = 0;
    for (int n = 0; n < 3000; n++) begin
      tiny_e t1, t2; short_e sh; word_t e;
      int form;
      @(negedge clk);
      form = $urandom % 4;
      t1 = tiny_e'($urandom % 4); t2 = tiny_e'($urandom % 4); sh = short_e'($urandom % 10);
      if (form == 0) t1 = T_NOP;          // short-tiny
      else if (form == 1) t2 = T_NOP;     // tiny-short
      else if (form == 2) sh = S_NOP;     // tiny-tiny
      else begin t1 = T_NOP; t2 = T_NOP; end
      r1 = $urandom; r2 = $urandom; r3 = $urandom;
      inst = mk_pair(t1, sh, t2, 5'd4, 5'd1, 5'd2, 5'd3);
      // table operand of an SBOX is the second input of the short stage
      if (sh >= S_SBOX0) begin
        if (t1 == T_NOP) r2 = {22'd1, 10'($urandom)}; else r3 = {22'd1, 10'($urandom)};
      end
      #1;
      if (t1 != T_NOP)      e = tiny(t2, short_op(sh, tiny(t1, r1, r2), r3), r3);
      else if (sh != S_NOP) e = tiny(t2, short_op(sh, r1, r2), r3);
      else                  e = tiny(t2, r1, r2);
      check("pair", y_chain, e);
      checks++; if (sbox_miss) begin failures++; $display("FAIL unexpected miss"); end
    end
    // long unit
    for (int n = 0; n < 300; n++) begin
      word_t e; longint unsigned xa, za;
      @(negedge clk);
      r1 = $urandom; r2 = $urandom;
      inst = mk_long((n % 2) ? L_MULMOD : L_MUL, 5'd4, 5'd1, 5'd2);
      xa = r1[15:0] == 0 ? 65536 : r1[15:0]; za = r2[15:0] == 0 ? 65536 : r2[15:0];
      e = (n % 2) ? word_t'((xa * za) % 65537) & 32'hFFFF : r1 * r2;
      @(negedge clk); inst = '0;
      check("long", y_long, e);
    end
    // a lookup in another table misses
    @(negedge clk); inst = mk_pair(T_NOP, S_SBOX0, T_NOP, 5'd4, 5'd1, 5'd2, 5'd3); r2 = 32'h800; #1;
    checks++; if (!sbox_miss || sbox_miss_tag != 22'd2) begin failures++; $display("FAIL no miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
