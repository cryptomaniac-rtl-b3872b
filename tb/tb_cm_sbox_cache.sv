// tb_cm_sbox_cache: fills the S-box cache with a table, checks that lookups
// of every index byte return the table word {table base, byte, 00} would
// address, that a different table base misses, and that invalidate (SBOXSYNC)
// turns a hit into a miss until the table is refilled.
module tb_cm_sbox_cache;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lookup, fill_we, fill_done, invalidate, miss;
  short_e op; word_t idx, tbl, data, fill_data; logic [7:0] fill_addr;
  logic [21:0] fill_tag, miss_tag;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_sbox_cache dut (.*);

  function automatic word_t tword(logic [21:0] tag, logic [7:0] e);
    return {tag[9:0], 14'h1234, e} ^ 32'h9e3779b9;
  endfunction
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic fill(logic [21:0] tag);
    for (int e = 0; e < 256; e++) begin
      @(negedge clk);
      fill_we = 1; fill_addr = 8'(e); fill_data = tword(tag, 8'(e));
      fill_done = (e == 255); fill_tag = tag;
    end
    @(negedge clk); fill_we = 0; fill_done = 0;
  endtask

  initial begin
    lookup = 0; fill_we = 0; fill_done = 0; invalidate = 0; op = S_SBOX0;
    idx = 0; tbl = 0; fill_data = 0; fill_addr = 0; fill_tag = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    lookup = 1; tbl = 32'h0000_0C00; #1;
    check("miss after reset", miss && miss_tag == 22'd3);
    fill(22'd3);
    for (int n = 0; n < 300; n++) begin
      op  = short_e'(int'(S_SBOX0) + n % 4);
      idx = $urandom;
      tbl = {22'd3, 10'($urandom)};
      #1;
      check("hit", !miss);
      check("data", data == tword(22'd3, idx[8*(n%4) +: 8]));
    end
    tbl = 32'h0000_1000; #1;
    check("other table misses", miss);
    lookup = 0; #1;
    check("no lookup no miss", !miss);
    lookup = 1; tbl = 32'h0000_0C00;
    @(negedge clk); invalidate = 1; @(negedge clk); invalidate = 0; #1;
    check("miss after invalidate", miss);
    fill(22'd4); tbl = 32'h0000_1000; op = S_SBOX2; idx = 32'h00AB_0000; #1;
    check("hit new table", !miss && data == tword(22'd4, 8'hAB));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
