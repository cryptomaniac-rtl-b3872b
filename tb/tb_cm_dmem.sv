// tb_cm_dmem: random reads, writes and loader writes against a model array;
// reads are checked one cycle after the address, as the memory is synchronous.
module tb_cm_dmem;
  import cm_pkg::*;
  localparam int WORDS = 4096;
  logic clk = 0, en, we, ld_we; word_t addr, wdata, rdata, ld_addr, ld_wdata;
  word_t model [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_dmem dut (.*);
  initial begin
    en = 0; we = 0; ld_we = 0; addr = 0; wdata = 0; ld_addr = 0; ld_wdata = 0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); ld_we = 1; ld_addr = 4 * a; ld_wdata = $urandom; model[a] = ld_wdata;
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 1000; n++) begin
      word_t exp; logic rd;
      @(negedge clk);
      en = 1; we = $urandom % 3 == 0; addr = 4 * ($urandom % 64); wdata = $urandom;
      rd = !we; exp = model[addr[13:2]];
      @(posedge clk); if (we) model[addr[13:2]] = wdata;
      @(negedge clk); en = 0;
      if (rd) begin
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL a=%h %h exp %h", addr, rdata, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
