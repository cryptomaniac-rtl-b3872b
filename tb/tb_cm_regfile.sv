// tb_cm_regfile: random reads and writes on all ports against a model array,
// including write-through of same-cycle writes and the rule that the
// highest-numbered write port wins.
module tb_cm_regfile;
  import cm_pkg::*;
  localparam int NRD = 12, NWR = 4;
  logic clk = 0, rst_n = 0;
  ridx_t raddr [NRD]; word_t rdata [NRD];
  logic we [NWR]; ridx_t waddr [NWR]; word_t wdata [NWR];
  word_t model [NREGS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_regfile dut (.*);
  initial begin
    for (int i = 0; i < NREGS; i++) model[i] = 0;
    for (int w = 0; w < NWR; w++) begin we[w] = 0; waddr[w] = 0; wdata[w] = 0; end
    for (int r = 0; r < NRD; r++) raddr[r] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        we[w] = $urandom % 2; waddr[w] = ridx_t'($urandom % 8); wdata[w] = $urandom;
      end
      for (int r = 0; r < NRD; r++) raddr[r] = ridx_t'($urandom % 8);
      #1;
      for (int r = 0; r < NRD; r++) begin
        word_t e; e = model[raddr[r]];
        for (int w = 0; w < NWR; w++) if (we[w] && waddr[w] == raddr[r]) e = wdata[w];
        checks++;
        if (rdata[r] !== e) begin failures++; $display("FAIL r%0d=%h exp %h", raddr[r], rdata[r], e); end
      end
      @(posedge clk);
      for (int w = 0; w < NWR; w++) if (we[w]) model[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
