// tb_cm_fifo: random pushes and pops (never past full or empty) against a
// queue model; checks head data, full, empty and count every cycle.
module tb_cm_fifo;
  logic clk = 0, rst_n = 0, push, pop, full, empty;
  logic [31:0] wdata, rdata; logic [4:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_fifo #(.DW(32), .DEPTH(16)) dut (.*);
  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (full !== (q.size() == 16) || empty !== (q.size() == 0) || count !== 5'(q.size()) ||
          (q.size() > 0 && rdata !== q[0])) begin
        failures++; $display("FAIL size=%0d count=%0d", q.size(), count);
      end
      push = ($urandom % 100) < ((n / 500) % 2 ? 70 : 35) && q.size() < 16;
      pop  = ($urandom % 2) && q.size() > 0;
      wdata = $urandom;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
