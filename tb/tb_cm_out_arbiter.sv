// tb_cm_out_arbiter: four sources each emit results of random length (last
// flag on the final word); a model output queue fills and drains at random.
// Checks that results are never interleaved, arrive complete and in order
// per source, and that every source gets through.
module tb_cm_out_arbiter;
  import cm_pkg::*;
  localparam int NPROC = 4;
  logic clk = 0, rst_n = 0;
  logic [NPROC-1:0] valid, last, ready; word_t data [NPROC];
  logic q_push, q_full; logic [XLEN:0] q_wdata;
  int seq [NPROC], rem [NPROC], got [NPROC];
  int checks = 0, failures = 0, owner = -1, qn = 0;
  always #5 clk = ~clk;
  cm_out_arbiter #(.NPROC(NPROC)) dut (.*);
  initial begin
    for (int p = 0; p < NPROC; p++) begin seq[p] = 0; rem[p] = 1 + $urandom % 4; got[p] = 0; valid[p] = 0; last[p] = 0; data[p] = 0; end
    q_full = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      q_full = qn >= 4;
      for (int p = 0; p < NPROC; p++) begin
        valid[p] = $urandom % 3 != 0;
        data[p]  = {8'(p), 24'(seq[p])};
        last[p]  = rem[p] == 1;
      end
      #1;
      checks++;
      if ($countones(ready) > 1 || (q_push != (ready != 0))) begin failures++; $display("FAIL ready"); end
      for (int p = 0; p < NPROC; p++) if (ready[p]) begin
        checks++;
        if (!valid[p] || q_wdata !== {last[p], data[p]} || (owner != -1 && owner != p)) begin
          failures++; $display("FAIL word from %0d owner %0d", p, owner);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NPROC; p++) if (ready[p]) begin
        seq[p]++; qn++;
        if (last[p]) begin owner = -1; got[p]++; rem[p] = 1 + $urandom % 4; end
        else begin owner = p; rem[p]--; end
      end
      if (qn > 0 && $urandom % 2) qn--;
    end
    for (int p = 0; p < NPROC; p++) begin checks++; if (got[p] < 50) begin failures++; $display("FAIL source %0d got %0d", p, got[p]); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
