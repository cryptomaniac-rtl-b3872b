// tb_cm_keystore: loads keys, then lets four requesters ask for random words
// for many cycles; checks one-hot grants, that every requester is served
// within NPROC cycles (round robin) and that data one cycle after a grant is
// the word the granted requester addressed.
module tb_cm_keystore;
  import cm_pkg::*;
  localparam int NPROC = 4;
  logic clk = 0, rst_n = 0, wr_en; word_t wr_addr, wr_data, rdata;
  logic [NPROC-1:0] req, gnt; word_t addr [NPROC];
  word_t model [1024];
  int checks = 0, failures = 0, wait_c [NPROC];
  always #5 clk = ~clk;
  cm_keystore #(.NPROC(NPROC), .WORDS(1024)) dut (.*);
  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; req = 0;
    for (int p = 0; p < NPROC; p++) begin addr[p] = 0; wait_c[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 4 * a; wr_data = $urandom; model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      word_t exp; logic any;
      for (int p = 0; p < NPROC; p++)
        if (!req[p] || gnt[p]) begin req[p] = $urandom % 3 != 0; addr[p] = 4 * ($urandom % 1024); end
      #1;
      checks++; if ($countones(gnt) > 1 || (req != 0 && gnt == 0) || (gnt & ~req) != 0) begin failures++; $display("FAIL grant"); end
      any = 0;
      for (int p = 0; p < NPROC; p++) if (gnt[p]) begin exp = model[addr[p][11:2]]; any = 1; end
      for (int p = 0; p < NPROC; p++) begin
        wait_c[p] = (req[p] && !gnt[p]) ? wait_c[p] + 1 : 0;
        checks++; if (wait_c[p] >= NPROC) begin failures++; $display("FAIL starvation %0d", p); end
      end
      @(negedge clk);
      if (any) begin checks++; if (rdata !== exp) begin failures++; $display("FAIL data"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
