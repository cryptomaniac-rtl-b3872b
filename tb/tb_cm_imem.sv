// tb_cm_imem: writes random bundles and reads them back at random addresses.
module tb_cm_imem;
  import cm_pkg::*;
  logic clk = 0, we; logic [7:0] pc, waddr; bundle_t bundle, wdata;
  bundle_t model [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_imem dut (.*);
  function automatic bundle_t rnd();
    logic [255:0] w;
    for (int i = 0; i < 8; i++) w = {w[223:0], 32'($urandom)};
    return bundle_t'(w[$bits(bundle_t)-1:0]);
  endfunction
  initial begin
    we = 0; pc = 0; waddr = 0; wdata = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = rnd(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); pc = 8'($urandom);
      if (n % 3 == 0) begin we = 1; waddr = 8'($urandom); wdata = rnd(); end else we = 0;
      #1; checks++;
      if (bundle !== model[pc]) begin failures++; $display("FAIL pc=%0d", pc); end
      @(posedge clk); if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
