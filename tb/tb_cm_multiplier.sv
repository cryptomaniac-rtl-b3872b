// tb_cm_multiplier: checks MUL and MULMOD through the two-stage pipeline, one
// new operation per cycle, including stalled cycles (en low). MULMOD is
// checked against a direct modulo-65537 computation with 0 meaning 2^16.
module tb_cm_multiplier;
  import cm_pkg::*;
  logic clk = 0, en; long_e op; word_t a, b, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_multiplier dut (.clk, .en, .op, .a, .b, .y);

  function automatic word_t model(long_e o, word_t x, word_t z);
    longint unsigned xa, za;
    if (o == L_MUL) return 32'(64'(x) * 64'(z));
    xa = (x[15:0] == 0) ? 65536 : x[15:0];
    za = (z[15:0] == 0) ? 65536 : z[15:0];
    return {16'd0, 16'((xa * za) % 65537)};
  endfunction

  word_t exp_q; logic have_q;
  initial begin
    have_q = 0; en = 0; op = L_MUL; a = 0; b = 0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom % 5) != 0;
      if (en) begin
        op = ($urandom % 2) ? L_MULMOD : L_MUL;
        a  = $urandom; b = $urandom;
        if (n % 17 == 0) a[15:0] = 0;
        if (n % 23 == 0) b[15:0] = 0;
      end
      @(posedge clk);
      if (en) begin exp_q = model(op, a, b); have_q = 1; end
      @(negedge clk);
      if (have_q) begin
        checks++;
        if (y !== exp_q) begin failures++; $display("FAIL y=%h exp=%h", y, exp_q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
