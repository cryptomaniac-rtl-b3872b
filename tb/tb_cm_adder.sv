// tb_cm_adder: checks add, add-increment and subtract on random and corner
// operands against 64-bit arithmetic computed here.
module tb_cm_adder;
  import cm_pkg::*;
  short_e op; word_t a, b, y, exp;
  int checks = 0, failures = 0;
  cm_adder dut (.op, .a, .b, .y);
  initial begin
    for (int n = 0; n < 600; n++) begin
      op = (n % 3 == 0) ? S_ADD : (n % 3 == 1) ? S_ADDINC : S_SUB;
      a = (n < 30) ? 32'hFFFFFFFF : $urandom; b = (n < 15) ? 32'd1 : $urandom;
      #1;
      case (op)
        S_ADD:    exp = 32'(64'(a) + 64'(b));
        S_ADDINC: exp = 32'(64'(a) + 64'(b) + 64'd1);
        default:  exp = 32'(64'(a) - 64'(b));
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
