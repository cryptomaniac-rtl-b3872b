// tb_cm_logic_unit: checks the tiny logical unit (XOR, AND, sign extension,
// pass-through) on random operands against expressions computed here.
module tb_cm_logic_unit;
  import cm_pkg::*;
  tiny_e op; word_t a, b, y, exp;
  int checks = 0, failures = 0;
  cm_logic_unit dut (.op, .a, .b, .y);
  initial begin
    for (int n = 0; n < 400; n++) begin
      op = tiny_e'(n % 4); a = $urandom; b = $urandom;
      #1;
      case (op)
        T_XOR:  exp = a ^ b;
        T_AND:  exp = a & b;
        T_SEXT: exp = a[7] ? (32'hFFFFFF00 | a[7:0]) : {24'd0, a[7:0]};
        default: exp = a;
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
