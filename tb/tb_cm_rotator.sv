// tb_cm_rotator: checks left and right rotation by every amount 0..31, with
// garbage in the unused upper bits of the amount, against a bit-by-bit model.
module tb_cm_rotator;
  import cm_pkg::*;
  short_e op; word_t a, b, y, exp;
  int checks = 0, failures = 0;
  cm_rotator dut (.op, .a, .b, .y);
  initial begin
    for (int n = 0; n < 640; n++) begin
      op = (n % 2) ? S_ROR : S_ROL;
      a  = $urandom;
      b  = {$urandom} & 32'hFFFFFFE0 | 32'((n / 2) % 32);
      #1;
      for (int i = 0; i < 32; i++)
        if (op == S_ROL) exp[(i + b[4:0]) % 32] = a[i];
        else             exp[i] = a[(i + b[4:0]) % 32];
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%0d y=%h exp=%h", op, a, b[4:0], y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
