// tb_cm_btb: trains branch entries and checks the predictions against a
// model of a direct-mapped table with 2-bit saturating counters, including
// aliasing between addresses that share an index.
module tb_cm_btb;
  localparam int PC_W = 8, ENTRIES = 16;
  logic clk = 0, rst_n = 0;
  logic [PC_W-1:0] pc, pred_target, upd_pc, upd_target;
  logic pred_taken, upd_valid, upd_taken;
  logic mv [ENTRIES]; logic [PC_W-1:0] mpc [ENTRIES], mtg [ENTRIES]; logic [1:0] mct [ENTRIES];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cm_btb #(.PC_W(PC_W), .ENTRIES(ENTRIES)) dut (.*);
  initial begin
    for (int i = 0; i < ENTRIES; i++) begin mv[i] = 0; mpc[i] = 0; mtg[i] = 0; mct[i] = 0; end
    pc = 0; upd_valid = 0; upd_pc = 0; upd_taken = 0; upd_target = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      pc = PC_W'($urandom % 40);
      upd_valid = $urandom % 2; upd_pc = PC_W'($urandom % 40);
      upd_taken = ($urandom % 4) != 0; upd_target = PC_W'($urandom % 40 + 40 * (upd_pc % 2));
      #1;
      begin
        int li; logic et;
        li = pc % ENTRIES;
        et = mv[li] && mpc[li] == pc && mct[li][1];
        checks++;
        if (pred_taken !== et || (et && pred_target !== mtg[li])) begin
          failures++; $display("FAIL pc=%0d taken=%0d exp=%0d", pc, pred_taken, et);
        end
      end
      @(posedge clk);
      if (upd_valid) begin
        int ui; logic hit;
        ui = upd_pc % ENTRIES; hit = mv[ui] && mpc[ui] == upd_pc;
        if (upd_taken) begin
          mct[ui] = !hit ? 2 : (mct[ui] == 3 ? 3 : mct[ui] + 1);
          mv[ui] = 1; mpc[ui] = upd_pc; mtg[ui] = upd_target;
        end else if (hit && mct[ui] != 0) mct[ui] = mct[ui] - 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
