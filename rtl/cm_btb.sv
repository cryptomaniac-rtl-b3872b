// cm_btb: branch target buffer, the simple branch predictor of the fetch stage.
//
// Direct-mapped, ENTRIES entries indexed by the low bits of the bundle
// address, each with a tag (the remaining address bits), a target and a 2-bit
// saturating counter. Fetch predicts taken when the entry hits and the
// counter's upper bit is set. When a branch resolves in the execute stage the
// entry is written: a taken branch installs its target and counts up, a
// not-taken branch counts down if it hits.
// Interface: lookup (pc -> pred_taken, pred_target); update (upd_valid,
// upd_pc, upd_taken, upd_target). Timing: lookup combinational, update at the
// rising edge; reset clears all entries.
// The design states a BTB and a simple predictor; the organisation, size and
// counters are this implementation's choices.
module cm_btb #(
  parameter int unsigned PC_W    = 8,
  parameter int unsigned ENTRIES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] pc,
  output logic            pred_taken,
  output logic [PC_W-1:0] pred_target,
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc,
  input  logic            upd_taken,
  input  logic [PC_W-1:0] upd_target
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic            valid_q  [ENTRIES];
  logic [PC_W-1:0] pcs_q    [ENTRIES];
  logic [PC_W-1:0] target_q [ENTRIES];
  logic [1:0]      ctr_q    [ENTRIES];

  logic [IW-1:0] li, ui;
  logic          uhit;
  always_comb begin
    li          = pc[IW-1:0];
    ui          = upd_pc[IW-1:0];
    pred_taken  = valid_q[li] && pcs_q[li] == pc && ctr_q[li][1];
    pred_target = target_q[li];
    uhit        = valid_q[ui] && pcs_q[ui] == upd_pc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i]  <= 1'b0;
        pcs_q[i]    <= '0;
        target_q[i] <= '0;
        ctr_q[i]    <= 2'd0;
      end
    end else if (upd_valid) begin
      if (upd_taken) begin
        valid_q[ui]  <= 1'b1;
        pcs_q[ui]    <= upd_pc;
        target_q[ui] <= upd_target;
        ctr_q[ui]    <= !uhit ? 2'd2 : (ctr_q[ui] == 2'd3 ? 2'd3 : ctr_q[ui] + 2'd1);
      end else if (uhit && ctr_q[ui] != 2'd0) begin
        ctr_q[ui] <= ctr_q[ui] - 2'd1;
      end
    end
  end
endmodule
