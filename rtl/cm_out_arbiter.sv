// cm_out_arbiter: merges the result streams of the elements into the output
// queue.
//
// Each element offers result words (valid, data, last). The arbiter picks a
// requester round robin and then stays with it until the word marked last has
// gone into the output queue, so the words of one result are never mixed with
// another element's. A word moves when its element is the owner (or is
// picked) and the output queue is not full.
// Interface: per-element valid/data/last and ready; the output queue's
// push/wdata ({last, data}) and full. Timing: one word per cycle; reset
// releases ownership.
// Merging into the single output queue follows the design; the policy is this
// implementation's choice.
module cm_out_arbiter
  import cm_pkg::*;
#(
  parameter int unsigned NPROC = 4,
  localparam int unsigned PW   = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPROC-1:0] valid,
  input  word_t            data [NPROC],
  input  logic [NPROC-1:0] last,
  output logic [NPROC-1:0] ready,
  output logic             q_push,
  output logic [XLEN:0]    q_wdata,
  input  logic             q_full
);
  logic          locked_q, found;
  logic [PW-1:0] owner_q, last_q, pick, sel;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NPROC; k++) begin
      int unsigned c;
      c = (int'(last_q) + k) % NPROC;
      if (!found && valid[c]) begin
        found = 1'b1;
        pick  = PW'(c);
      end
    end
    sel     = locked_q ? owner_q : pick;
    ready   = '0;
    q_push  = 1'b0;
    q_wdata = {last[sel], data[sel]};
    if ((locked_q || found) && valid[sel] && !q_full) begin
      ready[sel] = 1'b1;
      q_push     = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      last_q   <= PW'(NPROC - 1);
    end else if (q_push) begin
      owner_q  <= sel;
      last_q   <= sel;
      locked_q <= !last[sel];
    end
  end
endmodule
