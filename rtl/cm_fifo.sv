// cm_fifo: synchronous first-in first-out queue.
//
// Used for the system's input queue (InQ), output queue (OutQ) and the
// request queue in front of each processing element. DEPTH entries of DW
// bits in a circular buffer with read and write pointers and an occupancy
// count. A push when full and a pop when empty are ignored (and flagged by
// assertions). Push and pop may happen in the same cycle.
// Interface: push/wdata/full, pop/rdata/empty, count.
// Timing: rdata shows the head entry combinationally; updates at the rising
// edge; reset empties the queue.
// The queues follow the design; their depth and this organisation are this
// implementation's choices.
module cm_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          pop,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] rp_q, wp_q;
  logic [AW:0]   cnt_q;
  logic          do_push, do_pop;

  assign full    = cnt_q == (AW+1)'(DEPTH);
  assign empty   = cnt_q == '0;
  assign count   = cnt_q;
  assign rdata   = mem[rp_q];
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) if (do_push) mem[wp_q] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_q  <= '0;
      wp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wp_q <= (wp_q == AW'(DEPTH - 1)) ? '0 : wp_q + AW'(1);
      if (do_pop)  rp_q <= (rp_q == AW'(DEPTH - 1)) ? '0 : rp_q + AW'(1);
      cnt_q <= cnt_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(push && full))  else $error("cm_fifo: push when full");
      assert (!(pop && empty))  else $error("cm_fifo: pop when empty");
    end
  end
endmodule
