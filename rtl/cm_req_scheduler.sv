// cm_req_scheduler: hands requests from the input queue to processing elements.
//
// A request is a header word (id, session, action, number of data words; see
// cm_pkg::req_hdr_t) followed by its data words. When a header is at the head
// of the input queue, the scheduler picks, round robin starting after the
// element it served last, an element whose request queue is empty (it has
// taken in all earlier work), and then moves the header and every data word
// of the request into that element's queue, one word per cycle, waiting
// whenever the input queue is empty or the target queue is full. A whole
// request therefore always goes to one element.
// Interface: inq_* (head of the input queue and its pop), pe_push/pe_data to
// the NPROC element queues, pe_empty/pe_full from them, busy.
// Timing: one word per cycle; reset returns to waiting for a header.
// The scheduler between the input queue and the elements follows the design;
// its policy is this implementation's choice.
module cm_req_scheduler
  import cm_pkg::*;
#(
  parameter int unsigned NPROC = 4,
  localparam int unsigned PW   = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inq_valid,
  input  word_t            inq_data,
  output logic             inq_pop,
  output logic [NPROC-1:0] pe_push,
  output word_t            pe_data,
  input  logic [NPROC-1:0] pe_empty,
  input  logic [NPROC-1:0] pe_full,
  output logic             busy
);
  typedef enum logic {S_HDR, S_DATA} state_e;
  state_e        state_q;
  logic [PW-1:0] tgt_q, last_q, pick;
  logic          found;
  logic [7:0]    left_q;
  req_hdr_t      hdr;

  assign hdr     = req_hdr_t'(inq_data);
  assign pe_data = inq_data;
  assign busy    = state_q == S_DATA;

  // round-robin choice of a free element, starting after the last one served
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NPROC; k++) begin
      int unsigned c;
      c = (int'(last_q) + k) % NPROC;
      if (!found && pe_empty[c]) begin
        found = 1'b1;
        pick  = PW'(c);
      end
    end
  end

  always_comb begin
    pe_push = '0;
    inq_pop = 1'b0;
    if (state_q == S_HDR) begin
      if (inq_valid && found) begin
        pe_push[pick] = 1'b1;
        inq_pop       = 1'b1;
      end
    end else if (inq_valid && !pe_full[tgt_q]) begin
      pe_push[tgt_q] = 1'b1;
      inq_pop        = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_HDR;
      tgt_q   <= '0;
      last_q  <= PW'(NPROC - 1);
      left_q  <= '0;
    end else if (state_q == S_HDR) begin
      if (inq_valid && found) begin
        tgt_q  <= pick;
        last_q <= pick;
        left_q <= hdr.len;
        if (hdr.len != 8'd0) state_q <= S_DATA;
      end
    end else if (inq_pop) begin
      left_q <= left_q - 8'd1;
      if (left_q == 8'd1) state_q <= S_HDR;
    end
  end
endmodule
