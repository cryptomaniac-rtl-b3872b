// cm_keystore: the key store shared by all processing elements.
//
// WORDS 32-bit words holding session keys, written by the host through a
// write port and read by the elements through one shared read port. Each
// element raises req with a byte address; a round-robin arbiter grants one
// requester per cycle (gnt, one-hot) and the word appears on rdata in the
// next cycle, where only the granted element takes it.
// Interface: host write (wr_en, wr_addr, wr_data); req/addr per element,
// gnt, rdata. Timing: one cycle from grant to data; reset clears the arbiter.
// The keystore and its connection to every element follow the design; its
// size, single port and arbitration are this implementation's choices.
module cm_keystore
  import cm_pkg::*;
#(
  parameter int unsigned NPROC = 4,
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned PW   = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  word_t            wr_addr,
  input  word_t            wr_data,
  input  logic [NPROC-1:0] req,
  input  word_t            addr [NPROC],
  output logic [NPROC-1:0] gnt,
  output word_t            rdata
);
  word_t         mem [WORDS];
  logic [PW-1:0] last_q, pick;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NPROC; k++) begin
      int unsigned c;
      c = (int'(last_q) + k) % NPROC;
      if (!found && req[c]) begin
        found = 1'b1;
        pick  = PW'(c);
      end
    end
    gnt = '0;
    if (found) gnt[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (found) rdata <= mem[addr[pick][AW+1:2]];
    if (wr_en) mem[wr_addr[AW+1:2]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     last_q <= PW'(NPROC - 1);
    else if (found) last_q <= pick;
  end
endmodule
