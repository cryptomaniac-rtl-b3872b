// cryptomaniac: the CryptoManiac cryptographic co-processor system.
//
// Requests arrive in the input queue (InQ) as a header word (id, session,
// action, number of data words) followed by data words. The request
// scheduler hands each whole request to a free CryptoManiac processing
// element (a 4-wide VLIW cipher processor, cm_proc) through that element's
// request queue. Elements read session keys from the shared keystore and
// return their result words, which the output arbiter merges, one complete
// result at a time, into the output queue (OutQ).
// All elements run the same program; the host loads it (and the data memory
// image with the S-box tables) into every element at once while run is low,
// and writes keys into the keystore.
// Interface: req_* pushes request words into InQ (req_ready is low when it is
// full); res_* pops result words from OutQ with res_last on the final word of
// a result; imem_*, dmem_*, key_* are the loading ports; run starts fetch.
// Timing: one request word in and one result word out per cycle at most.
// The organisation (InQ, scheduler, several elements, keystore, OutQ) follows
// the design; the number of elements, queue depths and the request framing
// are this implementation's choices.
module cryptomaniac
  import cm_pkg::*;
#(
  parameter int unsigned NPROC       = 4,
  parameter int unsigned INQ_DEPTH   = 16,
  parameter int unsigned OUTQ_DEPTH  = 16,
  parameter int unsigned PEQ_DEPTH   = 16,
  parameter int unsigned KS_WORDS    = 1024,
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned DMEM_WORDS  = 4096,
  parameter int unsigned BTB_ENTRIES = 16,
  localparam int unsigned PC_W       = $clog2(IMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  // requests
  input  logic            req_valid,
  input  word_t           req_data,
  output logic            req_ready,
  // results
  output logic            res_valid,
  output word_t           res_data,
  output logic            res_last,
  input  logic            res_ready,
  // loading
  input  logic            imem_we,
  input  logic [PC_W-1:0] imem_waddr,
  input  bundle_t         imem_wdata,
  input  logic            dmem_we,
  input  word_t           dmem_addr,
  input  word_t           dmem_wdata,
  input  logic            key_we,
  input  word_t           key_addr,
  input  word_t           key_wdata,
  output logic            busy
);
  localparam int unsigned QW = $clog2(INQ_DEPTH);
  localparam int unsigned OW = $clog2(OUTQ_DEPTH);
  localparam int unsigned EW = $clog2(PEQ_DEPTH);

  // ---------------------------------------------------------------- InQ
  logic  inq_full, inq_empty, inq_pop;
  word_t inq_head;
  logic [QW:0] inq_count;
  assign req_ready = !inq_full;

  cm_fifo #(.DW(XLEN), .DEPTH(INQ_DEPTH)) u_inq (
    .clk, .rst_n, .push(req_valid && !inq_full), .wdata(req_data), .full(inq_full),
    .pop(inq_pop), .rdata(inq_head), .empty(inq_empty), .count(inq_count)
  );

  // ---------------------------------------------------------------- scheduler
  logic [NPROC-1:0] pe_push, pe_empty, pe_full;
  word_t            pe_wdata;
  logic             sched_busy;

  cm_req_scheduler #(.NPROC(NPROC)) u_sched (
    .clk, .rst_n, .inq_valid(!inq_empty), .inq_data(inq_head), .inq_pop,
    .pe_push, .pe_data(pe_wdata), .pe_empty, .pe_full, .busy(sched_busy)
  );

  // ---------------------------------------------------------------- keystore
  logic [NPROC-1:0] ks_req, ks_gnt;
  word_t            ks_addr [NPROC];
  word_t            ks_rdata;

  cm_keystore #(.NPROC(NPROC), .WORDS(KS_WORDS)) u_keystore (
    .clk, .rst_n, .wr_en(key_we), .wr_addr(key_addr), .wr_data(key_wdata),
    .req(ks_req), .addr(ks_addr), .gnt(ks_gnt), .rdata(ks_rdata)
  );

  // ---------------------------------------------------------------- elements
  logic [NPROC-1:0] out_valid, out_last, out_ready, pe_pop;
  word_t            out_data [NPROC];
  logic [EW:0]      pe_count [NPROC];

  for (genvar p = 0; p < NPROC; p++) begin : g_pe
    word_t pe_head;

    cm_fifo #(.DW(XLEN), .DEPTH(PEQ_DEPTH)) u_peq (
      .clk, .rst_n, .push(pe_push[p]), .wdata(pe_wdata), .full(pe_full[p]),
      .pop(pe_pop[p]), .rdata(pe_head), .empty(pe_empty[p]), .count(pe_count[p])
    );

    cm_proc #(
      .IMEM_DEPTH(IMEM_DEPTH), .DMEM_WORDS(DMEM_WORDS), .BTB_ENTRIES(BTB_ENTRIES)
    ) u_proc (
      .clk, .rst_n, .run,
      .imem_we, .imem_waddr, .imem_wdata,
      .dmem_ld_we(dmem_we), .dmem_ld_addr(dmem_addr), .dmem_ld_wdata(dmem_wdata),
      .in_valid(!pe_empty[p]), .in_data(pe_head), .in_pop(pe_pop[p]),
      .out_valid(out_valid[p]), .out_data(out_data[p]), .out_last(out_last[p]),
      .out_ready(out_ready[p]),
      .ks_req(ks_req[p]), .ks_addr(ks_addr[p]), .ks_gnt(ks_gnt[p]), .ks_rdata
    );
  end

  // ---------------------------------------------------------------- OutQ
  logic          oq_push, oq_full, oq_empty;
  logic [XLEN:0] oq_wdata, oq_head;
  logic [OW:0]   oq_count;

  cm_out_arbiter #(.NPROC(NPROC)) u_oarb (
    .clk, .rst_n, .valid(out_valid), .data(out_data), .last(out_last),
    .ready(out_ready), .q_push(oq_push), .q_wdata(oq_wdata), .q_full(oq_full)
  );

  cm_fifo #(.DW(XLEN + 1), .DEPTH(OUTQ_DEPTH)) u_outq (
    .clk, .rst_n, .push(oq_push), .wdata(oq_wdata), .full(oq_full),
    .pop(res_ready && !oq_empty), .rdata(oq_head), .empty(oq_empty), .count(oq_count)
  );

  assign res_valid = !oq_empty;
  assign res_data  = oq_head[XLEN-1:0];
  assign res_last  = oq_head[XLEN];
  assign busy      = !inq_empty || sched_busy || !(&pe_empty) || !oq_empty;
endmodule
