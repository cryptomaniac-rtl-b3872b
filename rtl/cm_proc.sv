// cm_proc: one CryptoManiac processing element, a 4-wide 32-bit VLIW machine.
//
// Four pipeline stages. IF reads a bundle from instruction memory at pc and
// asks the branch target buffer for the next pc. ID/RF reads the twelve
// source operands of the bundle from the register file (write-through from
// write-back). EX/MEM resolves operands through the bypass from write-back,
// runs the four combining functional units, accesses data memory (or the
// keystore) with at most one load or store, resolves at most one branch and
// talks to the input and output queues. WB writes up to four registers;
// results of the long unit and of loads are completed in this stage.
//
// Because every long operation and load completes in WB and WB is bypassed
// into EX, any instruction sees the results of the bundle before it. Stalls
// hold the bundle in EX (and everything behind it) and send bubbles to WB:
// an S-box cache miss (the refill engine then copies the 1 KB table from data
// memory, one word per cycle), a RECV on an empty input queue, a SEND the
// output queue does not accept, and a keystore load waiting for its grant.
// While a bundle is held, its operand registers keep absorbing the bypass so
// that the forwarded values are not lost. A mispredicted branch (or a bundle
// falsely predicted taken) flushes IF/ID and ID/EX and redirects fetch.
//
// Interface: run enables fetch; imem_*/dmem_ld_* load program and data while
// stopped; in_* pops words of requests; out_* pushes result words, out_last
// marking the last one; ks_* reads the shared keystore (address bit 31 of a
// load selects it; rdata arrives in the cycle after ks_gnt).
// Rules the program must keep (checked by assertions): at most one memory
// operation, one branch, one RECV and one SEND per bundle, and no SEND in a
// bundle with a keystore load.
//
// The stage names and order, the 4-wide bundle, the bypass, the BTB, the data
// memory with its keystore interface and the queue interface follow the
// design. Stall handling, the refill engine, memory sizes and the
// memory/branch/queue instructions are this implementation's choices.
module cm_proc
  import cm_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned DMEM_WORDS  = 4096,
  parameter int unsigned BTB_ENTRIES = 16,
  localparam int unsigned PC_W       = $clog2(IMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  // program / data loading
  input  logic            imem_we,
  input  logic [PC_W-1:0] imem_waddr,
  input  bundle_t         imem_wdata,
  input  logic            dmem_ld_we,
  input  word_t           dmem_ld_addr,
  input  word_t           dmem_ld_wdata,
  // input queue (requests)
  input  logic            in_valid,
  input  word_t           in_data,
  output logic            in_pop,
  // output queue (results)
  output logic            out_valid,
  output word_t           out_data,
  output logic            out_last,
  input  logic            out_ready,
  // keystore
  output logic            ks_req,
  output word_t           ks_addr,
  input  logic            ks_gnt,
  input  word_t           ks_rdata
);
  typedef enum logic {F_IDLE, F_FILL} fill_state_e;

  // ------------------------------------------------------------------ IF
  logic [PC_W-1:0] pc_q, pred_target, fetch_next;
  logic            pred_taken;
  bundle_t         fetch_bundle;

  // IF/ID
  logic            id_valid_q;
  bundle_t         id_bundle_q;
  logic [PC_W-1:0] id_pc_q, id_pred_target_q;
  logic            id_pred_taken_q;

  // ID/EX
  logic            ex_valid_q;
  bundle_t         ex_bundle_q;
  logic [PC_W-1:0] ex_pc_q, ex_pred_target_q;
  logic            ex_pred_taken_q;
  word_t           ex_opnd_q [WIDTH][3];

  // EX/WB
  logic            wb_valid_q;
  inst_t           wb_inst_q [WIDTH];
  word_t           wb_res_q  [WIDTH];
  logic            wb_ks_q;
  word_t           wb_data   [WIDTH];
  logic            wb_we     [WIDTH];

  // control
  logic            stall, ex_fire, mispredict;
  logic [PC_W-1:0] redirect_pc;

  cm_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .pc(pc_q), .bundle(fetch_bundle),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  logic            br_taken, br_found;
  logic [PC_W-1:0] br_target;

  cm_btb #(.PC_W(PC_W), .ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n, .pc(pc_q), .pred_taken, .pred_target,
    .upd_valid(ex_fire && br_found), .upd_pc(ex_pc_q),
    .upd_taken(br_taken), .upd_target(br_target)
  );

  assign fetch_next = pred_taken ? pred_target : pc_q + PC_W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q             <= '0;
      id_valid_q       <= 1'b0;
      id_bundle_q      <= '0;
      id_pc_q          <= '0;
      id_pred_taken_q  <= 1'b0;
      id_pred_target_q <= '0;
    end else if (mispredict) begin
      pc_q       <= redirect_pc;
      id_valid_q <= 1'b0;
    end else if (!stall) begin
      id_valid_q <= run;
      if (run) begin
        pc_q             <= fetch_next;
        id_bundle_q      <= fetch_bundle;
        id_pc_q          <= pc_q;
        id_pred_taken_q  <= pred_taken;
        id_pred_target_q <= pred_target;
      end
    end
  end

  // ------------------------------------------------------------------ ID/RF
  ridx_t raddr [3*WIDTH];
  word_t rdata [3*WIDTH];
  logic  rf_we    [WIDTH];
  ridx_t rf_waddr [WIDTH];

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      raddr[3*i]   = id_bundle_q[i].rs1;
      raddr[3*i+1] = id_bundle_q[i].rs2;
      raddr[3*i+2] = id_bundle_q[i].rs3;
      rf_we[i]     = wb_we[i];
      rf_waddr[i]  = wb_inst_q[i].rd;
    end
  end

  cm_regfile u_rf (
    .clk, .rst_n, .raddr, .rdata,
    .we(rf_we), .waddr(rf_waddr), .wdata(wb_data)
  );

  // ------------------------------------------------------------------ EX
  // operand bypass from write-back
  word_t opnd [WIDTH][3];
  logic  bypassed;
  always_comb begin
    bypassed = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      for (int k = 0; k < 3; k++) begin
        ridx_t rs;
        rs = (k == 0) ? ex_bundle_q[i].rs1 : (k == 1) ? ex_bundle_q[i].rs2
                                                      : ex_bundle_q[i].rs3;
        opnd[i][k] = ex_opnd_q[i][k];
        for (int j = 0; j < WIDTH; j++) begin
          if (wb_we[j] && wb_inst_q[j].rd == rs) begin
            opnd[i][k] = wb_data[j];
            if (ex_valid_q) bypassed = 1'b1;
          end
        end
      end
    end
  end

  // functional units
  word_t       y_chain [WIDTH];
  word_t       y_long  [WIDTH];
  logic        sbox_miss [WIDTH];
  logic [21:0] miss_tag  [WIDTH];
  logic        fill_we   [WIDTH];
  logic        fill_done [WIDTH];
  logic        sbox_inval;
  logic [7:0]  fill_waddr_q;
  word_t       dmem_rdata;
  logic [21:0] fill_tag_q;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fu
    cm_fu u_fu (
      .clk, .rst_n, .en(!stall), .valid(ex_valid_q), .inst(ex_bundle_q[i]),
      .r1(opnd[i][0]), .r2(opnd[i][1]), .r3(opnd[i][2]),
      .y_chain(y_chain[i]), .y_long(y_long[i]),
      .sbox_miss(sbox_miss[i]), .sbox_miss_tag(miss_tag[i]),
      .fill_we(fill_we[i]), .fill_addr(fill_waddr_q), .fill_data(dmem_rdata),
      .fill_done(fill_done[i]), .fill_tag(fill_tag_q),
      .sbox_invalidate(sbox_inval)
    );
  end

  // slot decode
  logic  has_mem, has_recv, has_send, has_sync, mem_is_store, mem_is_ks, send_last;
  word_t mem_addr, mem_wdata, send_data;
  int    n_mem, n_br, n_recv, n_send;
  always_comb begin
    has_mem = 1'b0; has_recv = 1'b0; has_send = 1'b0; has_sync = 1'b0;
    mem_is_store = 1'b0; send_last = 1'b0;
    mem_addr = '0; mem_wdata = '0; send_data = '0;
    br_found = 1'b0; br_taken = 1'b0; br_target = '0;
    n_mem = 0; n_br = 0; n_recv = 0; n_send = 0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      unique case (ex_bundle_q[i].kind)
        K_LOAD, K_STORE: begin
          has_mem      = 1'b1;
          n_mem++;
          mem_is_store = ex_bundle_q[i].kind == K_STORE;
          mem_addr     = opnd[i][0];
          mem_wdata    = opnd[i][1];
        end
        K_BEQ, K_BNE: begin
          br_found  = 1'b1;
          n_br++;
          br_taken  = (opnd[i][0] == opnd[i][1]) == (ex_bundle_q[i].kind == K_BEQ);
          br_target = ex_bundle_q[i].imm[PC_W-1:0];
        end
        K_RECV: begin
          has_recv = 1'b1;
          n_recv++;
        end
        K_SEND, K_SENDL: begin
          has_send  = 1'b1;
          n_send++;
          send_last = ex_bundle_q[i].kind == K_SENDL;
          send_data = opnd[i][0];
        end
        K_SBOXSYNC: has_sync = 1'b1;
        default: ;
      endcase
    end
    if (!ex_valid_q) begin
      has_mem = 1'b0; has_recv = 1'b0; has_send = 1'b0; has_sync = 1'b0;
      br_found = 1'b0;
    end
    mem_is_ks = has_mem && !mem_is_store && mem_addr[31];
  end

  // stalls
  fill_state_e fill_state_q;
  logic        any_miss, recv_block, ks_block, send_block;
  always_comb begin
    any_miss = 1'b0;
    for (int i = 0; i < WIDTH; i++) any_miss |= sbox_miss[i];
    any_miss   = any_miss || fill_state_q == F_FILL;
    recv_block = has_recv && !in_valid;
    ks_req     = mem_is_ks && !any_miss && !recv_block;
    ks_addr    = mem_addr;
    ks_block   = mem_is_ks && !ks_gnt;
    out_valid  = has_send && !any_miss && !recv_block && !ks_block;
    out_data   = send_data;
    out_last   = send_last;
    send_block = has_send && !out_ready;
    stall      = ex_valid_q && (any_miss || recv_block || ks_block || send_block);
    ex_fire    = ex_valid_q && !stall;
    in_pop     = ex_fire && has_recv;
    sbox_inval = ex_fire && has_sync;
  end

  // branch resolution
  always_comb begin
    logic            taken;
    logic [PC_W-1:0] target;
    taken       = br_found && br_taken;
    target      = br_target;
    redirect_pc = taken ? target : ex_pc_q + PC_W'(1);
    mispredict  = ex_fire && ((taken != ex_pred_taken_q) ||
                              (taken && ex_pred_target_q != target));
  end

  // S-box refill engine: copies the missing 1 KB table into one slot's cache
  logic [7:0]       fill_cnt_q;
  logic             fill_rd_q;
  logic [WIDTH-1:0] fill_slot_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_state_q <= F_IDLE;
      fill_cnt_q   <= '0;
      fill_rd_q    <= 1'b0;
      fill_waddr_q <= '0;
      fill_slot_q  <= '0;
      fill_tag_q   <= '0;
    end else begin
      fill_rd_q    <= fill_state_q == F_FILL;
      fill_waddr_q <= fill_cnt_q;
      if (fill_state_q == F_IDLE) begin
        if (ex_valid_q && !fill_rd_q) begin
          for (int i = WIDTH - 1; i >= 0; i--) begin
            if (sbox_miss[i]) begin
              fill_state_q <= F_FILL;
              fill_slot_q  <= WIDTH'(1) << i;
              fill_tag_q   <= miss_tag[i];
              fill_cnt_q   <= '0;
            end
          end
        end
      end else begin
        fill_cnt_q <= fill_cnt_q + 8'd1;
        if (fill_cnt_q == 8'(SBOX_ENTRIES - 1)) fill_state_q <= F_IDLE;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      fill_we[i]   = fill_rd_q && fill_slot_q[i];
      fill_done[i] = fill_we[i] && fill_waddr_q == 8'(SBOX_ENTRIES - 1);
    end
  end

  // data memory: the refill engine owns the port while it runs
  logic  dm_en, dm_we;
  word_t dm_addr;
  always_comb begin
    if (fill_state_q == F_FILL) begin
      dm_en   = 1'b1;
      dm_we   = 1'b0;
      dm_addr = {fill_tag_q, fill_cnt_q, 2'b00};
    end else begin
      dm_en   = ex_fire && has_mem && !mem_is_ks;
      dm_we   = mem_is_store;
      dm_addr = mem_addr;
    end
  end

  cm_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .wdata(mem_wdata),
    .rdata(dmem_rdata),
    .ld_we(dmem_ld_we), .ld_addr(dmem_ld_addr), .ld_wdata(dmem_ld_wdata)
  );

  // ID -> EX and EX -> WB registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid_q       <= 1'b0;
      ex_bundle_q      <= '0;
      ex_pc_q          <= '0;
      ex_pred_taken_q  <= 1'b0;
      ex_pred_target_q <= '0;
      for (int i = 0; i < WIDTH; i++)
        for (int k = 0; k < 3; k++) ex_opnd_q[i][k] <= '0;
      wb_valid_q <= 1'b0;
      wb_ks_q    <= 1'b0;
      for (int i = 0; i < WIDTH; i++) begin
        wb_inst_q[i] <= '0;
        wb_res_q[i]  <= '0;
      end
    end else begin
      if (stall) begin
        // hold the bundle, but keep what the bypass delivers
        for (int i = 0; i < WIDTH; i++)
          for (int k = 0; k < 3; k++) ex_opnd_q[i][k] <= opnd[i][k];
      end else begin
        ex_valid_q       <= id_valid_q && !mispredict;
        ex_bundle_q      <= id_bundle_q;
        ex_pc_q          <= id_pc_q;
        ex_pred_taken_q  <= id_pred_taken_q;
        ex_pred_target_q <= id_pred_target_q;
        for (int i = 0; i < WIDTH; i++)
          for (int k = 0; k < 3; k++) ex_opnd_q[i][k] <= rdata[3*i+k];
      end
      wb_valid_q <= ex_fire;
      wb_ks_q    <= mem_is_ks;
      for (int i = 0; i < WIDTH; i++) begin
        wb_inst_q[i] <= ex_bundle_q[i];
        unique case (ex_bundle_q[i].kind)
          K_LDI:   wb_res_q[i] <= word_t'(ex_bundle_q[i].imm);
          K_RECV:  wb_res_q[i] <= in_data;
          default: wb_res_q[i] <= y_chain[i];
        endcase
      end
    end
  end

  // ------------------------------------------------------------------ WB
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      wb_we[i] = wb_valid_q && writes_rd(wb_inst_q[i]);
      unique case (wb_inst_q[i].kind)
        K_LONG:  wb_data[i] = y_long[i];
        K_LOAD:  wb_data[i] = wb_ks_q ? ks_rdata : dmem_rdata;
        default: wb_data[i] = wb_res_q[i];
      endcase
    end
  end

  // ------------------------------------------------------------------ rules
  always_ff @(posedge clk) begin
    if (rst_n && ex_valid_q) begin
      assert (n_mem <= 1)  else $error("cm_proc: two memory operations in a bundle");
      assert (n_br <= 1)   else $error("cm_proc: two branches in a bundle");
      assert (n_recv <= 1) else $error("cm_proc: two RECVs in a bundle");
      assert (n_send <= 1) else $error("cm_proc: two SENDs in a bundle");
      assert (!(mem_is_ks && has_send))
        else $error("cm_proc: SEND together with a keystore load");
    end
  end

endmodule
