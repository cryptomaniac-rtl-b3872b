// tb_cryptomaniac: end-to-end test of the co-processor at its default size
// (four processing elements).
//
// Loads the test program of cm_tb_prog_pkg into every element, the S-box
// tables and P array into every data memory and session keys into the
// keystore, then streams 120 requests of all three kinds (Blowfish-style
// cipher, keystore + MUL/MULMOD, S-box store + SBOXSYNC) through the input
// queue while the result side stalls at random. Results may complete in any
// order across elements; each is matched by its request id against the
// model. Counted and required at least once: input queue full, output queue
// full, keystore contention, output arbiter holding a result, every element
// used, S-box refills, SBOXSYNC, branch mispredicts, bypasses, long ops and
// stalls on an empty request queue.
module tb_cryptomaniac;
  import cm_pkg::*;
  import cm_tb_prog_pkg::*;
  localparam int NPROC = 4, NREQ = 120;

  logic clk = 0, rst_n = 0, run = 0;
  logic req_valid = 0, req_ready, res_valid, res_last, res_ready = 0, busy;
  word_t req_data = 0, res_data;
  logic imem_we = 0; logic [7:0] imem_waddr = 0; bundle_t imem_wdata = '0;
  logic dmem_we = 0, key_we = 0; word_t dmem_addr = 0, dmem_wdata = 0, key_addr = 0, key_wdata = 0;
  always #5 clk = ~clk;

  cryptomaniac dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bundle_t prog [256];
  word_t   stream [$];
  word_t   expect_res [int][$];
  word_t   got [$];
  int      nres = 0;

  // ---------------------------------------------------------------- events
  int n_inq_full = 0, n_outq_full = 0, n_ks_contend = 0, n_arb_hold = 0;
  int n_fill = 0, n_sync = 0, n_mispred = 0, n_bypass = 0, n_long = 0, n_recv_stall = 0;
  int used [NPROC];
  always @(posedge clk) if (rst_n) begin
    if (req_valid && !req_ready) n_inq_full++;
    if (dut.oq_full && dut.out_valid != 0) n_outq_full++;
    if ($countones(dut.ks_req) > 1) n_ks_contend++;
    if (dut.u_oarb.locked_q && (dut.out_valid & ~(NPROC'(1) << dut.u_oarb.owner_q)) != 0) n_arb_hold++;
  end
  for (genvar p = 0; p < NPROC; p++) begin : g_ev
    always @(posedge clk) if (rst_n) begin
      if (dut.g_pe[p].u_proc.fill_state_q == 1'b1 && dut.g_pe[p].u_proc.fill_cnt_q == 8'd0) n_fill++;
      if (dut.g_pe[p].u_proc.sbox_inval) n_sync++;
      if (dut.g_pe[p].u_proc.mispredict) n_mispred++;
      if (dut.g_pe[p].u_proc.bypassed && dut.g_pe[p].u_proc.ex_fire) n_bypass++;
      if (dut.g_pe[p].u_proc.ex_fire && dut.g_pe[p].u_proc.ex_bundle_q[0].kind == K_LONG) n_long++;
      if (dut.g_pe[p].u_proc.ex_valid_q && dut.g_pe[p].u_proc.recv_block) n_recv_stall++;
      if (dut.g_pe[p].u_proc.in_pop && dut.g_pe[p].u_proc.ex_bundle_q[0].rd == 5'd20) used[p]++;
    end
  end

  // ---------------------------------------------------------------- drivers
  // requests are offered in bursts; a word leaves the stream when InQ takes it
  logic feed = 0;
  always @(posedge clk) if (feed) begin
    if (req_valid && req_ready) void'(stream.pop_front());
    req_valid <= stream.size() > 0 && ($urandom % 8) != 0;
    req_data  <= stream.size() > 0 ? stream[0] : '0;
    // the result side stops for a long stretch once, so that OutQ fills
    res_ready <= ($urandom % 4) == 0 && (nres < 10 || nres > 30 || ($urandom % 64) == 0);
  end

  always @(posedge clk) if (res_valid && res_ready) begin
    got.push_back(res_data);
    if (res_last) begin
      int id;
      id = int'(got[0][31:24]);
      check($sformatf("result id %0d expected", id), expect_res.exists(id));
      if (expect_res.exists(id)) begin
        check($sformatf("result %0d length", id), got.size() == expect_res[id].size());
        foreach (got[i])
          if (i < expect_res[id].size())
            check($sformatf("result %0d word %0d: %h exp %h", id, i, got[i], expect_res[id][i]),
                  got[i] == expect_res[id][i]);
        expect_res.delete(id);
      end
      got.delete();
      nres++;
    end
  end

  initial begin
    word_t res [$];
    for (int p = 0; p < NPROC; p++) used[p] = 0;
    init_model();
    build(prog);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    @(negedge clk); imem_we = 0;
    for (int a = 0; a < DMEM_INIT_WORDS; a++) begin
      @(negedge clk); dmem_we = 1; dmem_addr = 4 * a; dmem_wdata = dmem_word(a);
    end
    @(negedge clk); dmem_we = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); key_we = 1; key_addr = 4 * a; key_wdata = keys[a];
    end
    @(negedge clk); key_we = 0;
    for (int r = 1; r <= NREQ; r++) begin
      int kind;
      // the first requests (handed out before the elements start, so that
      // they run in lockstep) and the last ones are keystore requests, so
      // that the elements compete for the keystore
      kind = (r <= NPROC || r > NREQ - 24) ? 1 : (r % 5 == 0) ? 2 : (r % 3 == 0) ? 1 : 0;
      case (kind)
        0: req_bf(r, $urandom, $urandom, stream, res);
        1: req_a1(r, $urandom % 64, $urandom, (r % 7 == 0) ? 32'd0 : $urandom, stream, res);
        default: begin
          // write back the word already there, so that every element keeps
          // the same tables
          logic [7:0] idx; idx = 8'($urandom);
          req_a2(r, idx, sbox[0][idx], stream, res);
        end
      endcase
      expect_res[r] = res;
    end
    @(negedge clk); feed = 1;
    repeat (60) @(negedge clk); run = 1;
    wait (nres == NREQ);
    repeat (20) @(negedge clk);
    check("no result missing", expect_res.size() == 0);
    check("no stray result words", got.size() == 0 && !res_valid);
    $display("events: inq_full=%0d outq_full=%0d ks_contend=%0d arb_hold=%0d fill=%0d sync=%0d mispredict=%0d bypass=%0d long=%0d recv_stall=%0d used=%0d/%0d/%0d/%0d",
             n_inq_full, n_outq_full, n_ks_contend, n_arb_hold, n_fill, n_sync, n_mispred, n_bypass,
             n_long, n_recv_stall, used[0], used[1], used[2], used[3]);
    check("input queue full", n_inq_full > 0);
    check("output queue full", n_outq_full > 0);
    check("keystore contention", n_ks_contend > 0);
    check("output arbiter held a result", n_arb_hold > 0);
    for (int p = 0; p < NPROC; p++) check($sformatf("element %0d used", p), used[p] > 0);
    check("S-box refills", n_fill > 0);
    check("SBOXSYNC", n_sync > 0);
    check("mispredicts", n_mispred > 0);
    check("bypasses", n_bypass > 0);
    check("long ops", n_long > 0);
    check("stalls on empty request queue", n_recv_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
