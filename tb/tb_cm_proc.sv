// tb_cm_proc: runs real kernels on one processing element.
//
// The program dispatches on the action field of each request header:
//   action 0: a Blowfish-style Feistel kernel, 16 rounds, with the four-bundle
//             loop body SBOX x4 / Add-Xor + Load / Add-Xor / Xor + move + branch
//             (four cycles per round once the S-box caches are warm);
//   action 1: a keystore read of the session key, MUL, MULMOD and an Add-Xor
//             that consumes both multiplier results through the bypass;
//   action 2: a store into an S-box table, SBOX before and after SBOXSYNC.
// Results are compared with a model computed here. The environment delays
// request words, back-pressures results and grants the keystore late, so
// every stall path is taken. Counted and required: S-box refills,
// mispredicts, bypasses, each stall kind, SBOXSYNC; the warm loop must take
// exactly four cycles per round.
module tb_cm_proc;
  import cm_pkg::*;
  import cm_tb_prog_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic imem_we = 0; logic [7:0] imem_waddr = 0; bundle_t imem_wdata = '0;
  logic dmem_ld_we = 0; word_t dmem_ld_addr = 0, dmem_ld_wdata = 0;
  logic in_valid, in_pop, out_valid, out_last, out_ready, ks_req, ks_gnt;
  word_t in_data, out_data, ks_addr, ks_rdata;
  always #5 clk = ~clk;

  cm_proc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bundle_t prog [256];

  // ---------------------------------------------------------------- environment
  word_t inq [$];
  word_t expq [$];
  logic  exp_last [$];
  int    in_gap = 0;
  logic  ks_pend = 0;
  word_t ks_a_q;
  int    ks_wait = 0;

  assign in_valid = inq.size() > 0 && in_gap == 0;
  assign in_data  = inq.size() > 0 ? inq[0] : '0;
  assign ks_gnt   = ks_req && ks_wait >= 2;

  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    in_gap <= ($urandom % 4 == 0) ? 1 + $urandom % 3 : (in_gap > 0 ? in_gap - 1 : 0);
    ks_wait <= (ks_req && !ks_gnt) ? ks_wait + 1 : 0;
    if (ks_gnt) ks_rdata <= keys[ks_addr[9:2]];
    out_ready <= ($urandom % 3) != 0;
    if (out_valid && out_ready) begin
      check("result word present", expq.size() > 0);
      if (expq.size() > 0) begin
        check($sformatf("result %h exp %h", out_data, expq[0]), out_data == expq[0]);
        check("last flag", out_last == exp_last[0]);
        void'(expq.pop_front()); void'(exp_last.pop_front());
      end
    end
  end

  // ---------------------------------------------------------------- requests
  task automatic push_req(int kind, int id, int sess, word_t a, word_t b);
    word_t res [$];
    case (kind)
      0: req_bf(id, a, b, inq, res);
      1: req_a1(id, sess, a, b, inq, res);
      default: req_a2(id, a[7:0], b, inq, res);
    endcase
    foreach (res[i]) begin expq.push_back(res[i]); exp_last.push_back(i == res.size() - 1); end
  endtask

  // ---------------------------------------------------------------- events
  int n_fill = 0, n_mispred = 0, n_bypass = 0, n_recv_stall = 0, n_send_stall = 0,
      n_ks_stall = 0, n_sync = 0, n_long = 0;
  int loop_last = -1, loop_gap_bad = 0, loop_gap_ok = 0, bf_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.fill_state_q == 1'b1 && dut.fill_cnt_q == 8'd0) begin n_fill++; $display("refill of table %h in slot mask %b at %0t", dut.fill_tag_q, dut.fill_slot_q, $time); end
    if (dut.mispredict) n_mispred++;
    if (dut.bypassed && dut.ex_fire) n_bypass++;
    if (dut.ex_valid_q && dut.recv_block) n_recv_stall++;
    if (dut.ex_valid_q && dut.send_block && !dut.any_miss) n_send_stall++;
    if (dut.ex_valid_q && dut.ks_block && !dut.any_miss) n_ks_stall++;
    if (dut.sbox_inval) n_sync++;
    if (dut.ex_fire && dut.ex_bundle_q[0].kind == K_LONG) n_long++;
    // cycles per round of the loop, once the caches are warm (after the
    // first Blowfish request)
    if (dut.ex_fire && int'(dut.ex_pc_q) == LOOP) begin
      if (loop_last >= 0 && bf_done >= 1 && $time - loop_last < 200) begin
        if ($time - loop_last == 40) loop_gap_ok++; else begin loop_gap_bad++; $display("loop round took %0d cycles at %0t", ($time - loop_last) / 10, $time); end
      end
      loop_last = $time;
    end
    if (dut.ex_fire && dut.ex_bundle_q[0].kind == K_SENDL && int'(dut.ex_pc_q) < 20) bf_done++;
  end

  initial begin
    out_ready = 0; ks_rdata = 0;
    init_model();
    build(prog);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    for (int a = 0; a < DMEM_INIT_WORDS; a++) begin
      @(negedge clk); imem_we = 0; dmem_ld_we = 1; dmem_ld_addr = 4 * a;
      dmem_ld_wdata = dmem_word(a);
    end
    @(negedge clk); dmem_ld_we = 0; run = 1;
    push_req(0, 1, 0, 32'h01234567, 32'h89abcdef);
    push_req(0, 2, 0, $urandom, $urandom);
    push_req(1, 3, 5, $urandom, $urandom);
    push_req(1, 4, 7, $urandom, 32'h0000_0000);
    push_req(2, 5, 0, 32'h3c, 32'hdeadbeef);
    push_req(0, 6, 0, $urandom, $urandom);
    push_req(1, 7, 9, $urandom, $urandom);
    push_req(0, 8, 0, $urandom, $urandom);
    wait (expq.size() == 0);
    repeat (20) @(negedge clk);
    check("all requests consumed", inq.size() == 0);
    $display("events: fill=%0d mispredict=%0d bypass=%0d recv_stall=%0d send_stall=%0d ks_stall=%0d sync=%0d long=%0d loop4=%0d loop_other=%0d",
             n_fill, n_mispred, n_bypass, n_recv_stall, n_send_stall, n_ks_stall, n_sync, n_long, loop_gap_ok, loop_gap_bad);
    check("S-box refills: 4 tables, 1 after SBOXSYNC, 3 invalidated by it", n_fill == 8);
    check("mispredicts", n_mispred > 0);
    check("bypasses", n_bypass > 0);
    check("recv stalls", n_recv_stall > 0);
    check("send stalls", n_send_stall > 0);
    check("keystore stalls", n_ks_stall > 0);
    check("SBOXSYNC", n_sync == 1);
    check("long ops", n_long == 3);
    check("warm loop takes 4 cycles per round", loop_gap_ok >= 40 && loop_gap_bad == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
