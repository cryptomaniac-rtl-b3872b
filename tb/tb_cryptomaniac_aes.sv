// tb_cryptomaniac_aes: AES-128 encryption on the whole co-processor at its
// default size (four processing elements), to show that the request
// scheduler spreads independent blocks over the elements and the output
// arbiter merges their results, so the rate grows with the element count.
//
// Every element runs the AES program of cm_tb_aes_pkg in its system form: a
// request is a header {id, session 0, action 0, length 4} and four block
// words; the result is the header followed by the four ciphertext words.
// The host loads the program, the T-tables and the round keys into all
// elements, streams 64 requests at full rate and takes results at full rate.
// Results are matched by id (elements may finish out of order) and checked
// against the reference model; the first request is the standard's example.
// Once the elements are warm (their S-box caches filled), the time between
// results is measured: one element needs about 113 cycles per block in this
// form, so four should deliver a block every 30 cycles or less.
// The system structure is the design's; the request format, the kernel and
// the throughput bound are this testbench's own.
module tb_cryptomaniac_aes;
  import cm_pkg::*;
  import cm_tb_aes_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic req_valid = 0, req_ready, res_valid, res_last, res_ready = 1, busy;
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

  localparam int NREQ = 64, NWARM = 24;
  word_t stream [$], got [$];
  logic [127:0] expect_ct [NREQ];
  bit seen [NREQ];
  int nres = 0;
  longint cyc = 0, t_res [$];
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (req_valid && req_ready) void'(stream.pop_front());
  end
  always_comb begin
    req_valid = run && stream.size() > 0;
    req_data  = stream.size() > 0 ? stream[0] : '0;
  end
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    got.push_back(res_data);
    if (res_last) begin
      req_hdr_t h;
      int id;
      h = req_hdr_t'(got[0]);
      id = int'(h.id);
      check($sformatf("result for id %0d (%p)", id, got), got.size() == 5 && id < NREQ && !seen[id] &&
            {got[1], got[2], got[3], got[4]} == expect_ct[id]);
      if (id < NREQ) seen[id] = 1;
      got.delete();
      t_res.push_back(cyc);
      nres++;
    end
  end

  initial begin
    make_tables();
    expand(128'h000102030405060708090a0b0c0d0e0f);
    build(1);
    for (int r = 0; r < NREQ; r++) begin
      logic [127:0] pt;
      pt = r == 0 ? 128'h00112233445566778899aabbccddeeff : {$urandom, $urandom, $urandom, $urandom};
      expect_ct[r] = ref_encrypt(pt);
      stream.push_back({8'(r), 8'd0, 8'd0, 8'd4});
      for (int i = 0; i < 4; i++) stream.push_back(pt[127 - 32*i -: 32]);
    end
    check("standard's example", expect_ct[0] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    @(negedge clk); imem_we = 0;
    for (int a = 0; a < 1024 + 44; a++) begin
      @(negedge clk); dmem_we = 1; dmem_addr = 4 * a; dmem_wdata = a < 1024 ? te[a / 256][a % 256] : rk[a - 1024];
    end
    @(negedge clk); dmem_we = 0;
    run = 1;
    wait (nres == NREQ);
    begin
      longint per;
      per = (t_res[NREQ-1] - t_res[NWARM-1]) / (NREQ - NWARM);
      $display("AES-128 on the co-processor: %0d blocks, %0d cycles per block once warm", NREQ, per);
      check("four elements share the load", per <= 30);
    end
    foreach (seen[i]) check($sformatf("id %0d returned", i), seen[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
