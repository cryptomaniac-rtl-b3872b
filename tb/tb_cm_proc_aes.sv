// tb_cm_proc_aes: runs AES-128 (Rijndael with a 128-bit key and block)
// encryption on one processing element.
//
// The kernel is the table-driven ("T-table") form: four tables Te0..Te3 of
// 256 words at the 1 KB-aligned addresses 0x000, 0x400, 0x800, 0xC00, one per
// S-box cache (slot k always looks up Te_k), and the 44 round-key words at
// 0x1000. Each of the nine full rounds is nine bundles: four bundles of four
// SBOX lookups (one output column each), then Xor-Xor pairs that fold the
// lookups and the round key, with the four round-key loads and pointer
// updates in the free slots. The last round masks bytes out of the same
// tables with Sbox-And pairs.
// The tables, the key schedule, the reference model and the program come
// from cm_tb_aes_pkg, computed from the field arithmetic of the cipher. Results are checked against the known-answer
// vector of the AES standard (key 000102..0f, plaintext 00112233..ff) and
// against a byte-wise reference implementation (SubBytes, ShiftRows,
// MixColumns, AddRoundKey) for random blocks. Cycles per block are reported.
// The instructions (SBOX, MULMOD, the combined pairs) and the one-element
// setup are the design's; the cipher kernel and its bundle schedule are this
// testbench's own, written for this RTL.
module tb_cm_proc_aes;
  import cm_pkg::*;
  import cm_tb_aes_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic imem_we = 0; logic [7:0] imem_waddr = 0; bundle_t imem_wdata = '0;
  logic dmem_ld_we = 0; word_t dmem_ld_addr = 0, dmem_ld_wdata = 0;
  logic in_valid, in_pop, out_valid, out_last, out_ready, ks_req;
  logic ks_gnt = 0; word_t ks_rdata = 0;
  word_t in_data, out_data, ks_addr;
  always #5 clk = ~clk;
  cm_proc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- environment
  word_t inq [$], got [$];
  logic [127:0] expq [$];
  int nblk = 0, t_first = -1, t_last;
  assign in_valid = inq.size() > 0;
  assign in_data  = inq.size() > 0 ? inq[0] : '0;
  assign out_ready = 1'b1;
  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    if (out_valid) begin
      got.push_back(out_data);
      if (out_last) begin
        logic [127:0] c;
        c = {got[0], got[1], got[2], got[3]};
        check($sformatf("block %0d: %h exp %h", nblk, c, expq[0]), got.size() == 4 && c == expq[0]);
        void'(expq.pop_front()); got.delete();
        nblk++;
        if (nblk == 2) t_first = $time;
        t_last = $time;
      end
    end
  end

  task automatic push_block(logic [127:0] pt, logic [127:0] exp);
    for (int i = 0; i < 4; i++) inq.push_back(pt[127 - 32*i -: 32]);
    expq.push_back(exp);
  endtask

  localparam int NBLK = 12;
  initial begin
    make_tables();
    expand(128'h000102030405060708090a0b0c0d0e0f);
    check("reference model meets the standard's vector",
          ref_encrypt(128'h00112233445566778899aabbccddeeff) == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    build();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    for (int a = 0; a < 1024 + 44; a++) begin
      @(negedge clk); imem_we = 0; dmem_ld_we = 1; dmem_ld_addr = 4 * a;
      dmem_ld_wdata = a < 1024 ? te[a / 256][a % 256] : rk[a - 1024];
    end
    @(negedge clk); dmem_ld_we = 0;
    push_block(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int b = 1; b < NBLK; b++) begin
      logic [127:0] pt;
      pt = {$urandom, $urandom, $urandom, $urandom};
      push_block(pt, ref_encrypt(pt));
    end
    run = 1;
    wait (nblk == NBLK);
    $display("AES-128: %0d blocks; warm blocks took %0d cycles each", nblk, (t_last - t_first) / 10 / (NBLK - 2));
    check("all blocks", expq.size() == 0);
    // a warm block: 7 + 9*9 + 2 + 4*3 + 4 = 106 bundles, plus the final branch
    // and its mispredict
    check("cycles per warm block", (t_last - t_first) / 10 / (NBLK - 2) <= 112);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
