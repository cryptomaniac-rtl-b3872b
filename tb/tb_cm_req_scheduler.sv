// tb_cm_req_scheduler: feeds a stream of requests of random length to the
// scheduler, models four element queues drained at random rates, and checks
// that every request arrives whole, in order, at one element whose queue was
// empty when its header was handed over, and that elements are used in turn.
module tb_cm_req_scheduler;
  import cm_pkg::*;
  localparam int NPROC = 4;
  logic clk = 0, rst_n = 0, inq_valid, inq_pop, busy;
  word_t inq_data, pe_data;
  logic [NPROC-1:0] pe_push, pe_empty, pe_full;
  word_t src [$];
  word_t peq [NPROC][$];
  word_t sent [NPROC][$];   // expected contents per element
  int checks = 0, failures = 0, nreq = 0, used [NPROC];
  always #5 clk = ~clk;
  cm_req_scheduler #(.NPROC(NPROC)) dut (.*);

  always_comb begin
    inq_valid = src.size() > 0;
    inq_data  = inq_valid ? src[0] : '0;
    for (int p = 0; p < NPROC; p++) begin
      pe_empty[p] = peq[p].size() == 0;
      pe_full[p]  = peq[p].size() >= 4;
    end
  end

  int cur_p = -1, left = 0;
  always @(posedge clk) if (rst_n) begin
    if (inq_pop) begin
      checks++;
      if ($countones(pe_push) != 1 || pe_data !== src[0]) begin failures++; $display("FAIL push"); end
      for (int p = 0; p < NPROC; p++) if (pe_push[p]) begin
        if (left == 0) begin
          // a header: goes to an empty queue
          checks++; if (!pe_empty[p]) begin failures++; $display("FAIL header to busy element"); end
          begin req_hdr_t hh; hh = pe_data; cur_p = p; left = int'(hh.len); used[p]++; end
        end else begin
          checks++; if (p != cur_p) begin failures++; $display("FAIL request split"); end
          left--;
        end
        peq[p].push_back(pe_data);
      end
      void'(src.pop_front());
    end
    for (int p = 0; p < NPROC; p++)
      if (peq[p].size() > 0 && ($urandom % 6) == 0) begin
        checks++;
        if (peq[p][0] !== sent[p][0]) begin failures++; $display("FAIL order p%0d", p); end
        void'(peq[p].pop_front()); void'(sent[p].pop_front());
      end
  end
  // record what each element should receive, from the pushes themselves
  always @(posedge clk) if (rst_n) for (int p = 0; p < NPROC; p++) if (pe_push[p] && inq_pop) sent[p].push_back(pe_data);

  initial begin
    for (int p = 0; p < NPROC; p++) used[p] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      req_hdr_t h; h.id = 8'(r); h.session = 8'($urandom); h.action = 8'($urandom % 2); h.len = 8'($urandom % 6);
      src.push_back(h);
      for (int k = 0; k < h.len; k++) src.push_back({8'(r), 24'($urandom)});
      nreq++;
    end
    wait (src.size() == 0);
    repeat (200) @(negedge clk);
    for (int p = 0; p < NPROC; p++) begin
      checks++; if (used[p] < 20) begin failures++; $display("FAIL element %0d used %0d times", p, used[p]); end
      checks++; if (peq[p].size() != 0) begin failures++; $display("FAIL leftover"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
