// tb_mem_req_arbiter: four requesters issue random reads and writes through
// the arbiter to a behavioural HBM with random back-pressure. Each requester
// checks that every read returns, in order, the data of its own address (the
// model stores address-derived data), that writes reach memory, and that no
// requester waits more than 3 grants of others while valid (round-robin).
module tb_mem_req_arbiter;
  import race_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_valid = '0, req_ready, rsp_valid;
  mem_req_t req [N];
  vec_t rsp_data;
  logic hbm_req_valid, hbm_req_ready, hbm_rsp_valid;
  mem_req_t hbm_req;
  vec_t hbm_rsp_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mem_req_arbiter #(.NREQ(N), .MAX_OUT(8)) dut (.*);
  hbm_model #(.LAT(3), .STALL_PCT(30)) u_hbm (
    .clk, .req_valid(hbm_req_valid), .req_ready(hbm_req_ready), .req(hbm_req),
    .rsp_valid(hbm_rsp_valid), .rsp_data(hbm_rsp_data));

  function automatic vec_t pattern(logic [HBM_AW-1:0] a);
    vec_t v;
    for (int i = 0; i < DIM; i++) v[i] = elem_t'(a * 7 + i);
    return v;
  endfunction

  logic [HBM_AW-1:0] expq [N][$];
  int wait_cnt [N];
  int n_done [N];
  int n_wr;

  for (genvar r = 0; r < N; r++) begin : g_req
    initial begin
      req[r] = '0;
      n_done[r] = 0;
      @(posedge rst_n);
      for (int k = 0; k < 60; k++) begin
        @(negedge clk);
        req_valid[r] = 1;
        req[r].we    = ($urandom % 4) == 0;
        req[r].addr  = HBM_AW'(($urandom % 64) * 4 + r);
        req[r].wdata = pattern(req[r].addr);
        @(posedge clk);
        while (!req_ready[r]) @(posedge clk);
        if (!req[r].we) expq[r].push_back(req[r].addr);
        else n_wr++;
        #1 req_valid[r] = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
      n_done[r] = 1;
    end
    always @(posedge clk) if (rsp_valid[r]) begin
      checks++;
      if (expq[r].size() == 0 || rsp_data !== pattern(expq[r][0])) begin
        failures++; $display("FAIL: requester %0d got wrong data", r);
      end
      if (expq[r].size() != 0) void'(expq[r].pop_front());
    end
    // fairness: a waiting requester is granted within N grants
    always @(posedge clk) begin
      if (req_valid[r] && !req_ready[r] && hbm_req_valid && hbm_req_ready) wait_cnt[r]++;
      if (req_ready[r] || !req_valid[r]) wait_cnt[r] = 0;
      if (wait_cnt[r] >= N) begin failures++; wait_cnt[r] = 0; $display("FAIL: requester %0d starved", r); end
    end
  end

  initial begin
    n_wr = 0;
    for (int r = 0; r < N; r++) begin wait_cnt[r] = 0; for (int a = 0; a < 64; a++) u_hbm.poke(HBM_AW'(a * 4 + r), pattern(HBM_AW'(a * 4 + r))); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (n_done[0] && n_done[1] && n_done[2] && n_done[3]);
    repeat (30) @(posedge clk);
    for (int r = 0; r < N; r++) begin
      checks++;
      if (expq[r].size() != 0) begin failures++; $display("FAIL: %0d reads of requester %0d unanswered", expq[r].size(), r); end
    end
    checks++;
    if (n_wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
