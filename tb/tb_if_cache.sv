// tb_if_cache: random lookups and invalidations on an 8-line IF_Buffer in
// front of a behavioural HBM. A reference model of the topology-aware
// policy (threshold TD = lowest cached frequency once the buffer is full;
// admit a missed feature only if its frequency is >= TD and >= that of the
// line it would replace) predicts for every access whether it hits, is
// admitted, bypassed or evicts, and the test compares the unit's counters
// after each access and the returned data with the HBM contents. A hit must
// answer within two cycles of acceptance.
module tb_if_cache;
  import race_pkg::*;
  localparam int NV = 64, L = 8;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, rsp_valid, inv_valid = 0, inv_ready, ft_re;
  logic [5:0] req_vid = '0, inv_vid = '0, ft_addr;
  logic [1:0] ft_data, td;
  vec_t rsp_data, mem_rsp_data;
  logic mem_valid, mem_ready, mem_rsp_valid;
  mem_req_t mem_req;
  logic [31:0] n_hit, n_miss, n_bypass, n_evict, n_inval;
  logic [1:0] ft [NV];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ft_re) ft_data <= ft[ft_addr];

  if_cache #(.NV(NV), .LINES(L), .FT_W(2)) dut (.*, .cur_region(3'(REG_FEAT1)));
  hbm_model #(.LAT(3), .STALL_PCT(20)) u_hbm (
    .clk, .req_valid(mem_valid), .req_ready(mem_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  // reference model
  bit m_valid [L]; int m_tag [L]; int m_freq [L];
  int e_hit, e_miss, e_bypass, e_evict, e_inval;
  function automatic int m_td();
    int n, mn;
    n = 0; mn = 3;
    for (int i = 0; i < L; i++) if (m_valid[i]) begin n++; if (m_freq[i] < mn) mn = m_freq[i]; end
    return (n == L) ? mn : 0;
  endfunction

  function automatic vec_t feat_of(int v);
    vec_t f;
    for (int i = 0; i < DIM; i++) f[i] = elem_t'(v * 31 + i * 3 + 1);
    return f;
  endfunction

  task automatic check_counts(string what);
    checks++;
    if (n_hit != 32'(e_hit) || n_miss != 32'(e_miss) || n_bypass != 32'(e_bypass) ||
        n_evict != 32'(e_evict) || n_inval != 32'(e_inval) || td != 2'(m_td())) begin
      failures++;
      $display("FAIL: after %s: hit %0d/%0d miss %0d/%0d bypass %0d/%0d evict %0d/%0d inval %0d/%0d td %0d/%0d",
               what, n_hit, e_hit, n_miss, e_miss, n_bypass, e_bypass, n_evict, e_evict, n_inval, e_inval, td, m_td());
    end
  endtask

  initial begin
    int v, ix, tg;
    e_hit = 0; e_miss = 0; e_bypass = 0; e_evict = 0; e_inval = 0;
    for (int i = 0; i < L; i++) m_valid[i] = 0;
    for (int k = 0; k < NV; k++) begin
      ft[k] = 2'($urandom);
      u_hbm.poke(hbm_addr(3'(REG_FEAT1), HBM_VW'(k)), feat_of(k));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      v = int'($urandom % 24); ix = v % L; tg = v / L;
      @(negedge clk);
      if (($urandom % 6) == 0) begin
        inv_valid = 1; inv_vid = 6'(v);
        @(posedge clk); while (!inv_ready) @(posedge clk);
        #1 inv_valid = 0;
        if (m_valid[ix] && m_tag[ix] == tg) begin m_valid[ix] = 0; e_inval++; end
        repeat (2) @(posedge clk);
        check_counts("invalidate");
      end else begin
        longint t0, t1;
        bit hit;
        req_valid = 1; req_vid = 6'(v);
        @(posedge clk); while (!req_ready) @(posedge clk);
        t0 = $time;
        #1 req_valid = 0;
        while (!rsp_valid) begin @(posedge clk); #1; end
        t1 = $time - 1;
        checks++;
        if (rsp_data !== feat_of(v)) begin failures++; $display("FAIL: data of %0d", v); end
        hit = m_valid[ix] && m_tag[ix] == tg;
        if (hit) begin
          e_hit++;
          checks++;
          if ((t1 - t0) / 10 > 2) begin failures++; $display("FAIL: hit took %0d cycles", (t1 - t0) / 10); end
        end else begin
          e_miss++;
          if (int'(ft[v]) >= m_td() && (!m_valid[ix] || m_freq[ix] <= int'(ft[v]))) begin
            if (m_valid[ix]) e_evict++;
            m_valid[ix] = 1; m_tag[ix] = tg; m_freq[ix] = int'(ft[v]);
          end else e_bypass++;
        end
        @(posedge clk); #1;
        check_counts("lookup");
      end
    end
    checks++;
    if (e_bypass == 0 || e_evict == 0 || e_inval == 0 || e_hit == 0) begin
      failures++; $display("FAIL: a policy case was not exercised");
    end
    $display("hits %0d misses %0d bypass %0d evict %0d inval %0d", e_hit, e_miss, e_bypass, e_evict, e_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
