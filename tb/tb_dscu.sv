// tb_dscu: one snapshot of processing through the DSCU on a random 48-vertex
// graph with four PE groups. A stand-in for the IPU streams, for each layer,
// the decisions "reuse if the vertex's dependency level >= layer" from a
// random Dependency_Queue; a cache stand-in serves input features; reads go
// to the HBM model and writes are accepted at random and stored in it. The
// reference computes each layer in fixed point (sum aggregation, weight
// matrix, ReLU) with reused vertices keeping their previous state, then the
// recurrent step alpha*S + beta*X. Checked: every layer state and hidden
// state in memory, every y output, and the reuse/recompute/RNN counts.
module tb_dscu;
  import race_pkg::*;
  localparam int NV = 64, NE = 512, NT = 48, NL = 3;
  logic clk = 0, rst_n = 0;
  logic start = 0, done, busy;
  logic [6:0] num_vertices = 7'(NT);
  elem_t alpha = 16'sh00c0, beta = 16'sh0080;
  logic w_we = 0;
  logic [1:0] w_layer = '0;
  logic [3:0] w_col = '0;
  vec_t w_data = '0;
  logic ipu_start, ipu_done = 0, dec_valid = 0, dec_ready, dec_reuse = 0;
  logic [1:0] ipu_layer;
  logic [5:0] dec_vid = '0;
  logic off_re, nbr_re;
  logic [5:0] off_addr, nbr_data;
  logic [9:0] nbr_addr;
  logic [19:0] off_data;
  logic cache_valid, cache_ready = 0, cache_rsp_valid = 0;
  logic [5:0] cache_vid;
  vec_t cache_rsp_data = '0;
  logic rd_valid, rd_ready, rd_rsp_valid, wr_valid, wr_ready = 0;
  mem_req_t rd_req, wr_req;
  vec_t rd_rsp_data;
  logic y_valid;
  logic [5:0] y_vid;
  vec_t y_data;
  logic [31:0] n_reused, n_recomputed, n_rnn, n_fetch, n_skipped;
  logic [2:0] max_busy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hbm_model #(.LAT(4), .STALL_PCT(20)) u_hbm (.clk, .req_valid(rd_valid), .req_ready(rd_ready),
    .req(rd_req), .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data));
  gs_model #(.NV(NV), .NE(NE)) u_gs (.clk, .off_re, .off_addr, .off_data, .nbr_re, .nbr_addr, .nbr_data);

  dscu #(.NV(NV), .NE(NE), .NLAYER(NL), .NGROUP(4), .DQ_W(2)) dut (.*);

  int adj [NV][$];
  int dq [NV];
  vec_t feat [NV], prev [NL+1][NV], hid [NV], H [NL+1][NV], S [NV];
  elem_t W [NL][DIM][DIM];
  int e_reuse, e_recomp;

  function automatic elem_t rnd_elem(int range_q8);
    return elem_t'(int'($urandom % (2 * range_q8 + 1)) - range_q8);
  endfunction
  function automatic vec_t rnd_vec(int range_q8);
    vec_t x;
    for (int d = 0; d < DIM; d++) x[d] = (($urandom % 4) == 0) ? elem_t'(0) : rnd_elem(range_q8);
    return x;
  endfunction

  // cache stand-in, write port, y capture
  int cache_pend = -1;
  vec_t y_got [NV];
  int y_cnt [NV];
  int writes = 0;
  always @(posedge clk) begin
    cache_rsp_valid <= 1'b0;
    if (cache_pend >= 0) begin
      cache_rsp_valid <= 1'b1; cache_rsp_data <= feat[cache_pend]; cache_pend = -1;
    end
    if (cache_valid && cache_ready) cache_pend = int'(cache_vid);
    cache_ready <= (cache_pend < 0) && ($urandom % 2 == 0);
    if (wr_valid && wr_ready) begin
      u_hbm.poke(wr_req.addr, wr_req.wdata);
      writes++;
    end
    if (y_valid) begin y_got[y_vid] = y_data; y_cnt[y_vid]++; end
    wr_ready <= ($urandom % 3) != 0;
  end

  // IPU stand-in
  initial begin
    forever begin
      int lay;
      @(posedge clk);
      if (ipu_start) begin
        lay = int'(ipu_layer);
        for (int v = 0; v < NT; v++) begin
          @(negedge clk);
          while ($urandom % 3 == 0) @(negedge clk);
          dec_valid = 1; dec_vid = 6'(v); dec_reuse = (dq[v] >= lay);
          @(posedge clk);
          while (!dec_ready) @(posedge clk);
          @(negedge clk); dec_valid = 0;
        end
        ipu_done = 1;
        @(negedge clk); ipu_done = 0;
      end
    end
  end

  initial begin
    for (int v = 0; v < NT; v++) begin adj[v].push_back((v + 1) % NT); adj[v].push_back((v + NT - 1) % NT); end
    for (int k = 0; k < 20; k++) begin
      int a, b;
      a = $urandom % NT; b = $urandom % NT;
      if (a != b) begin adj[a].push_back(b); adj[b].push_back(a); end
    end
    u_gs.load(adj, NT);
    for (int n = 0; n < NL; n++) for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++)
      W[n][i][j] = (($urandom % 3) == 0) ? elem_t'(0) : rnd_elem(40);
    e_reuse = 0; e_recomp = 0;
    for (int v = 0; v < NT; v++) begin
      feat[v] = rnd_vec(256); hid[v] = rnd_vec(256); dq[v] = $urandom % 4; y_cnt[v] = 0;
      u_hbm.poke(hbm_addr(REG_HIDDEN, HBM_VW'(v)), hid[v]);
      for (int n = 1; n <= NL; n++) begin
        prev[n][v] = rnd_vec(256);
        u_hbm.poke(hbm_addr(3'(REG_STATE1) + 3'(n - 1), HBM_VW'(v)), prev[n][v]);
        if (dq[v] >= n) e_reuse++; else e_recomp++;
      end
    end
    // reference
    for (int v = 0; v < NT; v++) H[0][v] = feat[v];
    for (int n = 1; n <= NL; n++)
      for (int v = 0; v < NT; v++) begin
        vec_t agg, o;
        if (dq[v] >= n) H[n][v] = prev[n][v];
        else begin
          agg = H[n-1][v];
          foreach (adj[v][k]) agg = vec_add(agg, H[n-1][adj[v][k]]);
          for (int i = 0; i < DIM; i++) begin
            elem_t acc;
            acc = '0;
            for (int j = 0; j < DIM; j++) acc = acc + fx_mul(W[n-1][i][j], agg[j]);
            o[i] = (acc < 0) ? '0 : acc;
          end
          H[n][v] = o;
        end
      end
    for (int v = 0; v < NT; v++)
      for (int i = 0; i < DIM; i++) S[v][i] = fx_mul(alpha, hid[v][i]) + fx_mul(beta, H[NL][v][i]);

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NL; n++)
      for (int j = 0; j < DIM; j++) begin
        @(negedge clk);
        w_we = 1; w_layer = 2'(n + 1); w_col = 4'(j);
        for (int i = 0; i < DIM; i++) w_data[i] = W[n][i][j];
      end
    @(negedge clk); w_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    #1;
    for (int n = 1; n <= NL; n++)
      for (int v = 0; v < NT; v++) begin
        checks++;
        if (u_hbm.peek(hbm_addr(3'(REG_STATE1) + 3'(n - 1), HBM_VW'(v))) != H[n][v]) begin
          failures++; $display("FAIL: layer %0d state of vertex %0d (dq %0d)", n, v, dq[v]);
        end
      end
    for (int v = 0; v < NT; v++) begin
      checks++;
      if (u_hbm.peek(hbm_addr(REG_HIDDEN, HBM_VW'(v))) != S[v] || y_cnt[v] != 1 || y_got[v] != S[v]) begin
        failures++; $display("FAIL: hidden state / output of vertex %0d (%0d outputs)", v, y_cnt[v]);
      end
    end
    checks++;
    if (int'(n_reused) != e_reuse || int'(n_recomputed) != e_recomp || int'(n_rnn) != NT ||
        writes != e_recomp + NT || busy) begin
      failures++;
      $display("FAIL: reused %0d/%0d recomputed %0d/%0d rnn %0d writes %0d", n_reused, e_reuse,
               n_recomputed, e_recomp, n_rnn, writes);
    end
    $display("reused %0d recomputed %0d, %0d fetches, %0d zero elements skipped, max busy groups %0d",
             n_reused, n_recomputed, n_fetch, n_skipped, max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
