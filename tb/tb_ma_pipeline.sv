// tb_ma_pipeline: feeds random GNN tasks (layers 1..3) and RNN tasks to the
// memory-access unit on a random 64-vertex graph. Layer-1 features come from
// a cache stand-in that accepts requests at random and answers 1..3 cycles
// later; layer states and hidden states come from the HBM model with random
// back-pressure. The expected aggregate is the wrap-around sum of the vertex's
// own vector and its neighbours' vectors from the right source; RNN tasks
// must return the last-layer state and the hidden state. The fetch counter
// must equal the number of vectors gathered.
module tb_ma_pipeline;
  import race_pkg::*;
  localparam int NV = 64, NE = 512, NT = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_rnn = 0;
  logic [5:0] in_vid = '0;
  logic [1:0] in_layer = '0;
  logic off_re, nbr_re;
  logic [5:0] off_addr, nbr_data;
  logic [9:0] nbr_addr;
  logic [19:0] off_data;
  logic cache_valid, cache_ready = 0, cache_rsp_valid = 0;
  logic [5:0] cache_vid;
  vec_t cache_rsp_data = '0;
  logic mem_valid, mem_ready, mem_rsp_valid;
  mem_req_t mem_req;
  vec_t mem_rsp_data;
  logic out_valid, out_ready = 0, out_rnn;
  logic [5:0] out_vid;
  logic [1:0] out_layer;
  vec_t out_a, out_b;
  logic [31:0] n_fetch;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hbm_model #(.LAT(4), .STALL_PCT(30)) u_hbm (.clk, .req_valid(mem_valid), .req_ready(mem_ready),
    .req(mem_req), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));
  gs_model #(.NV(NV), .NE(NE)) u_gs (.clk, .off_re, .off_addr, .off_data, .nbr_re, .nbr_addr, .nbr_data);

  ma_pipeline #(.NV(NV), .NE(NE), .DQ_W(2)) dut (
    .clk, .rst_n, .hidden_region(3'(REG_HIDDEN)),
    .in_valid, .in_ready, .in_vid, .in_layer, .in_rnn,
    .off_re, .off_addr, .off_data, .nbr_re, .nbr_addr, .nbr_data,
    .cache_valid, .cache_ready, .cache_vid, .cache_rsp_valid, .cache_rsp_data,
    .mem_valid, .mem_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .out_valid, .out_ready, .out_vid, .out_rnn, .out_layer, .out_a, .out_b, .n_fetch);

  int adj [NV][$];
  vec_t feat [NV], st [4][NV], hid [NV];

  // cache stand-in
  int cache_wait = 0;
  int cache_pend = -1;
  always @(posedge clk) begin
    cache_rsp_valid <= 1'b0;
    if (cache_pend >= 0) begin
      if (cache_wait == 0) begin
        cache_rsp_valid <= 1'b1; cache_rsp_data <= feat[cache_pend]; cache_pend = -1;
      end else cache_wait--;
    end
    if (cache_valid && cache_ready) begin
      cache_pend = int'(cache_vid); cache_wait = $urandom % 3;
    end
    cache_ready <= (cache_pend < 0) && ($urandom % 3 != 0);
    out_ready <= ($urandom % 2) != 0;
  end

  function automatic vec_t rnd_vec();
    vec_t x;
    for (int d = 0; d < DIM; d++) x[d] = elem_t'($urandom);
    return x;
  endfunction

  int e_fetch = 0;
  task automatic one(input int v, input int layer, input bit rnn);
    vec_t ea, eb;
    ea = '0; eb = '0;
    if (rnn) begin
      ea = st[layer][v]; eb = hid[v];
    end else begin
      ea = (layer == 1) ? feat[v] : st[layer - 1][v];
      foreach (adj[v][k]) ea = vec_add(ea, (layer == 1) ? feat[adj[v][k]] : st[layer - 1][adj[v][k]]);
      e_fetch += adj[v].size() + 1;
    end
    @(negedge clk);
    in_valid = 1; in_vid = 6'(v); in_layer = 2'(layer); in_rnn = rnn;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
    do @(posedge clk); while (!(out_valid && out_ready));
    checks++;
    if (int'(out_vid) != v || out_rnn != rnn || out_a != ea || (rnn && out_b != eb) ||
        (!rnn && int'(out_layer) != layer)) begin
      failures++;
      $display("FAIL: task v%0d layer %0d rnn %0d: vid %0d rnn %0d layer %0d a %0s", v, layer, rnn,
               out_vid, out_rnn, out_layer, (out_a == ea) ? "ok" : "wrong");
    end
  endtask

  initial begin
    for (int v = 0; v < NT; v++) begin adj[v].push_back((v + 1) % NT); adj[v].push_back((v + NT - 1) % NT); end
    for (int k = 0; k < 40; k++) begin
      int a, b;
      a = $urandom % NT; b = $urandom % NT;
      if (a != b) begin adj[a].push_back(b); adj[b].push_back(a); end
    end
    adj[7] = {};                                    // an isolated vertex
    foreach (adj[v]) foreach (adj[v][k]) if (adj[v][k] == 7) adj[v].delete(k);
    u_gs.load(adj, NT);
    for (int v = 0; v < NV; v++) begin
      feat[v] = rnd_vec(); hid[v] = rnd_vec();
      u_hbm.poke(hbm_addr(REG_HIDDEN, HBM_VW'(v)), hid[v]);
      for (int l = 1; l <= 3; l++) begin
        st[l][v] = rnd_vec();
        u_hbm.poke(hbm_addr(3'(REG_STATE1) + 3'(l - 1), HBM_VW'(v)), st[l][v]);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(7, 1, 0);
    one(7, 2, 0);
    for (int k = 0; k < 200; k++) one($urandom % NT, 1 + $urandom % 3, ($urandom % 4) == 0);
    checks++;
    if (int'(n_fetch) != e_fetch) begin
      failures++; $display("FAIL: fetch count %0d, expected %0d", n_fetch, e_fetch);
    end
    $display("%0d vectors fetched", e_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
