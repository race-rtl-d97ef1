// race_tb_body.svh: shared body of the end-to-end testbenches of race_top.
// The including module declares P_NV, P_NE, P_NLAYER, P_NGROUP and SMALL and
// instantiates race_top as `dut` on the signals declared here.
//
// The test runs four snapshots of a small undirected graph (NT vertices: a
// ring where each vertex links to the next two, plus a hub joined to ten
// more vertices): snapshot 0 with nothing to reuse, then two snapshots with a
// few edge deletions, additions, a degree-preserving edge swap and feature
// mutations, then one snapshot with no change at all. After each snapshot
// every output hidden state and every stored GNN layer state is compared
// with a reference that recomputes the whole snapshot from scratch with the
// same fixed-point arithmetic, so incremental reuse must give exactly the
// full result. Event counters are checked for plausibility and, when SMALL
// is set, each mechanism must have happened at least once.

localparam int NT  = 64;                    // vertices used by the test
localparam int VW  = $clog2(P_NV);
localparam int EW  = $clog2(P_NE + 1);
localparam int CW  = $clog2(DIM);
localparam int DQW = 2;

logic            clk = 1'b0;
logic            rst_n = 1'b0;
logic [VW:0]     cfg_num_vertices;
logic            cfg_first, cfg_cur_bank;
elem_t           cfg_alpha, cfg_beta;
logic            start, busy, done;
logic            gs_we, gs_bank, gs_nbr;
logic [EW-1:0]   gs_addr;
logic [2*EW-1:0] gs_wdata;
logic            w_we;
logic [DQW-1:0]  w_layer;
logic [CW-1:0]   w_col;
vec_t            w_data;
logic            hbm_req_valid, hbm_req_ready, hbm_rsp_valid;
mem_req_t        hbm_req;
vec_t            hbm_rsp_data;
logic            y_valid;
logic [VW-1:0]   y_vid;
vec_t            y_data;
stats_t          stats;

always #5 clk = ~clk;

hbm_model #(.LAT(4), .STALL_PCT(25)) u_hbm (
  .clk, .req_valid(hbm_req_valid), .req_ready(hbm_req_ready), .req(hbm_req),
  .rsp_valid(hbm_rsp_valid), .rsp_data(hbm_rsp_data)
);

int checks = 0, failures = 0;
longint cycle = 0;
always @(posedge clk) cycle <= cycle + 1;

// ---------------------------------------------------------------- test data
int    adj [NT][$];               // neighbour lists of the current snapshot
vec_t  feat [NT];                 // input features of the current snapshot
elem_t W [P_NLAYER][DIM][DIM];    // W[n][row][col], layer n+1
vec_t  S_ref [NT];                // expected hidden state
vec_t  H_ref [P_NLAYER+1][NT];    // expected layer states
vec_t  y_got [NT];
bit    y_seen [NT];
int    n_y;

function automatic elem_t rnd_elem(int range_q8);
  int r;
  r = int'($urandom % (2 * range_q8)) - range_q8;
  return elem_t'(r);
endfunction

function automatic void add_edge(int a, int b);
  adj[a].push_back(b); adj[b].push_back(a);
  adj[a].sort(); adj[b].sort();
endfunction

function automatic void del_edge(int a, int b);
  foreach (adj[a][k]) if (adj[a][k] == b) begin adj[a].delete(k); break; end
  foreach (adj[b][k]) if (adj[b][k] == a) begin adj[b].delete(k); break; end
endfunction

function automatic vec_t rnd_feat();
  vec_t f;
  for (int i = 0; i < DIM; i++) f[i] = (($urandom % 3) == 0) ? '0 : rnd_elem(512);
  return f;
endfunction

// full recomputation of the current snapshot (reference)
function automatic void reference(input bit first_snap);
  for (int v = 0; v < NT; v++) H_ref[0][v] = feat[v];
  for (int n = 1; n <= P_NLAYER; n++)
    for (int v = 0; v < NT; v++) begin
      vec_t agg, o;
      agg = H_ref[n-1][v];
      foreach (adj[v][k]) agg = vec_add(agg, H_ref[n-1][adj[v][k]]);
      for (int i = 0; i < DIM; i++) begin
        elem_t acc;
        acc = '0;
        for (int j = 0; j < DIM; j++) acc = acc + fx_mul(W[n-1][i][j], agg[j]);
        o[i] = (acc < 0) ? '0 : acc;
      end
      H_ref[n][v] = o;
    end
  for (int v = 0; v < NT; v++) begin
    vec_t s;
    for (int i = 0; i < DIM; i++)
      s[i] = fx_mul(cfg_alpha, first_snap ? elem_t'(0) : S_ref[v][i]) + fx_mul(cfg_beta, H_ref[P_NLAYER][v][i]);
    S_ref[v] = s;
  end
endfunction

// ---------------------------------------------------------------- loading
task automatic load_snapshot(input bit bank);
  int e;
  e = 0;
  for (int v = 0; v < NT; v++) begin
    @(negedge clk);
    gs_we = 1; gs_bank = bank; gs_nbr = 0; gs_addr = EW'(v);
    gs_wdata = {EW'(e), EW'(e + adj[v].size())};
    foreach (adj[v][k]) begin
      @(negedge clk);
      gs_nbr = 1; gs_addr = EW'(e); gs_wdata = (2*EW)'(adj[v][k]);
      e++;
    end
  end
  @(negedge clk); gs_we = 0;
  for (int v = 0; v < NT; v++)
    u_hbm.poke(hbm_addr(bank ? 3'(REG_FEAT1) : 3'(REG_FEAT0), HBM_VW'(v)), feat[v]);
endtask

task automatic load_weights();
  for (int n = 0; n < P_NLAYER; n++)
    for (int j = 0; j < DIM; j++) begin
      @(negedge clk);
      w_we = 1; w_layer = DQW'(n + 1); w_col = CW'(j);
      for (int i = 0; i < DIM; i++) w_data[i] = W[n][i][j];
    end
  @(negedge clk); w_we = 0;
endtask

always @(posedge clk) if (y_valid) begin
  if (int'(y_vid) < NT) begin
    y_got[y_vid] <= y_data;
    if (y_seen[y_vid]) begin failures++; $display("FAIL: vertex %0d output twice", y_vid); end
    y_seen[y_vid] <= 1'b1;
  end
  n_y <= n_y + 1;
end

// mechanism counters over the whole run
int m_reuse, m_recomp, m_hit, m_miss, m_bypass, m_evict, m_inval, m_skip, m_stall,
    m_ovf, m_sat, m_lvl3, m_rnn;

task automatic run_snapshot(input int idx, input bit first_snap, input bit bank);
  longint t0;
  reference(first_snap);
  for (int v = 0; v < NT; v++) y_seen[v] = 0;
  n_y = 0;
  @(negedge clk);
  cfg_first = first_snap; cfg_cur_bank = bank; start = 1;
  t0 = cycle;
  @(negedge clk); start = 0;
  while (!done) @(negedge clk);
  repeat (2) @(negedge clk);
  $display("snapshot %0d: %0d cycles, immune %0d unaffected %0d dep %0d (max level %0d) reused %0d recomputed %0d",
           idx, cycle - t0, stats.immune, stats.unaffected, stats.dep, stats.max_level,
           stats.reused, stats.recomputed);
  $display("  cache hit %0d miss %0d bypass %0d evict %0d inval %0d; zero-skip %0d; hbm stall %0d; uvq ovf %0d; iq sat %0d; max busy groups %0d",
           stats.cache_hit, stats.cache_miss, stats.cache_bypass, stats.cache_evict, stats.cache_inval,
           stats.zero_skip, stats.hbm_stall, stats.uvq_overflow, stats.iq_sat, stats.max_busy);
  // outputs
  checks++;
  if (n_y != NT) begin failures++; $display("FAIL: %0d outputs, expected %0d", n_y, NT); end
  for (int v = 0; v < NT; v++) begin
    checks++;
    if (!y_seen[v] || y_got[v] !== S_ref[v]) begin
      failures++;
      if (failures < 10) $display("FAIL: snapshot %0d vertex %0d hidden %h expected %h", idx, v, y_got[v], S_ref[v]);
    end
  end
  // stored layer states and hidden states
  for (int n = 1; n <= P_NLAYER; n++)
    for (int v = 0; v < NT; v++) begin
      checks++;
      if (u_hbm.peek(hbm_addr(3'(REG_STATE1) + 3'(n - 1), HBM_VW'(v))) !== H_ref[n][v]) begin
        failures++;
        if (failures < 10) $display("FAIL: snapshot %0d layer %0d vertex %0d state differs", idx, n, v);
      end
    end
  // counters
  checks++;
  if (stats.reused + stats.recomputed != 32'(P_NLAYER * NT) || stats.rnn != 32'(NT)) begin
    failures++; $display("FAIL: reused+recomputed %0d rnn %0d", stats.reused + stats.recomputed, stats.rnn);
  end
  checks++;
  if (first_snap ? (stats.reused != 0) : (stats.reused == 0)) begin
    failures++; $display("FAIL: reuse count %0d on snapshot %0d", stats.reused, idx);
  end
  // cache and PE-group counters run from reset; the others per snapshot
  m_reuse += stats.reused;  m_recomp += stats.recomputed; m_hit = stats.cache_hit;
  m_miss = stats.cache_miss; m_bypass = stats.cache_bypass; m_evict = stats.cache_evict;
  m_inval = stats.cache_inval; m_skip = stats.zero_skip; m_stall += stats.hbm_stall;
  m_ovf += stats.uvq_overflow; m_sat += stats.iq_sat; m_rnn += stats.rnn;
  if (stats.max_level == 3) m_lvl3++;
endtask

task automatic need(input string what, input int count);
  checks++;
  $display("  mechanism %-28s happened %0d times", what, count);
  if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
endtask

initial begin
  cfg_num_vertices = (VW+1)'(NT); cfg_first = 1; cfg_cur_bank = 0;
  cfg_alpha = elem_t'(192); cfg_beta = elem_t'(96);      // 0.75, 0.375
  start = 0; gs_we = 0; gs_bank = 0; gs_nbr = 0; gs_addr = '0; gs_wdata = '0;
  w_we = 0; w_layer = '0; w_col = '0; w_data = '0;
  for (int v = 0; v < NT; v++) begin S_ref[v] = '0; y_got[v] = '0; y_seen[v] = 0; end
  m_reuse = 0; m_recomp = 0; m_hit = 0; m_miss = 0; m_bypass = 0; m_evict = 0; m_inval = 0;
  m_skip = 0; m_stall = 0; m_ovf = 0; m_sat = 0; m_lvl3 = 0; m_rnn = 0;
  // graph: ring with +1/+2 links, hub 0 linked to 10..19
  for (int v = 0; v < NT; v++) begin
    add_edge(v, (v + 1) % NT);
    add_edge(v, (v + 2) % NT);
  end
  for (int v = 10; v < 20; v++) add_edge(0, v);
  for (int v = 0; v < NT; v++) feat[v] = rnd_feat();
  for (int n = 0; n < P_NLAYER; n++)
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) W[n][i][j] = rnd_elem(48);
  for (int v = 0; v < NT; v++) u_hbm.poke(hbm_addr(3'(REG_HIDDEN), HBM_VW'(v)), '0);
  repeat (3) @(negedge clk);
  rst_n = 1;
  load_weights();
  // snapshot 0: bank 0, nothing to reuse
  load_snapshot(0);
  run_snapshot(0, 1, 0);
  // snapshot 1: bank 1; one edge moved, one feature mutated
  del_edge(30, 31); add_edge(30, 34);
  feat[45] = rnd_feat();
  load_snapshot(1);
  run_snapshot(1, 0, 1);
  // snapshot 2: bank 0; hub loses an edge, two features mutate, one edge
  // added, and two edges swap ends so that every degree stays the same
  del_edge(0, 15); add_edge(20, 23);
  del_edge(36, 38); del_edge(56, 58); add_edge(36, 56); add_edge(38, 58);
  feat[5] = rnd_feat(); feat[50] = rnd_feat();
  load_snapshot(0);
  run_snapshot(2, 0, 0);
  // snapshot 3: bank 1; nothing changes at all
  load_snapshot(1);
  run_snapshot(3, 0, 1);
  checks++;
  if (stats.unaffected != 32'(NT) || stats.reused <= stats.recomputed) begin
    failures++; $display("FAIL: unchanged snapshot: unaffected %0d, reused %0d, recomputed %0d",
                         stats.unaffected, stats.reused, stats.recomputed);
  end
  need("state reuse (IPU skip)", m_reuse);
  need("state recomputation", m_recomp);
  need("RNN step", m_rnn);
  need("IF_Buffer hit", m_hit);
  need("IF_Buffer miss", m_miss);
  need("IF_Buffer invalidation", m_inval);
  need("zero-column skip", m_skip);
  need("HBM back-pressure", m_stall);
  need("3-hop dependency reached", m_lvl3);
  if (SMALL) begin
    need("IF_Buffer bypass (below TD)", m_bypass);
    need("IF_Buffer eviction", m_evict);
    need("UVQ overflow", m_ovf);
    need("IQ counter saturation", m_sat);
  end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  repeat (400000) @(posedge clk);
  failures++;
  $display("FAIL: watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
