// tb_traversal_engine: runs the TE on a 64-vertex undirected graph (a ring
// with +1/+2 links, a hub of degree 14 and a few random chords) from random
// root sets, once with a roomy UVQ and once with a 48-entry UVQ that
// overflows. A software model of the level-by-level counting (own vertex
// plus neighbours, saturating 3-bit counters, bounded queue) gives the
// expected Dependency_Queue, Frequency_Table, dependency count, overflow
// count and saturation count; DQ and FT are read back through the TE's idle
// read ports.
module tb_traversal_engine;
  localparam int NV = 64, NE = 512, VW = 6, EW = 10, NT = 64;
  logic clk = 0, rst_n = 0;
  logic uvq_clear = 0, uvq_push = 0, start = 0, done, busy;
  logic [VW-1:0] uvq_vid = '0;
  logic [VW:0] num_vertices = 7'(NT);
  logic off_re, nbr_re, dq_re = 0, ft_re = 0;
  logic [VW-1:0] off_addr, dq_addr = '0, ft_addr = '0, nbr_data;
  logic [EW-1:0] nbr_addr;
  logic [2*EW-1:0] off_data;
  logic [1:0] dq_data, ft_data, max_level;
  logic [31:0] n_dep, n_uvq_overflow, n_iq_sat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  gs_model #(.NV(NV), .NE(NE)) u_gs (.clk, .off_re, .off_addr, .off_data, .nbr_re, .nbr_addr, .nbr_data);

  int adj [NV][$];
  function automatic void add_edge(int a, int b);
    foreach (adj[a][k]) if (adj[a][k] == b) return;
    if (a == b) return;
    adj[a].push_back(b); adj[b].push_back(a); adj[a].sort(); adj[b].sort();
  endfunction

  // expected results
  int e_dq [NV], e_ft [NV], e_dep, e_ovf, e_sat, e_max;
  function automatic void model(input int roots [$], input int cap);
    int q [$], cnt [NV], head, lend, lvl;
    e_dep = 0; e_ovf = 0; e_sat = 0; e_max = 0;
    foreach (roots[k]) if (q.size() < cap) q.push_back(roots[k]); else e_ovf++;
    for (int v = 0; v < NT; v++) begin e_dq[v] = 0; e_ft[v] = 0; end
    head = 0; lend = q.size();
    for (lvl = 1; lvl <= 3; lvl++) begin
      for (int v = 0; v < NT; v++) cnt[v] = 0;
      for (int i = head; i < lend; i++) begin
        int r;
        r = q[i];
        if (cnt[r] == 7) e_sat++; else cnt[r]++;
        foreach (adj[r][k]) if (cnt[adj[r][k]] == 7) e_sat++; else cnt[adj[r][k]]++;
      end
      for (int v = 0; v < NT; v++) begin
        int need;
        need = adj[v].size() + 1;
        if (cnt[v] == need) begin
          e_dq[v] = lvl; e_dep++; e_max = lvl;
          if (q.size() < cap) q.push_back(v); else e_ovf++;
        end
        if (lvl == 1) e_ft[v] = (need - cnt[v] > 3) ? 3 : need - cnt[v];
      end
      if (q.size() == lend) break;
      head = lend; lend = q.size();
    end
  endfunction

  task automatic run(input int cap, input int pct);
    int roots [$];
    roots = {};
    for (int v = 0; v < NT; v++) if (int'($urandom % 100) < pct) roots.push_back(v);
    model(roots, cap);
    use_small = (cap < 512);
    @(negedge clk); uvq_clear = 1;
    @(negedge clk); uvq_clear = 0;
    foreach (roots[k]) begin
      @(negedge clk); uvq_push = 1; uvq_vid = VW'(roots[k]);
    end
    @(negedge clk); uvq_push = 0; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    #1;
    checks++;
    if (n_dep != 32'(e_dep) || n_uvq_overflow != 32'(e_ovf) || n_iq_sat != 32'(e_sat) ||
        (e_dep != 0 && max_level != 2'(e_max))) begin
      failures++;
      $display("FAIL: dep %0d/%0d overflow %0d/%0d sat %0d/%0d level %0d/%0d",
               n_dep, e_dep, n_uvq_overflow, e_ovf, n_iq_sat, e_sat, max_level, e_max);
    end
    for (int v = 0; v < NT; v++) begin
      @(negedge clk); dq_re = 1; ft_re = 1; dq_addr = VW'(v); ft_addr = VW'(v);
      @(negedge clk); dq_re = 0; ft_re = 0;
      checks++;
      if (dq_data !== 2'(e_dq[v]) || ft_data !== 2'(e_ft[v])) begin
        failures++; $display("FAIL: vertex %0d dq %0d/%0d ft %0d/%0d", v, dq_data, e_dq[v], ft_data, e_ft[v]);
      end
    end
    $display("cap %0d roots %0d: dep %0d overflow %0d sat %0d max level %0d", cap, roots.size(), e_dep, e_ovf, e_sat, e_max);
  endtask

  initial begin
    for (int v = 0; v < NT; v++) begin add_edge(v, (v + 1) % NT); add_edge(v, (v + 2) % NT); end
    for (int v = 40; v < 50; v++) add_edge(20, v);
    for (int k = 0; k < 4; k++) add_edge(int'($urandom % NT), int'($urandom % NT));
    u_gs.load(adj, NT);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(512, 90);
    run(512, 97);
    run(48, 95);
    run(512, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two engines that differ only in UVQ size; `use_small` selects the one under test
  bit use_small = 0;
  logic [1:0] s_done, s_busy, s_off_re, s_nbr_re;
  logic [VW-1:0] s_off_addr [2];
  logic [EW-1:0] s_nbr_addr [2];
  logic [1:0] s_dq [2], s_ft [2], s_lvl [2];
  logic [31:0] s_dep [2], s_ovf [2], s_sat [2];
  for (genvar k = 0; k < 2; k++) begin : g_te
    traversal_engine #(.NV(NV), .NE(NE), .NLAYER(3), .UVQ_DEPTH(k == 0 ? 512 : 48)) dut (
      .clk, .rst_n, .uvq_clear, .uvq_push, .uvq_vid, .start(start && (use_small == 1'(k))),
      .num_vertices, .done(s_done[k]), .busy(s_busy[k]),
      .off_re(s_off_re[k]), .off_addr(s_off_addr[k]), .off_data,
      .nbr_re(s_nbr_re[k]), .nbr_addr(s_nbr_addr[k]), .nbr_data,
      .dq_re, .dq_addr, .dq_data(s_dq[k]), .ft_re, .ft_addr, .ft_data(s_ft[k]),
      .n_dep(s_dep[k]), .n_uvq_overflow(s_ovf[k]), .n_iq_sat(s_sat[k]), .max_level(s_lvl[k]));
  end
  assign done = s_done[use_small];
  assign busy = s_busy[use_small];
  assign off_re = s_off_re[use_small];
  assign off_addr = s_off_addr[use_small];
  assign nbr_re = s_nbr_re[use_small];
  assign nbr_addr = s_nbr_addr[use_small];
  assign dq_data = s_dq[use_small];
  assign ft_data = s_ft[use_small];
  assign max_level = s_lvl[use_small];
  assign n_dep = s_dep[use_small];
  assign n_uvq_overflow = s_ovf[use_small];
  assign n_iq_sat = s_sat[use_small];
endmodule
