// Shared by tb_identification_unit and tb_riu: two snapshots of a 64-vertex
// undirected graph (a ring with +1/+2 links plus random chords) held in two
// GS models, random features in HBM regions 0 (snapshot t) and 1 (snapshot
// t+1), and a reference for the immune / unaffected classification:
// immune = same feature in both snapshots; unaffected = immune, same
// neighbour list and every neighbour immune.
  localparam int NV = 64, NE = 512, VW = 6, EW = 10;
  int adjp [NV][$], adjc [NV][$];
  bit e_imm [NV], e_unaff [NV];
  int e_nimm, e_nunaff;

  function automatic void add_edge(ref int adj [NV][$], input int a, input int b);
    if (a == b) return;
    foreach (adj[a][k]) if (adj[a][k] == b) return;
    adj[a].push_back(b); adj[b].push_back(a); adj[a].sort(); adj[b].sort();
  endfunction
  function automatic void del_edge(ref int adj [NV][$], input int a, input int b);
    foreach (adj[a][k]) if (adj[a][k] == b) begin adj[a].delete(k); break; end
    foreach (adj[b][k]) if (adj[b][k] == a) begin adj[b].delete(k); break; end
  endfunction
  function automatic vec_t rnd_vec();
    vec_t x;
    for (int d = 0; d < DIM; d++) x[d] = elem_t'($urandom);
    return x;
  endfunction

  // builds both snapshots; nt vertices, nchg edge edits, nmut feature mutations
  task automatic build(input int nt, input int nchg, input int nmut);
    for (int v = 0; v < NV; v++) begin adjp[v] = {}; end
    for (int v = 0; v < nt; v++) begin
      add_edge(adjp, v, (v + 1) % nt); add_edge(adjp, v, (v + 2) % nt);
    end
    for (int k = 0; k < nt / 4; k++) add_edge(adjp, $urandom % nt, $urandom % nt);
    adjc = adjp;
    for (int k = 0; k < nchg; k++) begin
      int a, b;
      a = $urandom % nt; b = $urandom % nt;
      if ($urandom % 2 == 0 && adjc[a].size() > 1) del_edge(adjc, a, adjc[a][0]);
      else add_edge(adjc, a, b);
    end
    for (int v = 0; v < nt; v++) begin
      vec_t f;
      f = rnd_vec();
      u_hbm.poke(hbm_addr(REG_FEAT0, HBM_VW'(v)), f);
      u_hbm.poke(hbm_addr(REG_FEAT1, HBM_VW'(v)), f);
      e_imm[v] = 1;
    end
    for (int k = 0; k < nmut; k++) begin
      int v;
      v = $urandom % nt;
      u_hbm.poke(hbm_addr(REG_FEAT1, HBM_VW'(v)), rnd_vec());
      e_imm[v] = 0;
    end
    u_gsp.load(adjp, nt);
    u_gsc.load(adjc, nt);
  endtask

  function automatic void classify(input int nt, input bit first);
    e_nimm = 0; e_nunaff = 0;
    for (int v = 0; v < nt; v++) begin
      if (first) e_imm[v] = 0;
      e_nimm += int'(e_imm[v]);
    end
    for (int v = 0; v < nt; v++) begin
      e_unaff[v] = e_imm[v] && (adjp[v] == adjc[v]);
      foreach (adjc[v][k]) if (!e_imm[adjc[v][k]]) e_unaff[v] = 0;
      e_nunaff += int'(e_unaff[v]);
    end
  endfunction
