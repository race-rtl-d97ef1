// tb_riu: the whole redundancy identification unit (IU then TE) on random
// snapshot pairs. The reference classifies every vertex (immune, unaffected)
// and then repeats the TE's level-by-level counting from the unaffected
// vertices over snapshot t+1 (own vertex plus neighbours, 3-bit saturating
// counters, level n when the count reaches degree+1). After done the
// Dependency_Queue and Frequency_Table are read back through the RIU's read
// ports and compared for every vertex, together with the counters.
module tb_riu;
  import race_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, first = 0, done, busy;
  logic [6:0] num_vertices = '0;
  logic offp_re, offc_re, nbrp_re, nbrc_re;
  logic [5:0] offp_addr, offc_addr, nbrp_data, nbrc_data;
  logic [9:0] nbrp_addr, nbrc_addr;
  logic [19:0] offp_data, offc_data;
  logic mem_valid, mem_ready, mem_rsp_valid;
  mem_req_t mem_req;
  vec_t mem_rsp_data;
  logic inv_valid, inv_ready = 1;
  logic [5:0] inv_vid;
  logic dq_re = 0, ft_re = 0;
  logic [5:0] dq_addr = '0, ft_addr = '0;
  logic [1:0] dq_data, ft_data, max_level;
  logic [6:0] n_immune, n_unaffected;
  logic [31:0] n_dep, n_uvq_overflow, n_iq_sat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hbm_model #(.LAT(3), .STALL_PCT(20)) u_hbm (.clk, .req_valid(mem_valid), .req_ready(mem_ready),
    .req(mem_req), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));
  gs_model #(.NV(64), .NE(512)) u_gsp (.clk, .off_re(offp_re), .off_addr(offp_addr), .off_data(offp_data),
    .nbr_re(nbrp_re), .nbr_addr(nbrp_addr), .nbr_data(nbrp_data));
  gs_model #(.NV(64), .NE(512)) u_gsc (.clk, .off_re(offc_re), .off_addr(offc_addr), .off_data(offc_data),
    .nbr_re(nbrc_re), .nbr_addr(nbrc_addr), .nbr_data(nbrc_data));

  riu #(.NV(64), .NE(512), .NLAYER(3), .UVQ_DEPTH(256)) dut (
    .clk, .rst_n, .start, .first, .num_vertices, .prev_region(3'(REG_FEAT0)), .cur_region(3'(REG_FEAT1)),
    .done, .busy, .offp_re, .offp_addr, .offp_data, .offc_re, .offc_addr, .offc_data,
    .nbrp_re, .nbrp_addr, .nbrp_data, .nbrc_re, .nbrc_addr, .nbrc_data,
    .mem_valid, .mem_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .inv_valid, .inv_ready, .inv_vid, .dq_re, .dq_addr, .dq_data, .ft_re, .ft_addr, .ft_data,
    .n_immune, .n_unaffected, .n_dep, .n_uvq_overflow, .n_iq_sat, .max_level);

  `include "iu_tb_common.svh"

  always @(posedge clk) inv_ready <= ($urandom % 3) != 0;

  int e_dq [NV], e_ft [NV], e_dep, e_max;
  function automatic void traverse(input int nt);
    int q [$], cnt [NV], head, lend;
    e_dep = 0; e_max = 0;
    for (int v = 0; v < nt; v++) begin
      e_dq[v] = 0; e_ft[v] = 0;
      if (e_unaff[v]) q.push_back(v);
    end
    head = 0; lend = q.size();
    for (int lvl = 1; lvl <= 3; lvl++) begin
      for (int v = 0; v < nt; v++) cnt[v] = 0;
      for (int i = head; i < lend; i++) begin
        if (cnt[q[i]] < 7) cnt[q[i]]++;
        foreach (adjc[q[i]][k]) if (cnt[adjc[q[i]][k]] < 7) cnt[adjc[q[i]][k]]++;
      end
      for (int v = 0; v < nt; v++) begin
        int need;
        need = adjc[v].size() + 1;
        if (cnt[v] == need) begin e_dq[v] = lvl; e_dep++; e_max = lvl; q.push_back(v); end
        if (lvl == 1) e_ft[v] = (need - cnt[v] > 3) ? 3 : need - cnt[v];
      end
      if (q.size() == lend) break;
      head = lend; lend = q.size();
    end
  endfunction

  task automatic run(input int nt, input int nchg, input int nmut, input bit f);
    int cyc;
    build(nt, nchg, nmut);
    classify(nt, f);
    traverse(nt);
    num_vertices = 7'(nt); first = f;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    #1;
    checks++;
    if (int'(n_immune) != e_nimm || int'(n_unaffected) != e_nunaff || int'(n_dep) != e_dep ||
        (e_dep != 0 && int'(max_level) != e_max) || n_uvq_overflow != 0 || busy) begin
      failures++;
      $display("FAIL: immune %0d/%0d unaffected %0d/%0d dep %0d/%0d level %0d/%0d overflow %0d busy %0d",
               n_immune, e_nimm, n_unaffected, e_nunaff, n_dep, e_dep, max_level, e_max, n_uvq_overflow, busy);
    end
    for (int v = 0; v < nt; v++) begin
      @(negedge clk); dq_re = 1; ft_re = 1; dq_addr = 6'(v); ft_addr = 6'(v);
      @(negedge clk); dq_re = 0; ft_re = 0;
      checks++;
      if (int'(dq_data) != e_dq[v] || int'(ft_data) != e_ft[v]) begin
        failures++;
        $display("FAIL: vertex %0d dq %0d/%0d ft %0d/%0d", v, dq_data, e_dq[v], ft_data, e_ft[v]);
      end
    end
    $display("nt %0d: immune %0d unaffected %0d dependent %0d (max level %0d), %0d cycles",
             nt, e_nimm, e_nunaff, e_dep, e_max, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(64, 2, 1, 0);
    run(64, 2, 1, 1);
    run(48, 0, 0, 0);
    for (int k = 0; k < 6; k++) run(20 + $urandom % 44, $urandom % 6, $urandom % 5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
