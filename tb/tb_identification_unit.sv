// tb_identification_unit: runs the IU on random pairs of snapshots (edge
// additions and deletions, feature mutations) with a back-pressuring HBM
// model and a randomly stalled invalidation port. Every pushed vertex must be
// unaffected by the reference classification, in ascending order, every
// unaffected vertex must be pushed, each vertex whose feature changed must be
// invalidated exactly once, and the immune/unaffected counts must match. One
// run uses `first`, where nothing is immune and every vertex is invalidated.
module tb_identification_unit;
  import race_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, first = 0, done;
  logic [6:0] num_vertices = '0;
  logic offp_re, offc_re, nbrp_re, nbrc_re;
  logic [5:0] offp_addr, offc_addr, nbrp_data, nbrc_data;
  logic [9:0] nbrp_addr, nbrc_addr;
  logic [19:0] offp_data, offc_data;
  logic mem_valid, mem_ready, mem_rsp_valid;
  mem_req_t mem_req;
  vec_t mem_rsp_data;
  logic inv_valid, inv_ready = 1, uvq_push;
  logic [5:0] inv_vid, uvq_vid;
  logic [6:0] n_immune, n_unaffected;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hbm_model #(.LAT(5), .STALL_PCT(30)) u_hbm (.clk, .req_valid(mem_valid), .req_ready(mem_ready),
    .req(mem_req), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));
  gs_model #(.NV(64), .NE(512)) u_gsp (.clk, .off_re(offp_re), .off_addr(offp_addr), .off_data(offp_data),
    .nbr_re(nbrp_re), .nbr_addr(nbrp_addr), .nbr_data(nbrp_data));
  gs_model #(.NV(64), .NE(512)) u_gsc (.clk, .off_re(offc_re), .off_addr(offc_addr), .off_data(offc_data),
    .nbr_re(nbrc_re), .nbr_addr(nbrc_addr), .nbr_data(nbrc_data));

  identification_unit #(.NV(64), .NE(512)) dut (
    .clk, .rst_n, .start, .first, .num_vertices, .prev_region(3'(REG_FEAT0)), .cur_region(3'(REG_FEAT1)),
    .done, .offp_re, .offp_addr, .offp_data, .offc_re, .offc_addr, .offc_data,
    .nbrp_re, .nbrp_addr, .nbrp_data, .nbrc_re, .nbrc_addr, .nbrc_data,
    .mem_valid, .mem_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .inv_valid, .inv_ready, .inv_vid, .uvq_push, .uvq_vid, .n_immune, .n_unaffected);

  `include "iu_tb_common.svh"

  int pushed [$], inval [$];
  always @(posedge clk) begin
    if (uvq_push) pushed.push_back(int'(uvq_vid));
    if (inv_valid && inv_ready) inval.push_back(int'(inv_vid));
    inv_ready <= ($urandom % 4) != 0;
  end

  task automatic run(input int nt, input int nchg, input int nmut, input bit f);
    int ex [$], ei [$];
    build(nt, nchg, nmut);
    classify(nt, f);
    pushed = {}; inval = {};
    num_vertices = 7'(nt); first = f;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    #1;
    for (int v = 0; v < nt; v++) begin
      if (e_unaff[v]) ex.push_back(v);
      if (!e_imm[v]) ei.push_back(v);
    end
    checks++;
    if (pushed != ex) begin
      failures++;
      $display("FAIL: unaffected list differs (%0d pushed, %0d expected)", pushed.size(), ex.size());
    end
    checks++;
    if (inval != ei) begin
      failures++;
      $display("FAIL: invalidations differ (%0d sent, %0d expected)", inval.size(), ei.size());
    end
    checks++;
    if (int'(n_immune) != e_nimm || int'(n_unaffected) != e_nunaff) begin
      failures++;
      $display("FAIL: counts immune %0d/%0d unaffected %0d/%0d", n_immune, e_nimm, n_unaffected, e_nunaff);
    end
    $display("nt %0d: immune %0d unaffected %0d", nt, e_nimm, e_nunaff);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(64, 4, 3, 0);
    run(60, 8, 6, 0);
    run(50, 0, 0, 0);
    run(64, 2, 1, 1);
    for (int k = 0; k < 6; k++) run(20 + $urandom % 44, $urandom % 10, $urandom % 8, 0);
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
