// race_top: redundancy-aware accelerator for dynamic graph neural network
// (DGNN) inference. For every new graph snapshot t+1 it produces each
// vertex's new RNN hidden state while recomputing only the GNN layer states
// that snapshot t+1 actually changes.
//
// One snapshot (start -> done):
//   1. RIU: the identification unit compares input features and neighbour
//      lists of snapshots t and t+1 and collects the unaffected vertices; the
//      traversal engine turns them into an n-hop dependency per vertex
//      (Dependency_Queue) and the predicted feature-access frequency
//      (Frequency_Table).
//   2. RPU, layer by layer: the IPU decides reuse/recompute per vertex; the
//      DSCU aggregates the neighbourhood of each recomputed vertex (input
//      features through the topology-aware IF_Buffer cache), runs the layer's
//      combination on a PE group and writes the new state to HBM.
//   3. RNN step on the same PE groups for every vertex; the new hidden states
//      leave on y_*.
// Memory map: graph structure of both snapshots lives on chip in the
// GS_Buffer (two banks, loaded through gs_*); input features of both
// snapshots, the layer states and the hidden states live in HBM (port hbm_*),
// see race_pkg for the regions. cfg_cur_bank selects which GS bank and which
// feature region belong to snapshot t+1; the other bank is snapshot t.
// cfg_first marks a run with no usable previous snapshot (everything is
// recomputed). Offsets entries are {begin, end}; neighbour lists must be in
// the same order in both snapshots; graphs are undirected (each edge stored
// in both directions), as in the document's datasets.
// The controller, the memory map and all port protocols are this design's
// own; the units and their order of work follow the document.
module race_top
  import race_pkg::*;
#(
  parameter int unsigned NV        = 131072,
  parameter int unsigned NE        = 65536,
  parameter int unsigned NLAYER    = 3,
  parameter int unsigned NGROUP    = 256,
  parameter int unsigned UVQ_DEPTH = 8192,
  parameter int unsigned IF_LINES  = 65536,
  parameter int unsigned IQ_W      = 3,
  parameter int unsigned DQ_W      = 2,
  parameter int unsigned FT_W      = 2,
  parameter int unsigned MAX_OUT   = 16,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned EW = $clog2(NE + 1),
  localparam int unsigned CW = $clog2(DIM)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration (hold stable while busy)
  input  logic [VW:0]     cfg_num_vertices,
  input  logic            cfg_first,
  input  logic            cfg_cur_bank,
  input  elem_t           cfg_alpha,
  input  elem_t           cfg_beta,
  // control
  input  logic            start,
  output logic            busy,
  output logic            done,
  // graph-structure loading (while idle)
  input  logic            gs_we,
  input  logic            gs_bank,
  input  logic            gs_nbr,     // 0: offsets entry, 1: neighbour entry
  input  logic [EW-1:0]   gs_addr,
  input  logic [2*EW-1:0] gs_wdata,
  // weight loading (while idle)
  input  logic            w_we,
  input  logic [DQ_W-1:0] w_layer,
  input  logic [CW-1:0]   w_col,
  input  vec_t            w_data,
  // HBM
  output logic            hbm_req_valid,
  input  logic            hbm_req_ready,
  output mem_req_t        hbm_req,
  input  logic            hbm_rsp_valid,
  input  vec_t            hbm_rsp_data,
  // new hidden states
  output logic            y_valid,
  output logic [VW-1:0]   y_vid,
  output vec_t            y_data,
  output stats_t          stats
);
  // ------------------------------------------------------------ control
  typedef enum logic [1:0] { C_IDLE, C_RIU, C_RPU } ctl_e;
  ctl_e ctl;
  logic riu_done, riu_busy, dscu_done, dscu_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctl <= C_IDLE;
    else unique case (ctl)
      C_IDLE: if (start) ctl <= C_RIU;
      C_RIU:  if (riu_done) ctl <= C_RPU;
      C_RPU:  if (dscu_done) ctl <= C_IDLE;
      default: ctl <= C_IDLE;
    endcase
  end
  assign busy = (ctl != C_IDLE);
  assign done = dscu_done;

  logic [2:0] cur_region, prev_region;
  assign cur_region  = cfg_cur_bank ? 3'(REG_FEAT1) : 3'(REG_FEAT0);
  assign prev_region = cfg_cur_bank ? 3'(REG_FEAT0) : 3'(REG_FEAT1);

  // ------------------------------------------------------------ GS_Buffer
  // two banks of offsets and neighbour arrays; port "cur" serves snapshot t+1
  logic            offc_re, offp_re, nbrc_re, nbrp_re;
  logic [VW-1:0]   offc_addr, offp_addr;
  logic [EW-1:0]   nbrc_addr, nbrp_addr;
  logic [2*EW-1:0] off_rd [2];
  logic [VW-1:0]   nbr_rd [2];
  for (genvar k = 0; k < 2; k++) begin : g_gs
    logic is_cur;
    assign is_cur = (cfg_cur_bank == 1'(k));
    sram_buffer #(.DEPTH(NV), .WIDTH(2*EW)) u_off (
      .clk, .we(gs_we && !gs_nbr && gs_bank == 1'(k) && !busy),
      .waddr(VW'(gs_addr)), .wdata(gs_wdata),
      .re(is_cur ? offc_re : offp_re), .raddr(is_cur ? offc_addr : offp_addr),
      .rdata(off_rd[k]));
    sram_buffer #(.DEPTH(NE), .WIDTH(VW)) u_nbr (
      .clk, .we(gs_we && gs_nbr && gs_bank == 1'(k) && !busy),
      .waddr(gs_addr[$clog2(NE)-1:0]), .wdata(gs_wdata[VW-1:0]),
      .re(is_cur ? nbrc_re : nbrp_re),
      .raddr(is_cur ? nbrc_addr[$clog2(NE)-1:0] : nbrp_addr[$clog2(NE)-1:0]),
      .rdata(nbr_rd[k]));
  end
  logic [2*EW-1:0] offc_data, offp_data;
  logic [VW-1:0]   nbrc_data, nbrp_data;
  assign offc_data = off_rd[cfg_cur_bank];
  assign offp_data = off_rd[!cfg_cur_bank];
  assign nbrc_data = nbr_rd[cfg_cur_bank];
  assign nbrp_data = nbr_rd[!cfg_cur_bank];

  // ------------------------------------------------------------ HBM requests
  localparam int unsigned R_IU = 0, R_CACHE = 1, R_MA = 2, R_WB = 3;
  logic [3:0] rq_valid, rq_ready, rs_valid;
  mem_req_t   rq [4];
  vec_t       rs_data;

  mem_req_arbiter #(.NREQ(4), .MAX_OUT(MAX_OUT)) u_arb (
    .clk, .rst_n, .req_valid(rq_valid), .req_ready(rq_ready), .req(rq),
    .rsp_valid(rs_valid), .rsp_data(rs_data),
    .hbm_req_valid, .hbm_req_ready, .hbm_req, .hbm_rsp_valid, .hbm_rsp_data
  );

  // ------------------------------------------------------------ RIU
  logic            inv_valid, inv_ready;
  logic [VW-1:0]   inv_vid;
  logic            dq_re, ft_re;
  logic [VW-1:0]   dq_addr, ft_addr;
  logic [DQ_W-1:0] dq_data, max_level;
  logic [FT_W-1:0] ft_data;
  logic            riu_offc_re, riu_nbrc_re;
  logic [VW-1:0]   riu_offc_addr;
  logic [EW-1:0]   riu_nbrc_addr;
  logic [VW:0]     n_immune, n_unaffected;
  logic [31:0]     n_dep;

  riu #(.NV(NV), .NE(NE), .NLAYER(NLAYER), .UVQ_DEPTH(UVQ_DEPTH),
        .IQ_W(IQ_W), .DQ_W(DQ_W), .FT_W(FT_W)) u_riu (
    .clk, .rst_n, .start(start && ctl == C_IDLE), .first(cfg_first),
    .num_vertices(cfg_num_vertices), .prev_region, .cur_region,
    .done(riu_done), .busy(riu_busy),
    .offp_re, .offp_addr, .offp_data,
    .offc_re(riu_offc_re), .offc_addr(riu_offc_addr), .offc_data,
    .nbrp_re, .nbrp_addr, .nbrp_data,
    .nbrc_re(riu_nbrc_re), .nbrc_addr(riu_nbrc_addr), .nbrc_data,
    .mem_valid(rq_valid[R_IU]), .mem_ready(rq_ready[R_IU]), .mem_req(rq[R_IU]),
    .mem_rsp_valid(rs_valid[R_IU]), .mem_rsp_data(rs_data),
    .inv_valid, .inv_ready, .inv_vid,
    .dq_re, .dq_addr, .dq_data, .ft_re, .ft_addr, .ft_data,
    .n_immune, .n_unaffected, .n_dep,
    .n_uvq_overflow(stats.uvq_overflow), .n_iq_sat(stats.iq_sat), .max_level
  );

  // ------------------------------------------------------------ IF_Buffer
  logic            c_valid, c_ready, c_rsp_valid;
  logic [VW-1:0]   c_vid;
  vec_t            c_rsp_data;
  logic [FT_W-1:0] td;

  if_cache #(.NV(NV), .LINES(IF_LINES), .FT_W(FT_W)) u_cache (
    .clk, .rst_n, .cur_region,
    .req_valid(c_valid), .req_ready(c_ready), .req_vid(c_vid),
    .rsp_valid(c_rsp_valid), .rsp_data(c_rsp_data),
    .inv_valid, .inv_ready, .inv_vid,
    .ft_re, .ft_addr, .ft_data,
    .mem_valid(rq_valid[R_CACHE]), .mem_ready(rq_ready[R_CACHE]), .mem_req(rq[R_CACHE]),
    .mem_rsp_valid(rs_valid[R_CACHE]), .mem_rsp_data(rs_data),
    .n_hit(stats.cache_hit), .n_miss(stats.cache_miss), .n_bypass(stats.cache_bypass),
    .n_evict(stats.cache_evict), .n_inval(stats.cache_inval), .td
  );

  // ------------------------------------------------------------ RPU
  logic            ipu_start, ipu_done, dec_valid, dec_ready, dec_reuse;
  logic [DQ_W-1:0] ipu_layer, dec_lvl;
  logic [VW-1:0]   dec_vid;
  logic            r_off_re, r_nbr_re;
  logic [VW-1:0]   r_off_addr;
  logic [EW-1:0]   r_nbr_addr;
  logic [$clog2(NGROUP):0] max_busy;

  ipu #(.NV(NV), .NLAYER(NLAYER), .DQ_W(DQ_W)) u_ipu (
    .clk, .rst_n, .start(ipu_start), .layer(ipu_layer), .num_vertices(cfg_num_vertices),
    .done(ipu_done), .dq_re, .dq_addr, .dq_data,
    .out_valid(dec_valid), .out_ready(dec_ready), .out_vid(dec_vid),
    .out_lvl(dec_lvl), .out_reuse(dec_reuse)
  );

  dscu #(.NV(NV), .NE(NE), .NLAYER(NLAYER), .NGROUP(NGROUP), .DQ_W(DQ_W)) u_dscu (
    .clk, .rst_n, .start(riu_done), .num_vertices(cfg_num_vertices),
    .alpha(cfg_alpha), .beta(cfg_beta), .done(dscu_done), .busy(dscu_busy),
    .w_we(w_we && !busy), .w_layer, .w_col, .w_data,
    .ipu_start, .ipu_layer, .ipu_done, .dec_valid, .dec_ready, .dec_vid, .dec_reuse,
    .off_re(r_off_re), .off_addr(r_off_addr), .off_data(offc_data),
    .nbr_re(r_nbr_re), .nbr_addr(r_nbr_addr), .nbr_data(nbrc_data),
    .cache_valid(c_valid), .cache_ready(c_ready), .cache_vid(c_vid),
    .cache_rsp_valid(c_rsp_valid), .cache_rsp_data(c_rsp_data),
    .rd_valid(rq_valid[R_MA]), .rd_ready(rq_ready[R_MA]), .rd_req(rq[R_MA]),
    .rd_rsp_valid(rs_valid[R_MA]), .rd_rsp_data(rs_data),
    .wr_valid(rq_valid[R_WB]), .wr_ready(rq_ready[R_WB]), .wr_req(rq[R_WB]),
    .y_valid, .y_vid, .y_data,
    .n_reused(stats.reused), .n_recomputed(stats.recomputed), .n_rnn(stats.rnn),
    .n_fetch(stats.fetch), .n_skipped(stats.zero_skip), .max_busy
  );

  // the RIU and RPU never run together: share the current-snapshot GS port
  assign offc_re   = riu_busy ? riu_offc_re   : r_off_re;
  assign offc_addr = riu_busy ? riu_offc_addr : r_off_addr;
  assign nbrc_re   = riu_busy ? riu_nbrc_re   : r_nbr_re;
  assign nbrc_addr = riu_busy ? riu_nbrc_addr : r_nbr_addr;

  // ------------------------------------------------------------ statistics
  logic [31:0] hbm_stall;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hbm_stall <= '0;
    else if (start && ctl == C_IDLE) hbm_stall <= '0;
    else if (hbm_req_valid && !hbm_req_ready) hbm_stall <= hbm_stall + 1'b1;
  end
  assign stats.immune     = 32'(n_immune);
  assign stats.unaffected = 32'(n_unaffected);
  assign stats.dep        = n_dep;
  assign stats.max_level  = 32'(max_level);
  assign stats.max_busy   = 32'(max_busy);
  assign stats.hbm_stall  = hbm_stall;

  // the decision's level is informative only; the reuse flag carries it
  logic unused_ok;
  assign unused_ok = ^{dec_lvl, td, dscu_busy};
endmodule
