// riu: redundancy identification unit. Runs the identification unit (IU) and
// then the traversal engine (TE) for one new snapshot, and afterwards serves
// the Dependency_Queue (to the IPU) and Frequency_Table (to the IF cache).
// start -> UVQ emptied, IU finds the unaffected vertices -> TE computes the
// n-hop aggregation dependency -> done (one-cycle pulse). The IU and TE never
// run together, so the current snapshot's graph-structure ports are simply
// switched to whichever is active.
// The split into IU and TE and their order follow the document, which runs
// eight IUs and eight TEs in parallel; this unit has one of each, which
// changes only throughput, not results.
module riu
  import race_pkg::*;
#(
  parameter int unsigned NV        = 131072,
  parameter int unsigned NE        = 65536,
  parameter int unsigned NLAYER    = 3,
  parameter int unsigned UVQ_DEPTH = 8192,
  parameter int unsigned IQ_W      = 3,
  parameter int unsigned DQ_W      = 2,
  parameter int unsigned FT_W      = 2,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned EW = $clog2(NE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              first,
  input  logic [VW:0]       num_vertices,
  input  logic [2:0]        prev_region,
  input  logic [2:0]        cur_region,
  output logic              done,
  output logic              busy,
  output logic              offp_re,
  output logic [VW-1:0]     offp_addr,
  input  logic [2*EW-1:0]   offp_data,
  output logic              offc_re,
  output logic [VW-1:0]     offc_addr,
  input  logic [2*EW-1:0]   offc_data,
  output logic              nbrp_re,
  output logic [EW-1:0]     nbrp_addr,
  input  logic [VW-1:0]     nbrp_data,
  output logic              nbrc_re,
  output logic [EW-1:0]     nbrc_addr,
  input  logic [VW-1:0]     nbrc_data,
  output logic              mem_valid,
  input  logic              mem_ready,
  output mem_req_t          mem_req,
  input  logic              mem_rsp_valid,
  input  vec_t              mem_rsp_data,
  output logic              inv_valid,
  input  logic              inv_ready,
  output logic [VW-1:0]     inv_vid,
  input  logic              dq_re,
  input  logic [VW-1:0]     dq_addr,
  output logic [DQ_W-1:0]   dq_data,
  input  logic              ft_re,
  input  logic [VW-1:0]     ft_addr,
  output logic [FT_W-1:0]   ft_data,
  output logic [VW:0]       n_immune,
  output logic [VW:0]       n_unaffected,
  output logic [31:0]       n_dep,
  output logic [31:0]       n_uvq_overflow,
  output logic [31:0]       n_iq_sat,
  output logic [DQ_W-1:0]   max_level
);
  logic iu_done, te_busy, te_done, iu_run;
  logic uvq_push;
  logic [VW-1:0] uvq_vid;
  logic iu_offc_re, te_off_re, iu_nbrc_re, te_nbr_re;
  logic [VW-1:0] iu_offc_addr, te_off_addr;
  logic [EW-1:0] iu_nbrc_addr, te_nbr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) iu_run <= 1'b0;
    else if (start) iu_run <= 1'b1;
    else if (iu_done) iu_run <= 1'b0;
  end
  assign busy = iu_run || te_busy || iu_done;
  assign done = te_done;

  identification_unit #(.NV(NV), .NE(NE)) u_iu (
    .clk, .rst_n, .start, .first, .num_vertices, .prev_region, .cur_region,
    .done(iu_done),
    .offp_re, .offp_addr, .offp_data,
    .offc_re(iu_offc_re), .offc_addr(iu_offc_addr), .offc_data,
    .nbrp_re, .nbrp_addr, .nbrp_data,
    .nbrc_re(iu_nbrc_re), .nbrc_addr(iu_nbrc_addr), .nbrc_data,
    .mem_valid, .mem_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .inv_valid, .inv_ready, .inv_vid,
    .uvq_push, .uvq_vid, .n_immune, .n_unaffected
  );

  traversal_engine #(.NV(NV), .NE(NE), .NLAYER(NLAYER), .UVQ_DEPTH(UVQ_DEPTH),
                     .IQ_W(IQ_W), .DQ_W(DQ_W), .FT_W(FT_W)) u_te (
    .clk, .rst_n, .uvq_clear(start), .uvq_push, .uvq_vid,
    .start(iu_done), .num_vertices, .done(te_done), .busy(te_busy),
    .off_re(te_off_re), .off_addr(te_off_addr), .off_data(offc_data),
    .nbr_re(te_nbr_re), .nbr_addr(te_nbr_addr), .nbr_data(nbrc_data),
    .dq_re, .dq_addr, .dq_data, .ft_re, .ft_addr, .ft_data,
    .n_dep, .n_uvq_overflow, .n_iq_sat, .max_level
  );

  assign offc_re   = te_busy ? te_off_re   : iu_offc_re;
  assign offc_addr = te_busy ? te_off_addr : iu_offc_addr;
  assign nbrc_re   = te_busy ? te_nbr_re   : iu_nbrc_re;
  assign nbrc_addr = te_busy ? te_nbr_addr : iu_nbrc_addr;
endmodule
