// pe_array: the pool of PE groups that executes GNN and RNN tasks, with the
// Weight_Buffer and the task crossbar.
// NGROUP groups of DIM PEs give NGROUP*DIM multiply-accumulate units (4096 by
// default, as in the document). GNN and RNN tasks share the same groups, so
// no group waits for a separate RNN unit while GNN work is pending (the
// document's scheduler lends idle RNN units to GNN work for the same reason).
// Dispatch: a task on in_* goes to the lowest-numbered idle group (a
// one-to-all crossbar); in_ready is low when every group is busy.
// Collection: finished groups are served round-robin onto out_* (valid/ready).
module pe_array
  import race_pkg::*;
#(
  parameter int unsigned NV     = 131072,
  parameter int unsigned NLAYER = 3,
  parameter int unsigned NGROUP = 256,
  parameter int unsigned LW     = 2,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned CW = $clog2(DIM),
  localparam int unsigned GW = (NGROUP > 1) ? $clog2(NGROUP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  elem_t         alpha,
  input  elem_t         beta,
  // weight loading
  input  logic          w_we,
  input  logic [LW-1:0] w_layer,
  input  logic [CW-1:0] w_col,
  input  vec_t          w_data,
  // tasks
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [VW-1:0] in_vid,
  input  logic [LW-1:0] in_layer,
  input  logic          in_rnn,
  input  vec_t          in_a,
  input  vec_t          in_b,
  // results
  output logic          out_valid,
  input  logic          out_ready,
  output logic [VW-1:0] out_vid,
  output logic [LW-1:0] out_layer,
  output logic          out_rnn,
  output vec_t          out_data,
  // statistics
  output logic [31:0]   n_skipped,
  output logic [GW:0]   max_busy
);
  logic [NGROUP-1:0] g_in_ready, g_in_valid, g_out_valid, g_out_ready;
  logic [VW-1:0]     g_vid   [NGROUP];
  logic [LW-1:0]     g_layer [NGROUP];
  logic [NGROUP-1:0] g_rnn;
  vec_t              g_data  [NGROUP];
  logic [31:0]       g_skip  [NGROUP];
  logic [LW-1:0]     rl [NGROUP];
  logic [CW-1:0]     rc [NGROUP];
  vec_t              rd [NGROUP];

  weight_buffer #(.NLAYER(NLAYER), .NRD(NGROUP)) u_wb (
    .clk, .we(w_we), .w_layer(LW'(w_layer)), .w_col, .w_data,
    .r_layer(rl), .r_col(rc), .r_data(rd)
  );

  // dispatch to the lowest idle group
  logic [GW-1:0] free_g;
  logic          any_free;
  always_comb begin
    any_free = 1'b0; free_g = '0;
    for (int g = NGROUP - 1; g >= 0; g--)
      if (g_in_ready[g]) begin any_free = 1'b1; free_g = GW'(g); end
  end
  assign in_ready = any_free;
  always_comb begin
    g_in_valid = '0;
    if (in_valid && any_free) g_in_valid[free_g] = 1'b1;
  end

  for (genvar g = 0; g < NGROUP; g++) begin : g_grp
    pe_group #(.NV(NV), .LW(LW)) u_grp (
      .clk, .rst_n, .alpha, .beta,
      .in_valid(g_in_valid[g]), .in_ready(g_in_ready[g]),
      .in_vid, .in_layer, .in_rnn, .in_a, .in_b,
      .w_layer(rl[g]), .w_col(rc[g]), .w_data(rd[g]),
      .out_valid(g_out_valid[g]), .out_ready(g_out_ready[g]),
      .out_vid(g_vid[g]), .out_layer(g_layer[g]), .out_rnn(g_rnn[g]),
      .out_data(g_data[g]), .n_skipped(g_skip[g])
    );
  end

  // round-robin result collection
  logic [GW-1:0] rr, sel;
  logic          any_done;
  always_comb begin
    any_done = 1'b0; sel = '0;
    for (int k = 0; k < NGROUP; k++) begin
      int unsigned g;
      g = (int'(rr) + 1 + k) % NGROUP;
      if (!any_done && g_out_valid[g]) begin any_done = 1'b1; sel = GW'(g); end
    end
  end
  assign out_valid = any_done;
  assign out_vid   = g_vid[sel];
  assign out_layer = g_layer[sel];
  assign out_rnn   = g_rnn[sel];
  assign out_data  = g_data[sel];
  always_comb begin
    g_out_ready = '0;
    if (any_done && out_ready) g_out_ready[sel] = 1'b1;
  end

  always_comb begin
    n_skipped = '0;
    for (int g = 0; g < NGROUP; g++) n_skipped += g_skip[g];
  end

  logic [GW:0] n_busy;
  always_comb begin
    n_busy = '0;
    for (int g = 0; g < NGROUP; g++) n_busy += (GW+1)'(!g_in_ready[g]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= GW'(NGROUP - 1); max_busy <= '0;
    end else begin
      if (any_done && out_ready) rr <= sel;
      if (n_busy > max_busy) max_busy <= n_busy;
    end
  end
endmodule
