// dscu: dynamic state correction unit with its task scheduler (tSched).
// It runs the processing of one snapshot after the dependency analysis:
//   for each GNN layer n = 1 .. NLAYER: the IPU is started for layer n and its
//     decisions are consumed in vertex order. A vertex marked reuse keeps its
//     layer-n state from the previous snapshot (nothing is read or written).
//     Every other vertex becomes a task for the memory-access pipeline, which
//     aggregates its neighbourhood; the aggregate is dispatched to an idle PE
//     group; the group's result is written back to HBM as the vertex's new
//     layer-n state. The next layer starts only when every task of this layer
//     has been written back, because layer n+1 reads layer-n states.
//   then the RNN step for every vertex: the memory-access pipeline reads the
//     last-layer state X and hidden state S, a PE group computes the new
//     hidden state, which is written back and also sent out on y_*.
// done pulses when the last result is written. HBM traffic leaves through two
// requester ports: reads (memory-access pipeline) and writes (write-back).
module dscu
  import race_pkg::*;
#(
  parameter int unsigned NV     = 131072,
  parameter int unsigned NE     = 65536,
  parameter int unsigned NLAYER = 3,
  parameter int unsigned NGROUP = 256,
  parameter int unsigned DQ_W   = 2,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned EW = $clog2(NE + 1),
  localparam int unsigned CW = $clog2(DIM),
  localparam int unsigned GW = (NGROUP > 1) ? $clog2(NGROUP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [VW:0]     num_vertices,
  input  elem_t           alpha,
  input  elem_t           beta,
  output logic            done,
  output logic            busy,
  // weight loading
  input  logic            w_we,
  input  logic [DQ_W-1:0] w_layer,
  input  logic [CW-1:0]   w_col,
  input  vec_t            w_data,
  // IPU
  output logic            ipu_start,
  output logic [DQ_W-1:0] ipu_layer,
  input  logic            ipu_done,
  input  logic            dec_valid,
  output logic            dec_ready,
  input  logic [VW-1:0]   dec_vid,
  input  logic            dec_reuse,
  // current-snapshot graph structure
  output logic            off_re,
  output logic [VW-1:0]   off_addr,
  input  logic [2*EW-1:0] off_data,
  output logic            nbr_re,
  output logic [EW-1:0]   nbr_addr,
  input  logic [VW-1:0]   nbr_data,
  // IF_Buffer cache
  output logic            cache_valid,
  input  logic            cache_ready,
  output logic [VW-1:0]   cache_vid,
  input  logic            cache_rsp_valid,
  input  vec_t            cache_rsp_data,
  // HBM reads
  output logic            rd_valid,
  input  logic            rd_ready,
  output mem_req_t        rd_req,
  input  logic            rd_rsp_valid,
  input  vec_t            rd_rsp_data,
  // HBM writes
  output logic            wr_valid,
  input  logic            wr_ready,
  output mem_req_t        wr_req,
  // final outputs of the snapshot
  output logic            y_valid,
  output logic [VW-1:0]   y_vid,
  output vec_t            y_data,
  // statistics
  output logic [31:0]     n_reused,
  output logic [31:0]     n_recomputed,
  output logic [31:0]     n_rnn,
  output logic [31:0]     n_fetch,
  output logic [31:0]     n_skipped,
  output logic [GW:0]     max_busy
);
  typedef enum logic [2:0] { S_IDLE, S_LSTART, S_LRUN, S_LDRAIN, S_RNN, S_RDRAIN, S_DONE } state_e;

  state_e          st;
  logic [DQ_W-1:0] layer;
  logic [VW:0]     v;
  logic [31:0]     issued, written;

  // memory-access pipeline input
  logic            ma_in_valid, ma_in_ready, ma_in_rnn;
  logic [VW-1:0]   ma_in_vid;
  // memory-access pipeline -> PE array
  logic            ma_out_valid, pa_in_ready, ma_out_rnn;
  logic [VW-1:0]   ma_out_vid;
  logic [DQ_W-1:0] ma_out_layer;
  vec_t            ma_a, ma_b;
  // PE array -> write-back
  logic            pa_out_valid, pa_out_ready, pa_out_rnn;
  logic [VW-1:0]   pa_out_vid;
  logic [DQ_W-1:0] pa_out_layer;
  vec_t            pa_out_data;

  assign busy      = (st != S_IDLE);
  assign ipu_start = (st == S_LSTART);
  assign ipu_layer = layer;

  always_comb begin
    ma_in_valid = 1'b0; ma_in_vid = dec_vid; ma_in_rnn = 1'b0; dec_ready = 1'b0;
    if (st == S_LRUN && dec_valid) begin
      if (dec_reuse) dec_ready = 1'b1;
      else begin
        ma_in_valid = 1'b1;
        dec_ready   = ma_in_ready;
      end
    end else if (st == S_RNN && v < num_vertices) begin
      ma_in_valid = 1'b1; ma_in_vid = v[VW-1:0]; ma_in_rnn = 1'b1;
    end
  end

  ma_pipeline #(.NV(NV), .NE(NE), .DQ_W(DQ_W)) u_ma (
    .clk, .rst_n, .hidden_region(3'(REG_HIDDEN)),
    .in_valid(ma_in_valid), .in_ready(ma_in_ready), .in_vid(ma_in_vid),
    .in_layer(ma_in_rnn ? DQ_W'(NLAYER) : layer), .in_rnn(ma_in_rnn),
    .off_re, .off_addr, .off_data, .nbr_re, .nbr_addr, .nbr_data,
    .cache_valid, .cache_ready, .cache_vid, .cache_rsp_valid, .cache_rsp_data,
    .mem_valid(rd_valid), .mem_ready(rd_ready), .mem_req(rd_req),
    .mem_rsp_valid(rd_rsp_valid), .mem_rsp_data(rd_rsp_data),
    .out_valid(ma_out_valid), .out_ready(pa_in_ready), .out_vid(ma_out_vid),
    .out_rnn(ma_out_rnn), .out_layer(ma_out_layer), .out_a(ma_a), .out_b(ma_b),
    .n_fetch
  );

  pe_array #(.NV(NV), .NLAYER(NLAYER), .NGROUP(NGROUP), .LW(DQ_W)) u_pa (
    .clk, .rst_n, .alpha, .beta,
    .w_we, .w_layer, .w_col, .w_data,
    .in_valid(ma_out_valid), .in_ready(pa_in_ready), .in_vid(ma_out_vid),
    .in_layer(ma_out_layer), .in_rnn(ma_out_rnn), .in_a(ma_a), .in_b(ma_b),
    .out_valid(pa_out_valid), .out_ready(pa_out_ready), .out_vid(pa_out_vid),
    .out_layer(pa_out_layer), .out_rnn(pa_out_rnn), .out_data(pa_out_data),
    .n_skipped, .max_busy
  );

  // write-back
  assign wr_valid     = pa_out_valid;
  assign pa_out_ready = wr_ready;
  assign wr_req = '{we: 1'b1,
                    addr: hbm_addr(pa_out_rnn ? 3'(REG_HIDDEN)
                                              : 3'(REG_STATE1) + 3'(pa_out_layer) - 3'd1,
                                   HBM_VW'(pa_out_vid)),
                    wdata: pa_out_data};
  assign y_valid = pa_out_valid && wr_ready && pa_out_rnn;
  assign y_vid   = pa_out_vid;
  assign y_data  = pa_out_data;

  logic drained;
  assign drained = (issued == written) && !(pa_out_valid && wr_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; layer <= '0; v <= '0; issued <= '0; written <= '0; done <= 1'b0;
      n_reused <= '0; n_recomputed <= '0; n_rnn <= '0;
    end else begin
      done <= 1'b0;
      if (ma_in_valid && ma_in_ready) issued <= issued + 1'b1;
      if (pa_out_valid && wr_ready) written <= written + 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          layer <= DQ_W'(1); issued <= '0; written <= '0;
          n_reused <= '0; n_recomputed <= '0; n_rnn <= '0;
          st <= (num_vertices == 0) ? S_DONE : S_LSTART;
        end
        S_LSTART: st <= S_LRUN;
        S_LRUN: begin
          if (dec_valid && dec_ready) begin
            if (dec_reuse) n_reused <= n_reused + 1'b1;
            else           n_recomputed <= n_recomputed + 1'b1;
          end
          if (ipu_done) st <= S_LDRAIN;
        end
        S_LDRAIN: if (drained) begin
          if (layer == DQ_W'(NLAYER)) begin v <= '0; st <= S_RNN; end
          else begin layer <= layer + 1'b1; st <= S_LSTART; end
        end
        S_RNN: begin
          if (ma_in_valid && ma_in_ready) begin
            v <= v + 1'b1; n_rnn <= n_rnn + 1'b1;
          end
          if (v == num_vertices) st <= S_RDRAIN;
        end
        S_RDRAIN: if (drained) st <= S_DONE;
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
