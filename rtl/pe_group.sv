// pe_group: DIM processing elements that together compute one vertex task.
//   GNN task: out = ReLU(W_n * agg), with agg the aggregated DIM-element
//     vector and W_n the layer's DIM x DIM weight matrix. The product is done
//     column by column: in each cycle the group reads column j of W_n from the
//     Weight_Buffer and PE i accumulates W_n[i][j] * agg[j]. Columns whose
//     agg[j] is zero are skipped (column-wise sparse matrix multiplication),
//     so a task takes one cycle per non-zero element of agg (at least one).
//   RNN task: out = alpha * S + beta * X, element by element, with S the
//     vertex's previous hidden state, X its last-layer GNN output and alpha,
//     beta fixed-point coefficients; two cycles, using the PEs' RNN operand
//     inputs. This is a first-order form of a parameter-less temporal
//     aggregation; the weighted recurrences of an LSTM are not built.
// Interface: in_* accepted when in_ready (group idle); the result is held on
// out_* until out_ready. Weight reads are combinational (w_layer, w_col ->
// w_data in the same cycle).
module pe_group
  import race_pkg::*;
#(
  parameter int unsigned NV = 131072,
  parameter int unsigned LW = 2,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned CW = $clog2(DIM)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  elem_t         alpha,
  input  elem_t         beta,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [VW-1:0] in_vid,
  input  logic [LW-1:0] in_layer,
  input  logic          in_rnn,
  input  vec_t          in_a,     // aggregate (GNN) or X (RNN)
  input  vec_t          in_b,     // S (RNN)
  output logic [LW-1:0] w_layer,
  output logic [CW-1:0] w_col,
  input  vec_t          w_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [VW-1:0] out_vid,
  output logic [LW-1:0] out_layer,
  output logic          out_rnn,
  output vec_t          out_data,
  output logic [31:0]   n_skipped  // zero columns skipped
);
  typedef enum logic [1:0] { S_IDLE, S_RUN, S_OUT } state_e;

  state_e          st;
  logic [VW-1:0]   vid;
  logic [LW-1:0]   layer;
  logic            rnn, first, step;
  vec_t            a, b;
  logic [DIM-1:0]  todo;           // non-zero columns not yet done
  logic [CW-1:0]   j;
  logic            any;

  // lowest remaining non-zero column
  always_comb begin
    any = 1'b0; j = '0;
    for (int k = DIM - 1; k >= 0; k--)
      if (todo[k]) begin any = 1'b1; j = CW'(k); end
  end

  assign in_ready = (st == S_IDLE);
  assign w_layer  = layer;
  assign w_col    = j;

  logic  en, clear;
  elem_t y [DIM];
  assign en    = (st == S_RUN) && (rnn || any || first);
  assign clear = first;

  for (genvar p = 0; p < DIM; p++) begin : g_pe
    pe u_pe (
      .clk, .rst_n, .en, .clear,
      .mode_rnn(rnn), .add_ext(1'b0), .out_mul(1'b0),
      .gnn_a(w_data[p]), .gnn_b(any ? a[j] : '0),
      .rnn_a(step ? beta : alpha), .rnn_b(step ? a[p] : b[p]),
      .c('0), .y(y[p])
    );
  end

  always_comb
    for (int p = 0; p < DIM; p++)
      out_data[p] = (!rnn && y[p] < 0) ? '0 : y[p];   // ReLU on GNN results

  assign out_valid = (st == S_OUT);
  assign out_vid   = vid;
  assign out_layer = layer;
  assign out_rnn   = rnn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; vid <= '0; layer <= '0; rnn <= 1'b0; first <= 1'b0; step <= 1'b0;
      a <= '0; b <= '0; todo <= '0; n_skipped <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid) begin
          vid <= in_vid; layer <= in_layer; rnn <= in_rnn; a <= in_a; b <= in_b;
          first <= 1'b1; step <= 1'b0;
          for (int k = 0; k < DIM; k++) todo[k] <= (in_a[k] != 0);
          if (!in_rnn) begin
            int unsigned nz;
            nz = 0;
            for (int k = 0; k < DIM; k++) nz += (in_a[k] == 0) ? 1 : 0;
            n_skipped <= n_skipped + nz;
          end
          st <= S_RUN;
        end
        S_RUN: begin
          first <= 1'b0;
          if (rnn) begin
            step <= 1'b1;
            if (step) st <= S_OUT;
          end else begin
            if (any) todo[j] <= 1'b0;
            if (!any || (todo & ~(DIM'(1) << j)) == '0) st <= S_OUT;
          end
        end
        S_OUT: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
