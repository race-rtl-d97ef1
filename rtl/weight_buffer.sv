// weight_buffer: the Weight_Buffer. Holds the DIM x DIM weight matrix of each
// of the NLAYER GNN layers, stored by column so that a PE group reads the
// whole column j of layer n (DIM elements, one per PE) in a single access.
// NRD independent combinational read ports serve the PE groups; one write
// port (one column per write) is used to load the weights before a run.
// The weights are the same for every snapshot. The document gives this
// buffer 1 MB; this design needs only NLAYER*DIM*DIM elements of it.
module weight_buffer
  import race_pkg::*;
#(
  parameter int unsigned NLAYER = 3,
  parameter int unsigned NRD    = 256,
  localparam int unsigned LW = $clog2(NLAYER + 1),
  localparam int unsigned CW = $clog2(DIM)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [LW-1:0] w_layer,   // 1..NLAYER
  input  logic [CW-1:0] w_col,
  input  vec_t          w_data,
  input  logic [LW-1:0] r_layer [NRD],
  input  logic [CW-1:0] r_col   [NRD],
  output vec_t          r_data  [NRD]
);
  vec_t w [NLAYER*DIM];

  always_ff @(posedge clk)
    if (we && w_layer != '0 && w_layer <= LW'(NLAYER))
      w[(int'(w_layer) - 1) * DIM + int'(w_col)] <= w_data;

  always_comb
    for (int p = 0; p < NRD; p++)
      r_data[p] = (r_layer[p] != '0 && r_layer[p] <= LW'(NLAYER))
                ? w[(int'(r_layer[p]) - 1) * DIM + int'(r_col[p])] : '0;
endmodule
