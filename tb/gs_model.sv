// gs_model: testbench model of one snapshot's graph structure in the
// GS_Buffer: an offsets array of {begin, end} pairs and a neighbour array,
// each with a read port that answers one cycle after the address (like the
// on-chip SRAM). load() builds both arrays from neighbour lists.
module gs_model #(
  parameter int NV = 64,
  parameter int NE = 512,
  localparam int VW = $clog2(NV),
  localparam int EW = $clog2(NE + 1)
) (
  input  logic            clk,
  input  logic            off_re,
  input  logic [VW-1:0]   off_addr,
  output logic [2*EW-1:0] off_data,
  input  logic            nbr_re,
  input  logic [EW-1:0]   nbr_addr,
  output logic [VW-1:0]   nbr_data
);
  logic [2*EW-1:0] off [NV];
  logic [VW-1:0]   nbr [NE];

  initial begin
    off_data = '0; nbr_data = '0;
    for (int v = 0; v < NV; v++) off[v] = '0;
    for (int e = 0; e < NE; e++) nbr[e] = '0;
  end

  typedef int list_t [$];
  function automatic void load(input list_t adj [NV], input int nv);
    int e;
    e = 0;
    for (int v = 0; v < nv; v++) begin
      off[v] = {EW'(e), EW'(e + adj[v].size())};
      foreach (adj[v][k]) begin nbr[e] = VW'(adj[v][k]); e++; end
    end
  endfunction

  always @(posedge clk) begin
    if (off_re) off_data <= off[off_addr];
    if (nbr_re) nbr_data <= nbr[nbr_addr];
  end
endmodule
