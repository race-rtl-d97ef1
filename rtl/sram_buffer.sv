// sram_buffer: one on-chip SRAM buffer (GS_Buffer, DQ_Buffer, IB_Buffer,
// UVQ_Buffer, FT_Buffer, IQ_Buffer and the IF_Buffer data and tag arrays are
// all instances of it). A simple dual-port RAM: one synchronous write port and
// one read port whose data appears one cycle after the address (SRAM macro
// timing). Contents are not reset; every user writes an entry before reading
// it. Sizes come from the instantiating block. The set of eight buffers and
// their capacities follow the document; the port count, the one-cycle read
// latency and the "hold data while re is low" behaviour are this design's.
module sram_buffer #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
