// tb_race_top: end-to-end test of race_top at reduced sizes (64-vertex
// partition, 4 PE groups, a 16-line IF_Buffer and a 160-entry UVQ) so that
// cache evictions, bypasses and UVQ overflow all occur. See race_tb_body.svh.
module tb_race_top;
  import race_pkg::*;
  localparam int P_NV = 64, P_NE = 512, P_NLAYER = 3, P_NGROUP = 4;
  localparam bit SMALL = 1'b1;
  `include "race_tb_body.svh"

  race_top #(.NV(P_NV), .NE(P_NE), .NLAYER(P_NLAYER), .NGROUP(P_NGROUP),
             .UVQ_DEPTH(160), .IF_LINES(16)) dut (.*);
endmodule
