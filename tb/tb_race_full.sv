// tb_race_full: end-to-end test of race_top with every parameter at its
// default (131072-vertex partition, 256 PE groups = 4096 MACs, 65536-line
// IF_Buffer), processing the same four snapshots of a 64-vertex graph as
// tb_race_top. See race_tb_body.svh.
module tb_race_full;
  import race_pkg::*;
  localparam int P_NV = 131072, P_NE = 65536, P_NLAYER = 3, P_NGROUP = 256;
  localparam bit SMALL = 1'b0;
  `include "race_tb_body.svh"

  race_top dut (.*);
endmodule
