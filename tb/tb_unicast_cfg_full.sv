// tb_unicast_cfg_full -- end-to-end test of the configurable array at its
// default size: 32x32 cells, 511 global switches, 256-bit bus.  A full
// configuration must take 32 x 102 = 3264 cycles for the cells, local
// switches and in-group global switches, plus 2 cycles for each of the 31
// switches above the groups.  The test itself is in cfg_array_test.svh.
module tb_unicast_cfg_full;
  import cfg_pkg::*;
  localparam int unsigned LV = 10;
  localparam int unsigned RW = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  unicast_cfg_array dut (
    .clk, .rst_n, .cfg_p, .cfg_c, .cfg_d,
    .htree_in, .core_in, .core_out, .htree_out,
    .core_cfg, .lsw_cfg, .xp, .gsw_cfg
  );

`include "cfg_array_test.svh"
endmodule
