// tb_unicast_cfg_array -- end-to-end test of the configurable array at a
// reduced size: 128 cells (four 32-cell groups, two levels of steering
// switches) on the 256-bit bus.  The test itself is in cfg_array_test.svh.
module tb_unicast_cfg_array;
  import cfg_pkg::*;
  localparam int unsigned LV = 7;
  localparam int unsigned RW = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  unicast_cfg_array #(.LEVELS(LV), .ROOT_W(RW)) dut (
    .clk, .rst_n, .cfg_p, .cfg_c, .cfg_d,
    .htree_in, .core_in, .core_out, .htree_out,
    .core_cfg, .lsw_cfg, .xp, .gsw_cfg
  );

`include "cfg_array_test.svh"
endmodule
