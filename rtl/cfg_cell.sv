// cfg_cell -- the configurable part of one reconfigurable cell, fed by the
// cell's 8-bit lane of the H-tree together with the pipelined P and C.
//
// It holds the lane controller (cell_cfg_ctrl), the 64x8 core configuration
// memory, the two internal I/O crossbars (input switch: H-tree lines to
// core inputs; output switch: core outputs to the lines going back up) and
// the configuration stores of the two local mesh switches this cell owns
// (towards its east and south neighbours).  A full configuration of a cell
// is 3 control words and 64 + 8 + 8 data words, 83 cycles, plus 2 x (1 + 3)
// cycles for the two local switches.  The processing core itself and the
// mesh switch cross-points are outside this design: their configuration
// bits are outputs.
//
// While P is high both crossbars add their default cross-points, which
// connect H-tree lines 0 and 1 of the lane to output rows 0 and 1.
//
// Timing: all stores are written on the rising clk edge in the cycle the
// data word is on the lane.
module cfg_cell
  import cfg_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   p,
  input  logic                   c,
  input  logic [LANE_W-1:0]      d,
  // datapath of the two I/O switches
  input  logic [7:0]             htree_in,   // lines from the H-tree
  output logic [7:0]             core_in,    // to the processing core
  input  logic [7:0]             core_out,   // from the processing core
  output logic [7:0]             htree_out,  // lines back to the H-tree
  // configuration visible to the parts outside this design
  output logic [7:0]             core_cfg [CORE_WORDS],
  output logic [1:0][LSW_BITS-1:0] lsw_cfg,
  output logic [1:0][7:0][7:0]   xp,         // cross-points of both switches
  output cell_tgt_e              tgt
);

  logic [5:0] start, wr;

  cell_cfg_ctrl u_ctrl (
    .clk, .rst_n, .p, .c, .d, .tgt, .start, .wr
  );

  core_cfg_mem #(.DEPTH(CORE_WORDS), .W(LANE_W)) u_core_mem (
    .clk, .rst_n, .start(start[TGT_CORE]), .wr(wr[TGT_CORE]), .wd(d),
    .cfg(core_cfg)
  );

  xbar8_cfg #(.LINE_W(1)) u_sw0 (
    .clk, .rst_n, .p, .wr(wr[TGT_SW0]), .wd(d),
    .in_l(htree_in), .dflt_in(d[1:0]), .out_l(core_in), .xp(xp[0])
  );

  xbar8_cfg #(.LINE_W(1)) u_sw1 (
    .clk, .rst_n, .p, .wr(wr[TGT_SW1]), .wd(d),
    .in_l(core_out), .dflt_in(d[1:0]), .out_l(htree_out), .xp(xp[1])
  );

  for (genvar k = 0; k < 2; k++) begin : g_lsw
    cfg_word_reg #(.NBITS(LSW_BITS), .W(LANE_W)) u_lsw (
      .clk, .rst_n,
      .start(start[TGT_LSW0 + k]), .wr(wr[TGT_LSW0 + k]), .wd(d),
      .cfg(lsw_cfg[k])
    );
  end

endmodule
