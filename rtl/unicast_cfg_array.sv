// unicast_cfg_array -- a square array of reconfigurable cells (32x32 by
// default) under a binary H-tree of global switches, configured top-down
// through the tree's own downstream bus.
//
// The configuration source (an on-chip cache, or a narrower host port that
// uses only some lanes) drives a BUS_W-bit word plus the two global
// signals P (programming mode) and C (control word) every clock.  An input
// register stage takes them in; from there each global switch (gsw_node)
// adds one pipeline stage.  Switches above the 32-cell group level steer a
// word to one group; inside a group the bus is split so that lane k reaches
// cell k.  LEVELS-1 switch levels lie between the input register and the
// cells (the four cells under a LEVEL 2 switch hang on it directly), so a
// word reaches its cells LEVELS clocks after it is presented: 10 for the
// default array.  Cells (cfg_cell) and global switches open on the control
// word that names them and store the data words that follow.  Global
// switch numbering: heap order, index 0 is the root, the children of index
// n are 2n+1 and 2n+2.  Cell numbering: depth-first order of the tree, so
// cells 32g .. 32g+31 form group g.
//
// The cell cores, the mesh (local) switch cross-points and the global
// switch cross-point networks are outside this design; their configuration
// bits are outputs.  The crossbar datapaths of every cell are ports.
//
// Array size, 256-bit bus, 8 bits per cell and 32 cells per bus word follow
// the document; the numbering and the input register are this design's.
module unicast_cfg_array
  import cfg_pkg::*;
#(
  parameter int unsigned LEVELS = 10,     // log2(number of cells), >= 2
  parameter int unsigned ROOT_W = BUS_W,  // root bus width, 8 x cells per group
  localparam int unsigned NCELL = 1 << LEVELS,
  localparam int unsigned NSW   = NCELL / 2 - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration source
  input  logic                    cfg_p,
  input  logic                    cfg_c,
  input  logic [ROOT_W-1:0]       cfg_d,
  // cell I/O switch datapaths
  input  logic [7:0]              htree_in  [NCELL],
  output logic [7:0]              core_in   [NCELL],
  input  logic [7:0]              core_out  [NCELL],
  output logic [7:0]              htree_out [NCELL],
  // configuration bits of the parts outside this design
  output logic [7:0]              core_cfg  [NCELL][CORE_WORDS],
  output logic [1:0][LSW_BITS-1:0] lsw_cfg  [NCELL],
  output logic [1:0][7:0][7:0]    xp        [NCELL],
  output logic [GSW_BITS-1:0]     gsw_cfg   [NSW]
);

  // node inputs in heap order (index 0 = root); widths up to ROOT_W
  logic              nd_p [NSW];
  logic              nd_c [NSW];
  logic [ROOT_W-1:0] nd_d [NSW];
  // cell lanes
  logic              cl_p [NCELL];
  logic              cl_c [NCELL];
  logic [LANE_W-1:0] cl_d [NCELL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nd_p[0] <= 1'b0;
      nd_c[0] <= 1'b0;
      nd_d[0] <= '0;
    end else begin
      nd_p[0] <= cfg_p;
      nd_c[0] <= cfg_c;
      nd_d[0] <= cfg_d;
    end
  end

  for (genvar l = LEVELS; l >= 2; l--) begin : g_lvl
    localparam int unsigned GRP  = $clog2(ROOT_W / LANE_W);
    localparam int unsigned IN_W = (l > GRP) ? ROOT_W : (LANE_W << l);
    localparam int unsigned NCH  = (l == 2) ? 4 : 2;
    localparam int unsigned CH_W = (l > GRP) ? IN_W : IN_W / NCH;
    for (genvar j = 0; j < (NCELL >> l); j++) begin : g_sw
      localparam int unsigned ID = (1 << (LEVELS - l)) - 1 + j;
      logic [NCH-1:0]           dp, dc;
      logic [NCH-1:0][CH_W-1:0] dd;
      logic                     open_q;

      gsw_node #(.LEVEL(l), .ROOT_W(ROOT_W)) u_sw (
        .clk, .rst_n,
        .up_p(nd_p[ID]), .up_c(nd_c[ID]), .up_d(nd_d[ID][IN_W-1:0]),
        .dn_p(dp), .dn_c(dc), .dn_d(dd),
        .cfg(gsw_cfg[ID]), .open_o(open_q)
      );

      for (genvar k = 0; k < NCH; k++) begin : g_ch
        if (l > 2) begin : g_node
          assign nd_p[2*ID+1+k] = dp[k];
          assign nd_c[2*ID+1+k] = dc[k];
          assign nd_d[2*ID+1+k] = ROOT_W'(dd[k]);
        end else begin : g_cell
          assign cl_p[4*j+k] = dp[k];
          assign cl_c[4*j+k] = dc[k];
          assign cl_d[4*j+k] = dd[k];
        end
      end
    end
  end

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    cell_tgt_e tgt;
    cfg_cell u_cell (
      .clk, .rst_n,
      .p(cl_p[i]), .c(cl_c[i]), .d(cl_d[i]),
      .htree_in(htree_in[i]), .core_in(core_in[i]),
      .core_out(core_out[i]), .htree_out(htree_out[i]),
      .core_cfg(core_cfg[i]), .lsw_cfg(lsw_cfg[i]), .xp(xp[i]), .tgt
    );
  end

endmodule
