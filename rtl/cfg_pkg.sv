// cfg_pkg -- constants and helpers shared by the configuration path of the
// two-level reconfigurable array.
//
// Every bus of the H-tree carries, next to its data bits, two global signals
// that travel with it through the pipeline: P (programming mode) and C
// (the word on the bus is a control word, not configuration data).  The data
// bits are cut into 8-bit lanes; lane k of the root bus ends at cell k of
// its 32-cell group.  A control word is read per lane:
//
//   global form   : [7] G=1, [6:3] level of the addressed global switches,
//                   [2:0] reserved (bit 0 of lanes 0..4 is the route bit used
//                   by the switches above the 32-cell group level)
//   local form    : [7] G=0, [6] local switch, [5] cell core,
//                   [4] cell I/O switch, [3] SEL (which of the two I/O or
//                   local switches), [2:0] reserved as above
//
// The G, local switch, cell core and cell switch flags and their order come
// from the document's control-word figures; the level field width, the SEL
// bit and the route bits are this design's own choices.  A control word with
// all lane bits zero addresses nothing and only closes open components; it
// serves as the idle word.
package cfg_pkg;

  localparam int unsigned LANE_W     = 8;    // per-cell bus width
  localparam int unsigned BUS_W      = 256;  // root downstream bus (4x64)
  localparam int unsigned GSW_BITS   = 96;   // cross-points of a global switch
  localparam int unsigned LSW_BITS   = 20;   // cross-points of a local switch
  localparam int unsigned CORE_WORDS = 64;   // 64x8 core configuration memory

  // control word bit positions (within a lane)
  localparam int unsigned B_G    = 7;
  localparam int unsigned B_LSW  = 6;
  localparam int unsigned B_CORE = 5;
  localparam int unsigned B_SW   = 4;
  localparam int unsigned B_SEL  = 3;
  localparam int unsigned B_ROUTE = 0;
  localparam int unsigned LVL_LO = 3;
  localparam int unsigned LVL_W  = 4;

  // crossbar data word (cell I/O switch), Fig. 3 decoders plus two extra bits
  localparam int unsigned XB_COL_LO  = 0;  // [2:0] column (input) number
  localparam int unsigned XB_ROW_LO  = 3;  // [5:3] row (output) number
  localparam int unsigned XB_ALLROWS = 6;  // write every row at once
  localparam int unsigned XB_CLEAR   = 7;  // write '0' to the whole row

  // component of a cell whose data gate is open
  typedef enum logic [2:0] {
    TGT_NONE = 3'd0,
    TGT_CORE = 3'd1,
    TGT_SW0  = 3'd2,
    TGT_SW1  = 3'd3,
    TGT_LSW0 = 3'd4,
    TGT_LSW1 = 3'd5
  } cell_tgt_e;

  function automatic logic [LANE_W-1:0] global_ctrl(input logic [LVL_W-1:0] level,
                                                    input logic route);
    global_ctrl = '0;
    global_ctrl[B_G] = 1'b1;
    global_ctrl[LVL_LO +: LVL_W] = level;
    global_ctrl[B_ROUTE] = route;
  endfunction

  function automatic cell_tgt_e decode_local(input logic [LANE_W-1:0] w);
    if (w[B_G])         decode_local = TGT_NONE;
    else if (w[B_CORE]) decode_local = TGT_CORE;
    else if (w[B_SW])   decode_local = w[B_SEL] ? TGT_SW1 : TGT_SW0;
    else if (w[B_LSW])  decode_local = w[B_SEL] ? TGT_LSW1 : TGT_LSW0;
    else                decode_local = TGT_NONE;
  endfunction

endpackage
