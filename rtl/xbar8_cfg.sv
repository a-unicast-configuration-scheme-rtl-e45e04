// xbar8_cfg -- cell internal I/O switch: a full 8x8 crossbar whose 64
// cross-point bits are written through a row decoder and a column decoder.
//
// Each configuration data word (8 bits) programs output rows:
//   [2:0] column number  -> 3-to-8 column decoder, drives the bit lines
//   [5:3] row number     -> 3-to-8 row decoder, drives the word lines
//   [6]   all rows       -> every word line is raised, all rows are written
//   [7]   clear          -> the column decoder drives '0' on every bit line
// So a word connects output row R to input column C and disconnects every
// other input from row R, or (clear) turns a whole row off; clear together
// with all-rows turns the whole switch off in one cycle.  Eight words
// program the eight rows.  The decoders, the 6-bit row/column code and the
// two extra bits follow the document; the order of the fields in the word
// is this design's choice.
//
// Datapath: output row r is the OR of the inputs whose cross-point is set
// (a pass gate per cross-point, wired together).  Two extra cross-points,
// active only while P is high, connect the two H-tree lines dflt_in[0] and
// dflt_in[1] to rows 0 and 1: the default connection used while the array
// is being programmed.  Which rows they drive is this design's reading of
// the crossbar drawing.
//
// Timing: a write (wr high on a rising clk edge) takes effect on that edge;
// the datapath is combinational.  Reset clears every cross-point (the
// storage is SRAM in the document; a reset is this design's addition so
// that an unprogrammed switch is known to be off).
module xbar8_cfg
  import cfg_pkg::*;
#(
  parameter int unsigned LINE_W = 1   // width of one crossbar line
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          p,        // programming mode
  input  logic                          wr,       // data word for this switch
  input  logic [LANE_W-1:0]             wd,       // the data word
  input  logic [7:0][LINE_W-1:0]        in_l,     // input columns
  input  logic [1:0][LINE_W-1:0]        dflt_in,  // H-tree lines for default
  output logic [7:0][LINE_W-1:0]        out_l,    // output rows
  output logic [7:0][7:0]               xp        // cross-point bits [row][col]
);

  logic [7:0] row_sel;  // word lines
  logic [7:0] col_val;  // bit lines

  always_comb begin
    row_sel = wd[XB_ALLROWS] ? 8'hFF : (8'b1 << wd[XB_ROW_LO +: 3]);
    col_val = wd[XB_CLEAR]   ? 8'h00 : (8'b1 << wd[XB_COL_LO +: 3]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xp <= '0;
    end else if (wr) begin
      for (int r = 0; r < 8; r++)
        if (row_sel[r]) xp[r] <= col_val;
    end
  end

  always_comb begin
    for (int r = 0; r < 8; r++) begin
      out_l[r] = '0;
      for (int c = 0; c < 8; c++)
        if (xp[r][c]) out_l[r] = out_l[r] | in_l[c];
      if (p && r < 2) out_l[r] = out_l[r] | dflt_in[r];
    end
  end

endmodule
