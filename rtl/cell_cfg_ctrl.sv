// cell_cfg_ctrl -- data-gate controller of one cell: it watches the cell's
// 8-bit lane of the H-tree and decides which of the cell's five
// configurable components (core memory, I/O switch 0 and 1, local mesh
// switch 0 and 1) the following data words are meant for.
//
// With P high, a word with C high is a control word.  A local control word
// (G=0) opens the component its flag names (cell core, cell switch or local
// switch; SEL picks one of the two switches) and closes the one opened
// before; any other control word, global ones included, closes them all.
// A word with C low is a data word and is steered to the open component.
// P low closes everything: the cell is then in normal operation.  Opening,
// closing by the next control word and the flag meanings follow the
// document; SEL and the priority core > switch > local switch when several
// flags are set are this design's choices.
//
// Timing: start_* is high in the cycle the opening control word is on the
// lane, wr_* in each cycle a data word is on it; both are combinational from
// the lane inputs and the registered open target.
module cell_cfg_ctrl
  import cfg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              p,
  input  logic              c,
  input  logic [LANE_W-1:0] d,
  output cell_tgt_e         tgt,      // open component
  output logic [5:0]        start,    // one per cell_tgt_e value
  output logic [5:0]        wr        // one per cell_tgt_e value
);

  cell_tgt_e next_tgt;

  always_comb begin
    next_tgt = decode_local(d);
    start = '0;
    wr    = '0;
    if (p && c)  start[next_tgt] = 1'b1;
    if (p && !c) wr[tgt] = 1'b1;
    start[TGT_NONE] = 1'b0;
    wr[TGT_NONE]    = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     tgt <= TGT_NONE;
    else if (!p)    tgt <= TGT_NONE;
    else if (c)     tgt <= next_tgt;
  end

  // at most one component is opened or written in a cycle, and data is
  // only written while the component is open
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(start));
  a_one_wr:    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr));
  a_wr_open:   assert property (@(posedge clk) disable iff (!rst_n) (wr != '0) |-> (p && !c));

endmodule
