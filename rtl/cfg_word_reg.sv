// cfg_word_reg -- configuration store of a switch whose cross-point bits are
// loaded as a sequence of data words: the 20-bit local mesh switch (three
// 8-bit words) and the 96-bit global switch (as many words of its input bus
// width as 96 bits need).
//
// A start pulse (the control word that opens this component) rewinds the
// word pointer.  Each following wr cycle stores the word at the pointer and
// advances it: word 0 fills bits [W-1:0], word 1 bits [2W-1:W], and so on;
// bits of the last word past NBITS are dropped, and words past the last are
// ignored.  The word-after-word loading follows the document; the bit order
// and the ignoring of surplus words are this design's choices.
//
// Timing: start and wr act on the rising clk edge; cfg shows the new bits
// the cycle after.  start and wr in the same cycle: start wins.  Reset
// clears the store.
module cfg_word_reg #(
  parameter int unsigned NBITS = 20,  // configuration bits of the switch
  parameter int unsigned W     = 8    // width of one data word
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,   // component opened: rewind
  input  logic             wr,      // data word for this component
  input  logic [W-1:0]     wd,
  output logic [NBITS-1:0] cfg
);

  localparam int unsigned NWORDS = (NBITS + W - 1) / W;
  localparam int unsigned PTR_W  = $clog2(NWORDS + 1);

  logic [PTR_W-1:0] ptr;
  logic [NWORDS*W-1:0] store;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr   <= '0;
      store <= '0;
    end else if (start) begin
      ptr <= '0;
    end else if (wr && ptr < PTR_W'(NWORDS)) begin
      store[ptr*W +: W] <= wd;
      ptr <= ptr + 1'b1;
    end
  end

  assign cfg = store[NBITS-1:0];

endmodule
