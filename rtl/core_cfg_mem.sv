// core_cfg_mem -- configuration memory of one cell processing core: 64
// words of 8 bits (512 bits), filled in 64 consecutive data words.
//
// The control word that opens the core rewinds the write address (start);
// every data word then goes to the next address.  Words past the 64th are
// ignored.  The 64x8 size and the one-word-per-cycle loading follow the
// document; the implicit incrementing address and the reset are this
// design's choices (the document does not say how the core memory is
// addressed).  The whole memory is visible on cfg for the core, whose
// logic is outside this design.
//
// Timing: start and wr act on the rising clk edge.
module core_cfg_mem #(
  parameter int unsigned DEPTH = 64,  // words
  parameter int unsigned W     = 8    // bits per word
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         wr,
  input  logic [W-1:0] wd,
  output logic [W-1:0] cfg [DEPTH]
);

  localparam int unsigned A_W = $clog2(DEPTH + 1);

  logic [A_W-1:0] addr;
  logic [W-1:0]   mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else if (start) addr <= '0;
    else if (wr && addr < A_W'(DEPTH)) addr <= addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!start && wr && addr < A_W'(DEPTH))
      mem[addr[$clog2(DEPTH)-1:0]] <= wd;
  end

  assign cfg = mem;

endmodule
