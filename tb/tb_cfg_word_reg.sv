// tb_cfg_word_reg -- self-checking test of the word-loaded switch
// configuration store, as a 20-bit local switch (8-bit words, 3 words) and
// as a 96-bit global switch on a 32-bit bus (3 words): full loads, surplus
// words, a reload after a new start, and data words with no start.
module tb_cfg_word_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s8 = 0, w8 = 0, s32 = 0, w32 = 0;
  logic [7:0]  d8 = '0;
  logic [31:0] d32 = '0;
  logic [19:0] cfg20;
  logic [95:0] cfg96;
  int checks = 0, failures = 0;

  cfg_word_reg #(.NBITS(20), .W(8))  dut_l (.clk, .rst_n, .start(s8),  .wr(w8),  .wd(d8),  .cfg(cfg20));
  cfg_word_reg #(.NBITS(96), .W(32)) dut_g (.clk, .rst_n, .start(s32), .wr(w32), .wd(d32), .cfg(cfg96));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk20(input logic [19:0] e);
    checks++;
    if (cfg20 !== e) begin failures++; $display("cfg20 %h exp %h", cfg20, e); end
  endtask
  task automatic chk96(input logic [95:0] e);
    checks++;
    if (cfg96 !== e) begin failures++; $display("cfg96 %h exp %h", cfg96, e); end
  endtask

  initial begin
    logic [23:0] v24;
    logic [95:0] v96;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk20('0); chk96('0);
    for (int rep = 0; rep < 20; rep++) begin
      v24 = 24'($urandom); v96 = {$urandom, $urandom, $urandom};
      s8 = 1; s32 = 1; @(posedge clk); #1; s8 = 0; s32 = 0;
      for (int k = 0; k < 3; k++) begin
        w8 = 1; d8 = v24[8*k +: 8]; w32 = 1; d32 = v96[32*k +: 32];
        @(posedge clk); #1;
      end
      // surplus words must not change anything
      d8 = 8'($urandom); d32 = $urandom;
      @(posedge clk); #1;
      w8 = 0; w32 = 0;
      chk20(v24[19:0]); chk96(v96);
      // partial reload: start then one word only replaces word 0
      s8 = 1; @(posedge clk); #1; s8 = 0;
      w8 = 1; d8 = 8'($urandom); @(posedge clk); #1; w8 = 0;
      chk20({v24[19:8], d8});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
