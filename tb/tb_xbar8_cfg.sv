// tb_xbar8_cfg -- self-checking test of the 8x8 cell I/O crossbar: random
// row writes, all-rows writes and clears against a reference cross-point
// table, then the datapath (OR of selected inputs, plus the two default
// cross-points while P is high) against values computed from that table.
module tb_xbar8_cfg;
  import cfg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, p = 1'b1, wr = 1'b0;
  logic [7:0] wd = '0;
  logic [7:0] in_l = '0, out_l;
  logic [1:0] dflt_in = '0;
  logic [7:0][7:0] xp;
  logic [7:0] ref_xp [8];
  int checks = 0, failures = 0;
  int n_allrows = 0, n_clear = 0, n_dflt = 0;

  xbar8_cfg #(.LINE_W(1)) dut (
    .clk, .rst_n, .p, .wr, .wd, .in_l, .dflt_in, .out_l, .xp
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input logic [7:0] w);
    wd = w; wr = 1'b1;
    @(posedge clk); #1;
    wr = 1'b0;
    for (int r = 0; r < 8; r++)
      if (w[6] || w[5:3] == r[2:0])
        ref_xp[r] = w[7] ? 8'h00 : (8'b1 << w[2:0]);
    if (w[6]) n_allrows++;
    if (w[7]) n_clear++;
  endtask

  task automatic check_all();
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (xp[r] !== ref_xp[r]) begin
        failures++;
        $display("xp row %0d = %h, expected %h", r, xp[r], ref_xp[r]);
      end
    end
    for (int t = 0; t < 4; t++) begin
      logic [7:0] expv;
      in_l = 8'($urandom); dflt_in = 2'($urandom); p = 1'($urandom);
      #1;
      for (int r = 0; r < 8; r++) begin
        expv[r] = |(ref_xp[r] & in_l);
        if (p && r < 2) expv[r] = expv[r] | dflt_in[r];
      end
      if (p && (dflt_in != 0)) n_dflt++;
      checks++;
      if (out_l !== expv) begin
        failures++;
        $display("out %b, expected %b (in %b dflt %b p %b)", out_l, expv, in_l, dflt_in, p);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 8; r++) ref_xp[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check_all();
    // one row per word: eight words program the switch
    for (int r = 0; r < 8; r++) write_word({2'b00, r[2:0], 3'($urandom)});
    check_all();
    // random words, including all-rows and clear
    for (int n = 0; n < 300; n++) begin
      logic [7:0] w;
      w = 8'($urandom);
      if ($urandom_range(3) != 0) w[7:6] = 2'b00;
      write_word(w);
      check_all();
    end
    // whole switch off in one word
    write_word(8'hC0);
    check_all();
    checks++;
    if (n_allrows == 0 || n_clear == 0 || n_dflt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
