// tb_cell_cfg_ctrl -- self-checking test of the cell lane controller: random
// streams of control and data words with P toggling, against a reference
// model of which component is open, which start pulse fires and which
// write strobe is raised.
module tb_cell_cfg_ctrl;
  import cfg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, p = 0, c = 0;
  logic [7:0] d = '0;
  cell_tgt_e tgt, ref_tgt;
  logic [5:0] start, wr;
  int checks = 0, failures = 0;
  int n_open [6];
  int n_pclose = 0;

  cell_cfg_ctrl dut (.clk, .rst_n, .p, .c, .d, .tgt, .start, .wr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference decode, written from the control-word layout
  function automatic int ref_decode(input logic [7:0] w);
    if (w[7]) return 0;
    if (w[5]) return 1;
    if (w[4]) return w[3] ? 3 : 2;
    if (w[6]) return w[3] ? 5 : 4;
    return 0;
  endfunction

  initial begin
    int dec;
    logic [5:0] exp_s, exp_w;
    ref_tgt = TGT_NONE;
    foreach (n_open[i]) n_open[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      p = ($urandom_range(15) != 0);
      c = ($urandom_range(3) == 0);
      d = 8'($urandom);
      // make single-flag local words common
      if (c && $urandom_range(1)) d = {1'b0, 3'b001 << $urandom_range(2), 1'($urandom), 3'($urandom)};
      #1;
      dec = ref_decode(d);
      exp_s = '0; exp_w = '0;
      if (p && c && dec != 0) exp_s[dec] = 1'b1;
      if (p && !c && ref_tgt != TGT_NONE) exp_w[ref_tgt] = 1'b1;
      checks++;
      if (start !== exp_s || wr !== exp_w || tgt !== ref_tgt) begin
        failures++;
        $display("n=%0d p=%b c=%b d=%h: start %b/%b wr %b/%b tgt %0d/%0d", n, p, c, d,
                 start, exp_s, wr, exp_w, tgt, ref_tgt);
      end
      @(posedge clk); #1;
      if (!p) begin
        if (ref_tgt != TGT_NONE) n_pclose++;
        ref_tgt = TGT_NONE;
      end else if (c) begin
        ref_tgt = cell_tgt_e'(dec);
        n_open[dec]++;
      end
    end
    for (int i = 1; i < 6; i++) begin
      checks++;
      if (n_open[i] == 0) begin failures++; $display("target %0d never opened", i); end
    end
    checks++;
    if (n_pclose == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
