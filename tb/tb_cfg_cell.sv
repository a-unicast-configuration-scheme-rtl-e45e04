// tb_cfg_cell -- self-checking test of one cell's configuration: the full
// sequence (core 1+64, I/O switch 0 1+8, I/O switch 1 1+8, local switches
// 2 x (1+3)) is streamed on the lane, its cycle count is checked against
// 83 + 8, and every store and both crossbar datapaths are checked against
// the data sent.  A global control word followed by data must leave the
// cell untouched, and the default cross-points must pass lane bits 1:0
// while P is high.
module tb_cfg_cell;
  import cfg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, p = 0, c = 0;
  logic [7:0] d = '0;
  logic [7:0] htree_in = '0, core_in, core_out = '0, htree_out;
  logic [7:0] core_cfg [CORE_WORDS];
  logic [1:0][LSW_BITS-1:0] lsw_cfg;
  logic [1:0][7:0][7:0] xp;
  cell_tgt_e tgt;
  int checks = 0, failures = 0, cycles = 0;

  logic [7:0] ref_core [64];
  logic [2:0] ref_sel [2][8];
  logic [23:0] ref_lsw [2];

  cfg_cell dut (.clk, .rst_n, .p, .c, .d, .htree_in, .core_in, .core_out,
                .htree_out, .core_cfg, .lsw_cfg, .xp, .tgt);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic cw, input logic [7:0] w);
    p = 1; c = cw; d = w;
    @(posedge clk); #1;
    cycles++;
  endtask

  task automatic check_cfg();
    for (int a = 0; a < 64; a++) begin
      checks++;
      if (core_cfg[a] !== ref_core[a]) begin failures++; $display("core[%0d] %h exp %h", a, core_cfg[a], ref_core[a]); end
    end
    for (int s = 0; s < 2; s++) begin
      checks++;
      if (lsw_cfg[s] !== ref_lsw[s][19:0]) begin failures++; $display("lsw%0d %h exp %h", s, lsw_cfg[s], ref_lsw[s][19:0]); end
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (xp[s][r] !== (8'b1 << ref_sel[s][r])) begin failures++; $display("xp%0d[%0d] %b", s, r, xp[s][r]); end
      end
    end
  endtask

  task automatic check_datapath(input logic pm);
    for (int t = 0; t < 8; t++) begin
      logic [7:0] e0, e1;
      htree_in = 8'($urandom); core_out = 8'($urandom);
      #1;
      for (int r = 0; r < 8; r++) begin
        e0[r] = htree_in[ref_sel[0][r]];
        e1[r] = core_out[ref_sel[1][r]];
        if (pm && r < 2) begin e0[r] |= d[r]; e1[r] |= d[r]; end
      end
      checks++;
      if (core_in !== e0 || htree_out !== e1) begin
        failures++; $display("datapath %b/%b exp %b/%b", core_in, htree_out, e0, e1);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) ref_core[a] = 8'($urandom);
    for (int s = 0; s < 2; s++) begin
      ref_lsw[s] = 24'($urandom);
      for (int r = 0; r < 8; r++) ref_sel[s][r] = 3'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    cycles = 0;
    send(1, 8'b0010_0000);                       // open cell core
    for (int a = 0; a < 64; a++) send(0, ref_core[a]);
    send(1, 8'b0001_0000);                       // open I/O switch 0
    for (int r = 0; r < 8; r++) send(0, {2'b00, r[2:0], ref_sel[0][r]});
    send(1, 8'b0001_1000);                       // open I/O switch 1
    for (int r = 0; r < 8; r++) send(0, {2'b00, r[2:0], ref_sel[1][r]});
    checks++;
    if (cycles != 83) begin failures++; $display("cell took %0d cycles, expected 83", cycles); end
    for (int s = 0; s < 2; s++) begin
      send(1, {4'b0100, s[0], 3'b000});         // open local switch s
      for (int k = 0; k < 3; k++) send(0, ref_lsw[s][8*k +: 8]);
    end
    checks++;
    if (cycles != 91) begin failures++; $display("cell + local took %0d cycles", cycles); end
    // global control word and its data: the cell stays closed
    send(1, global_ctrl(4'd2, 1'b0));
    checks++;
    if (tgt != TGT_NONE) failures++;
    for (int k = 0; k < 12; k++) send(0, 8'($urandom));
    check_cfg();
    // default cross-points while P is high
    d = 8'b0000_0011; c = 1;
    check_datapath(1'b1);
    p = 0; c = 0; d = 8'hFF;
    @(posedge clk); #1;
    check_datapath(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
