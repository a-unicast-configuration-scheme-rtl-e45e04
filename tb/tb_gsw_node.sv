// tb_gsw_node -- self-checking test of the global switch configuration
// node at three levels: LEVEL 2 (32-bit bus split into four 8-bit lanes),
// LEVEL 3 (64-bit bus split in halves) and LEVEL 6 (256-bit bus steered to
// one child by the route bit).  Random streams of control and data words,
// with P toggling, are checked cycle by cycle against a reference of the
// one-stage pipeline, and each switch's 96 configuration bits against the
// data words sent after a global control word naming its level.
module tb_gsw_node;
  import cfg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, p = 0, c = 0;
  logic [255:0] d = '0;
  int checks = 0, failures = 0;
  int n_steer [2];
  int n_idle = 0, n_cfg [3];

  logic [3:0] p2, c2; logic [3:0][7:0]   d2; logic [95:0] cfg2; logic o2;
  logic [1:0] p3, c3; logic [1:0][31:0]  d3; logic [95:0] cfg3; logic o3;
  logic [1:0] p6, c6; logic [1:0][255:0] d6; logic [95:0] cfg6; logic o6;

  gsw_node #(.LEVEL(2)) dut2 (.clk, .rst_n, .up_p(p), .up_c(c), .up_d(d[31:0]),
    .dn_p(p2), .dn_c(c2), .dn_d(d2), .cfg(cfg2), .open_o(o2));
  gsw_node #(.LEVEL(3)) dut3 (.clk, .rst_n, .up_p(p), .up_c(c), .up_d(d[63:0]),
    .dn_p(p3), .dn_c(c3), .dn_d(d3), .cfg(cfg3), .open_o(o3));
  gsw_node #(.LEVEL(6)) dut6 (.clk, .rst_n, .up_p(p), .up_c(c), .up_d(d),
    .dn_p(p6), .dn_c(c6), .dn_d(d6), .cfg(cfg6), .open_o(o6));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [95:0] rcfg [3];
  int          rptr [3];
  logic        ropen [3];
  logic        rsel;
  localparam int LV [3] = '{2, 3, 6};
  localparam int WD [3] = '{32, 64, 256};

  task automatic fail(input string s);
    failures++;
    $display("%s", s);
  endtask

  initial begin
    logic pp, pc, sel;
    logic [255:0] pd;
    for (int i = 0; i < 3; i++) begin rcfg[i] = '0; rptr[i] = 0; ropen[i] = 0; n_cfg[i] = 0; end
    n_steer[0] = 0; n_steer[1] = 0;
    rsel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 4000; n++) begin
      // stimulus
      p = ($urandom_range(31) != 0);
      c = ($urandom_range(4) == 0);
      for (int k = 0; k < 8; k++) d[32*k +: 32] = $urandom;
      if (c) begin
        case ($urandom_range(3))
          0: d[7:0] = global_ctrl(4'd2, 1'($urandom));
          1: d[7:0] = global_ctrl(4'd3, 1'($urandom));
          2: d[7:0] = global_ctrl(4'd6, 1'($urandom));
          default: ;
        endcase
      end
      pp = p; pc = c; pd = d;
      sel = pc ? pd[0] : rsel;
      @(posedge clk); #1;
      // reference update of the stores
      for (int i = 0; i < 3; i++) begin
        if (!pp) ropen[i] = 0;
        else if (pc) begin
          ropen[i] = pd[7] && (pd[6:3] == 4'(LV[i]));
          if (ropen[i]) rptr[i] = 0;
        end else if (ropen[i] && rptr[i] * WD[i] < 96) begin
          for (int b = 0; b < WD[i]; b++)
            if (rptr[i] * WD[i] + b < 96) rcfg[i][rptr[i] * WD[i] + b] = pd[b];
          rptr[i]++;
          if (rptr[i] * WD[i] >= 96) n_cfg[i]++;
        end
      end
      if (pp && pc) rsel = pd[0];
      // outputs of the three switches
      checks++;
      for (int k = 0; k < 4; k++)
        if (p2[k] !== pp || (pp && (c2[k] !== pc || d2[k] !== pd[8*k +: 8])) || (!pp && (c2[k] || d2[k] != 0)))
          fail($sformatf("n=%0d level 2 child %0d", n, k));
      checks++;
      for (int k = 0; k < 2; k++)
        if (p3[k] !== pp || (pp && (c3[k] !== pc || d3[k] !== pd[32*k +: 32])) || (!pp && (c3[k] || d3[k] != 0)))
          fail($sformatf("n=%0d level 3 child %0d", n, k));
      checks++;
      for (int k = 0; k < 2; k++) begin
        if (!pp) begin
          if (p6[k] || c6[k] || d6[k] != 0) fail($sformatf("n=%0d level 6 idle child %0d", n, k));
        end else if (sel == k[0]) begin
          if (!p6[k] || c6[k] !== pc || d6[k] !== pd) fail($sformatf("n=%0d level 6 routed child %0d", n, k));
          n_steer[k]++;
        end else begin
          if (!p6[k] || !c6[k] || d6[k] != 0) fail($sformatf("n=%0d level 6 other child %0d", n, k));
          n_idle++;
        end
      end
      checks++;
      if (cfg2 !== rcfg[0] || cfg3 !== rcfg[1] || cfg6 !== rcfg[2])
        fail($sformatf("n=%0d cfg mismatch", n));
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_cfg[i] == 0) fail($sformatf("switch %0d never fully configured", i));
    end
    checks++;
    if (n_steer[0] == 0 || n_steer[1] == 0 || n_idle == 0) fail("steering not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
