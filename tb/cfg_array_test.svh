// cfg_array_test.svh -- body shared by the array testbenches.  The including
// module declares localparams LV (log2 cells) and RW (root bus width), the
// clock, and instantiates unicast_cfg_array as dut with those sizes.
//
// Test: a full configuration of every cell (core, both I/O switches, both
// local switches) and every global switch, group by group, with the
// expected cycle count; a check of every configuration bit; a check of the
// crossbar datapaths in normal operation; a check of the default
// cross-points while P is high; then a partial reconfiguration of the
// global switches only, after which the new global bits and the unchanged
// cell bits are checked.  All data comes from a hash of the position, so the
// expected values are recomputed rather than stored.

  localparam int unsigned NC   = 1 << LV;
  localparam int unsigned GRPL = $clog2(RW / 8);
  localparam int unsigned NG   = NC >> GRPL;        // cell groups
  localparam int unsigned NL   = RW / 8;            // lanes
  localparam int unsigned NS   = NC / 2 - 1;        // global switches

  logic rst_n = 1'b0;
  logic cfg_p = 1'b0, cfg_c = 1'b0;
  logic [RW-1:0] cfg_d = '0;
  logic [7:0] htree_in [NC];
  logic [7:0] core_in [NC];
  logic [7:0] core_out [NC];
  logic [7:0] htree_out [NC];
  logic [7:0] core_cfg [NC][64];
  logic [1:0][19:0] lsw_cfg [NC];
  logic [1:0][7:0][7:0] xp [NC];
  logic [95:0] gsw_cfg [NS];

  int checks = 0, failures = 0, words = 0;
  // how often each mechanism happened
  int n_core = 0, n_sw = 0, n_lsw = 0, n_glob_in = 0, n_glob_above = 0;
  int n_route1 = 0, n_dflt = 0, n_partial = 0, n_oper = 0;

  function automatic logic [31:0] hsh(input int unsigned a, input int unsigned b);
    logic [31:0] x;
    x = a * 32'h9E3779B1 ^ (b + 32'h7F4A7C15) * 32'h85EBCA6B;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  function automatic logic [7:0] core_byte(input int unsigned ci, input int unsigned a);
    return hsh(ci, 1000 + a)[7:0];
  endfunction
  function automatic logic [2:0] xsel(input int unsigned ci, input int unsigned s, input int unsigned r);
    return hsh(ci, 2000 + 8 * s + r)[2:0];
  endfunction
  function automatic logic [23:0] lsw_val(input int unsigned ci, input int unsigned s);
    return hsh(ci, 3000 + s)[23:0];
  endfunction
  function automatic logic [95:0] gsw_val(input int unsigned id, input int unsigned ver);
    return {hsh(id, 4000 + ver), hsh(id, 5000 + ver), hsh(id, 6000 + ver)};
  endfunction

  // route bits for group g: bit h-1 of g in bit 0 of lane h-1
  function automatic logic [RW-1:0] route(input int unsigned g);
    logic [RW-1:0] r;
    r = '0;
    for (int h = 0; h < LV - GRPL; h++) r[8 * h] = g[h];
    return r;
  endfunction

  function automatic logic [RW-1:0] all_lanes(input logic [7:0] w);
    logic [RW-1:0] r;
    for (int k = 0; k < NL; k++) r[8 * k +: 8] = w;
    return r;
  endfunction

  task automatic send(input logic c, input logic [RW-1:0] w);
    cfg_p = 1'b1; cfg_c = c; cfg_d = w;
    @(posedge clk); #1;
    words++;
  endtask

  // global switches of group g (levels 2 .. GRPL), version ver
  task automatic config_group_globals(input int unsigned g, input int unsigned ver);
    for (int l = 2; l <= GRPL; l++) begin
      int unsigned inw, nsub, nw;
      inw  = 8 << l;
      nsub = RW / inw;
      nw   = (96 + inw - 1) / inw;
      send(1'b1, all_lanes(global_ctrl(4'(l), 1'b0)) | route(g));
      for (int w = 0; w < nw; w++) begin
        logic [RW-1:0] dw;
        dw = '0;
        for (int s = 0; s < nsub; s++) begin
          int unsigned id;
          logic [95:0] v;
          logic [511:0] vx;
          id = (1 << (LV - l)) - 1 + g * nsub + s;
          v  = gsw_val(id, ver);
          vx = 512'(v);
          for (int b = 0; b < inw; b++) dw[s * inw + b] = vx[w * inw + b];
        end
        send(1'b0, dw);
      end
      n_glob_in++;
    end
  endtask

  // global switches above the group level, one at a time
  task automatic config_upper_globals(input int unsigned ver);
    for (int l = GRPL + 1; l <= LV; l++)
      for (int j = 0; j < (NC >> l); j++) begin
        int unsigned id, g;
        id = (1 << (LV - l)) - 1 + j;
        g  = j << (l - GRPL);
        send(1'b1, all_lanes(global_ctrl(4'(l), 1'b0)) | route(g));
        send(1'b0, RW'(gsw_val(id, ver)));
        n_glob_above++;
      end
  endtask

  task automatic config_group_cells(input int unsigned g);
    logic [RW-1:0] dw;
    send(1'b1, all_lanes(8'b0010_0000) | route(g));           // cell cores
    for (int a = 0; a < 64; a++) begin
      for (int k = 0; k < NL; k++) dw[8 * k +: 8] = core_byte(NL * g + k, a);
      send(1'b0, dw);
    end
    n_core++;
    for (int s = 0; s < 2; s++) begin                          // I/O switches
      send(1'b1, all_lanes({4'b0001, s[0], 3'b000}) | route(g));
      for (int r = 0; r < 8; r++) begin
        for (int k = 0; k < NL; k++) dw[8 * k +: 8] = {2'b00, r[2:0], xsel(NL * g + k, s, r)};
        send(1'b0, dw);
      end
      n_sw++;
    end
    for (int s = 0; s < 2; s++) begin                          // local switches
      logic [23:0] v [NL];
      for (int k = 0; k < NL; k++) v[k] = lsw_val(NL * g + k, s);
      send(1'b1, all_lanes({4'b0100, s[0], 3'b000}) | route(g));
      for (int w = 0; w < 3; w++) begin
        for (int k = 0; k < NL; k++) dw[8 * k +: 8] = v[k][8 * w +: 8];
        send(1'b0, dw);
      end
      n_lsw++;
    end
    if (g[0]) n_route1++;
  endtask

  task automatic finish_config();
    send(1'b1, '0);               // close whatever is open
    cfg_p = 1'b0; cfg_c = 1'b0; cfg_d = '0;
    repeat (LV + 3) @(posedge clk);
    #1;
  endtask

  task automatic check_cells();
    for (int i = 0; i < NC; i++) begin
      checks++;
      for (int a = 0; a < 64; a++)
        if (core_cfg[i][a] !== core_byte(i, a)) begin
          failures++; $display("ci %0d core[%0d] %h exp %h", i, a, core_cfg[i][a], core_byte(i, a)); break;
        end
      checks++;
      for (int s = 0; s < 2; s++) begin
        if (lsw_cfg[i][s] !== lsw_val(i, s)[19:0]) begin
          failures++; $display("ci %0d lsw%0d %h", i, s, lsw_cfg[i][s]);
        end
        for (int r = 0; r < 8; r++)
          if (xp[i][s][r] !== (8'b1 << xsel(i, s, r))) begin
            failures++; $display("ci %0d xp%0d row %0d %b", i, s, r, xp[i][s][r]);
          end
      end
    end
  endtask

  task automatic check_globals(input int unsigned ver);
    for (int id = 0; id < NS; id++) begin
      checks++;
      if (gsw_cfg[id] !== gsw_val(id, ver)) begin
        failures++; $display("global switch %0d %h exp %h", id, gsw_cfg[id], gsw_val(id, ver));
      end
    end
  endtask

  task automatic check_datapath();
    for (int t = 0; t < 2; t++) begin
      for (int i = 0; i < NC; i++) begin
        htree_in[i] = hsh(i, 7000 + t)[7:0];
        core_out[i] = hsh(i, 8000 + t)[7:0];
      end
      #1;
      for (int i = 0; i < NC; i++) begin
        logic [7:0] e0, e1;
        for (int r = 0; r < 8; r++) begin
          e0[r] = htree_in[i][xsel(i, 0, r)];
          e1[r] = core_out[i][xsel(i, 1, r)];
        end
        checks++;
        if (core_in[i] !== e0 || htree_out[i] !== e1) begin
          failures++; $display("ci %0d datapath %b %b exp %b %b", i, core_in[i], htree_out[i], e0, e1);
        end
      end
      n_oper++;
    end
  endtask

  // default cross-points: a closing control word with lane bits 1:0 = 11,
  // routed to the last group, must appear on rows 0 and 1 of its cells
  task automatic check_default();
    int unsigned ci;
    ci = NC - 1;
    for (int i = 0; i < NC; i++) htree_in[i] = '0;
    send(1'b1, all_lanes(8'b0000_0011) | route(NG - 1));
    cfg_p = 1'b1; cfg_c = 1'b1; cfg_d = '0;
    repeat (LV - 1) @(posedge clk);
    #1;
    checks++;
    if (core_in[ci][1:0] !== 2'b11 || htree_out[ci][1:0] !== (2'b11 | {core_out[ci][xsel(ci, 1, 1)], core_out[ci][xsel(ci, 1, 0)]})) begin
      failures++; $display("default cross-points: core_in %b htree_out %b", core_in[ci], htree_out[ci]);
    end else n_dflt++;
    @(posedge clk); #1;
    checks++;
    if (core_in[ci][1:0] !== 2'b00) begin
      failures++; $display("default cross-points still on: %b", core_in[ci]);
    end
    finish_config();
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_words;
    for (int i = 0; i < NC; i++) begin htree_in[i] = '0; core_out[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // full configuration: per group cells (83), local switches (8) and the
    // group's global switches, then the switches above the groups
    words = 0;
    for (int g = 0; g < NG; g++) begin
      config_group_cells(g);
      config_group_globals(g, 0);
    end
    checks++;
    if (words != NG * 102) begin
      failures++; $display("group phase took %0d cycles, expected %0d", words, NG * 102);
    end
    $display("full configuration: %0d cycles for cells, local and in-group global switches", words);
    config_upper_globals(0);
    exp_words = NG * 102 + 2 * (NG - 1);
    checks++;
    if (words != exp_words) begin
      failures++; $display("full configuration took %0d cycles, expected %0d", words, exp_words);
    end
    finish_config();
    check_cells();
    check_globals(0);
    check_datapath();
    check_default();

    // partial reconfiguration: global switches only
    words = 0;
    for (int g = 0; g < NG; g++) config_group_globals(g, 1);
    checks++;
    if (words != NG * 11) begin
      failures++; $display("partial (in-group globals) took %0d cycles, expected %0d", words, NG * 11);
    end
    $display("partial configuration: %0d cycles for in-group global switches", words);
    config_upper_globals(1);
    finish_config();
    n_partial++;
    check_globals(1);
    check_cells();
    check_datapath();

    $display("mechanisms: core %0d, io switch %0d, local %0d, global in group %0d, global above %0d, route-1 %0d, default %0d, partial %0d, operation %0d",
             n_core, n_sw, n_lsw, n_glob_in, n_glob_above, n_route1, n_dflt, n_partial, n_oper);
    checks++;
    if (n_core == 0 || n_sw == 0 || n_lsw == 0 || n_glob_in == 0 || n_dflt == 0 ||
        n_partial == 0 || n_oper == 0 || (NG > 1 && (n_glob_above == 0 || n_route1 == 0))) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
