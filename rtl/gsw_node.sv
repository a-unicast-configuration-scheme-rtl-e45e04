// gsw_node -- one global switch of the H-tree, as far as configuration is
// concerned: a pipeline stage of the downstream bus (data, C and P move one
// level per clock), a level-addressed 96-bit configuration store, and the
// default routing that P selects.
//
// LEVEL is log2 of the number of cells below the switch: the lowest global
// switches (LEVEL 2) each serve four cells, the root of a 32x32 array has
// LEVEL 10.  Below the 32-cell group level the bus is 8 bits per cell and
// the default routing splits it: child k gets the k-th slice (four 8-bit
// lanes at LEVEL 2, two halves elsewhere).  At and above the group level the
// bus is the full BUS_W bits; a switch above the group level (a "steering"
// switch) sends each word to one child only, chosen by the route bit of the
// last control word (bit 0 of lane H-1, H = LEVEL - group level), and gives
// the other child the all-zero control word, which closes whatever is open
// below it.  This is how a word reaches exactly one 32-cell group.
//
// Configuration of the switch itself: a global control word (lane 0 of the
// switch's input, G=1) whose level field equals LEVEL opens the switch; the
// data words that follow (full input width each, so 3, 2, 1 and 1 words at
// levels 2, 3, 4 and >=5) fill the 96 cross-point bits; the next control
// word closes it.  Every word is still passed on downstream, where the same
// control word has closed all other components.  With P low the
// configuration path is idle: the children see P low and a zero bus, and
// the switch stays closed.  The switch's normal-operation cross-point
// network is outside this design; its 96 configuration bits are the cfg
// output.
//
// Document: global switches have 96 cross-points, the control word has a G
// bit and a level indicator, C and P are pipelined with the bus, P selects
// default connections, the root bus is 256 bits and feeds 32 cells.  This
// design's choices: the level field encoding, the bus split order, the route
// bits and idle word, and reading the control word from lane 0.
//
// Timing: one register stage; a word on up_* appears on dn_* one clk later.
// Assertions check that all children see the same P and that a steering
// switch closes the child it does not serve.
module gsw_node
  import cfg_pkg::*;
#(
  parameter int unsigned LEVEL  = 2,    // log2(cells below this switch)
  parameter int unsigned ROOT_W = BUS_W, // root bus width
  localparam int unsigned GRP   = $clog2(ROOT_W / LANE_W),
  localparam bit          STEER = (LEVEL > GRP),
  localparam int unsigned IN_W  = STEER ? ROOT_W : (LANE_W << LEVEL),
  localparam int unsigned NCH   = (LEVEL == 2) ? 4 : 2,
  localparam int unsigned CH_W  = STEER ? IN_W : IN_W / NCH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          up_p,
  input  logic                          up_c,
  input  logic [IN_W-1:0]               up_d,
  output logic [NCH-1:0]                dn_p,
  output logic [NCH-1:0]                dn_c,
  output logic [NCH-1:0][CH_W-1:0]      dn_d,
  output logic [GSW_BITS-1:0]           cfg,
  output logic                          open_o
);

  localparam int unsigned RBIT = STEER ? LANE_W * (LEVEL - GRP - 1) + B_ROUTE : 0;

  logic is_ctrl, hit, open_q, wr, sel_q, sel_now;
  logic [LANE_W-1:0] lane0;

  assign lane0   = up_d[LANE_W-1:0];
  assign is_ctrl = up_p && up_c;
  assign hit     = lane0[B_G] && (lane0[LVL_LO +: LVL_W] == LVL_W'(LEVEL));
  assign wr      = up_p && !up_c && open_q;
  assign sel_now = up_c ? up_d[RBIT] : sel_q;
  assign open_o  = open_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q <= 1'b0;
      sel_q  <= 1'b0;
    end else if (!up_p) begin
      open_q <= 1'b0;
    end else if (up_c) begin
      open_q <= hit;
      sel_q  <= up_d[RBIT];
    end
  end

  cfg_word_reg #(.NBITS(GSW_BITS), .W(IN_W)) u_store (
    .clk, .rst_n, .start(is_ctrl && hit), .wr, .wd(up_d), .cfg
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_p <= '0;
      dn_c <= '0;
      dn_d <= '0;
    end else begin
      for (int k = 0; k < NCH; k++) begin
        if (!up_p) begin
          dn_p[k] <= 1'b0;
          dn_c[k] <= 1'b0;
          dn_d[k] <= '0;
        end else if (!STEER) begin
          dn_p[k] <= 1'b1;
          dn_c[k] <= up_c;
          dn_d[k] <= up_d[k*CH_W +: CH_W];
        end else if (sel_now == k[0]) begin
          dn_p[k] <= 1'b1;
          dn_c[k] <= up_c;
          dn_d[k] <= up_d[CH_W-1:0];
        end else begin
          dn_p[k] <= 1'b1;   // idle word: closes everything below
          dn_c[k] <= 1'b1;
          dn_d[k] <= '0;
        end
      end
    end
  end

  // P reaches every child alike; below the group level C does too, and
  // above it at most one child gets anything but the closing word
  a_p_same: assert property (@(posedge clk) disable iff (!rst_n) (dn_p == '0) || (dn_p == '1));
  if (!STEER) begin : g_chk_split
    a_c_same: assert property (@(posedge clk) disable iff (!rst_n) (dn_c == '0) || (dn_c == '1));
  end else begin : g_chk_steer
    a_one_route: assert property (@(posedge clk) disable iff (!rst_n)
                                  dn_p[0] |-> ((dn_c[0] && dn_d[0] == '0) || (dn_c[1] && dn_d[1] == '0)));
  end

endmodule
