// converging_switch: joins two sibling subtrees whose up channels differ in
// number (WL channels from the left subtree, WR from the right) and narrows
// them to WP channels toward the parent level, using only t-type switches.
// The default, 64-16-8, is the level-1 converging switch of the 256-PE
// asymmetric BFT (AS1); 32-32-8 (AS0) and 16-8-2 are other settings.
//
// Structure, from the children up:
//   1. pre-stages (only if WL != WR): the wider side is halved by columns of t
//      switches until it is as wide as the narrow side. Both children of such a
//      switch lead into the same subtree; these switches act as switches of
//      that subtree's level (LEVEL+1), so a packet that was deflected into the
//      wrong side is recognised and sent back up.
//   2. pairing stage: min(WL,WR) t switches, switch j taking channel j of each
//      side. They are switches of level LEVEL and pick the side from the
//      packet's address bit, so packets always reach the right subtree.
//   3. t-random stages: columns of t-random switches halve the width until it
//      is WP. Their desired downward direction alternates every cycle, which
//      spreads downward traffic over the wide channels below.
// In every column switch j pairs channels j and j + width/2 of the column below.
// All switches are bufferless deflection switches with one cycle per hop, so a
// packet crosses the converging switch in 1 + log2(max/min) + log2(min/WP)
// cycles when not deflected.
//
// The original design gives the t switches in the lowest two levels, t-random
// switches above them and the 16-8-2, 32-32-8 and 64-16-8 sizes. Which
// address bits the pre-stage switches use and the pairing of channels inside
// a column are this design's choices. Widths must be powers of two with
// WP <= min(WL, WR).
//
// Ports: l_in/l_out and r_in/r_out connect to the up channels of the left and
// right subtrees, p_in/p_out to the parent level. deflect = some switch
// deflected a packet (registered).
module converging_switch
  import bft_pkg::*;
#(
  parameter int unsigned AW     = 8,
  parameter int unsigned LEVEL  = 1,
  parameter logic [31:0] PREFIX = '0,   // top LEVEL address bits of the joined subtree
  parameter int unsigned WL     = 64,
  parameter int unsigned WR     = 16,
  parameter int unsigned WP     = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t l_in  [WL],
  output pkt_t l_out [WL],
  input  pkt_t r_in  [WR],
  output pkt_t r_out [WR],
  input  pkt_t p_in  [WP],
  output pkt_t p_out [WP],
  output logic deflect
);
  localparam int unsigned WW        = (WL >= WR) ? WL : WR;   // wide side
  localparam int unsigned WN        = (WL >= WR) ? WR : WL;   // narrow side
  localparam bit          WIDE_SIDE = (WL >= WR) ? 1'b0 : 1'b1;
  localparam int unsigned NPRE      = clog2u(WW / WN);
  localparam int unsigned NR        = clog2u(WN / WP);

  pkt_t wide_in   [WW];
  pkt_t wide_out  [WW];
  pkt_t narrow_in [WN];
  pkt_t narrow_out[WN];
  pkt_t wide_red  [WN];     // wide side after the pre-stages, upward
  pkt_t pair_dn_w [WN];     // pairing stage to the wide side
  pkt_t pair_dn_n [WN];     // pairing stage to the narrow side
  pkt_t pair_up   [WN];
  pkt_t pair_above[WN];
  logic [2:0] defl;

  if (WIDE_SIDE == 1'b0) begin : g_wide_left
    assign wide_in   = l_in;
    assign l_out     = wide_out;
    assign narrow_in = r_in;
    assign r_out     = narrow_out;
  end else begin : g_wide_right
    assign wide_in   = r_in;
    assign r_out     = wide_out;
    assign narrow_in = l_in;
    assign l_out     = narrow_out;
  end

  // ---- 1. pre-stages on the wide side -----------------------------------
  if (NPRE == 0) begin : g_no_pre
    assign wide_red = wide_in;
    assign wide_out = pair_dn_w;
    assign defl[0]  = 1'b0;
  end else begin : g_pre_chain
    logic [NPRE-1:0] sdefl;
    for (genvar s = 0; s < NPRE; s++) begin : g_pre
      localparam int unsigned WI = WW >> s;
      localparam int unsigned WO = WI / 2;
      pkt_t from_below [WI];
      pkt_t from_above [WO];
      pkt_t up [WO];
      pkt_t dn [WI];
      logic [WO-1:0] d;
      if (s == 0) begin : g_first
        assign from_below = wide_in;
        assign wide_out   = dn;
      end else begin : g_next
        assign from_below = g_pre[s-1].up;
      end
      if (s == NPRE - 1) begin : g_last
        assign from_above = pair_dn_w;
        assign wide_red   = up;
      end else begin : g_mid
        assign from_above = g_pre[s+1].dn;
      end
      for (genvar j = 0; j < WO; j++) begin : g_sw
        pkt_t pin [1], pout [1], cin [2], cout [2];
        logic crdy [2];
        assign cin[0]    = from_below[j];
        assign cin[1]    = from_below[j + WO];
        assign dn[j]     = cout[0];
        assign dn[j+WO]  = cout[1];
        assign pin[0]    = from_above[j];
        assign up[j]     = pout[0];
        t_switch #(.AW(AW), .LEVEL(LEVEL + 1), .PREFIX({PREFIX[30:0], WIDE_SIDE})) u_sw (
          .clk, .rst_n, .p_in(pin), .p_out(pout), .c_in(cin), .c_rdy(crdy), .c_out(cout),
          .deflect(d[j])
        );
      end
      assign sdefl[s] = |d;
    end
    assign defl[0] = |sdefl;
  end

  // ---- 2. pairing stage ---------------------------------------------------
  begin : g_pair
    logic [WN-1:0] d;
    for (genvar j = 0; j < WN; j++) begin : g_sw
      pkt_t pin [1], pout [1], cin [2], cout [2];
      logic crdy [2];
      assign cin[0]   = (WIDE_SIDE == 1'b0) ? wide_red[j] : narrow_in[j];
      assign cin[1]   = (WIDE_SIDE == 1'b0) ? narrow_in[j] : wide_red[j];
      assign pair_dn_w[j]  = (WIDE_SIDE == 1'b0) ? cout[0] : cout[1];
      assign pair_dn_n[j]  = (WIDE_SIDE == 1'b0) ? cout[1] : cout[0];
      assign pin[0]   = pair_above[j];
      assign pair_up[j] = pout[0];
      t_switch #(.AW(AW), .LEVEL(LEVEL), .PREFIX(PREFIX)) u_sw (
        .clk, .rst_n, .p_in(pin), .p_out(pout), .c_in(cin), .c_rdy(crdy), .c_out(cout),
        .deflect(d[j])
      );
    end
    assign defl[1] = |d;
  end
  assign narrow_out = pair_dn_n;

  // ---- 3. t-random stages -------------------------------------------------
  if (NR == 0) begin : g_no_rnd
    assign p_out      = pair_up;
    assign pair_above = p_in;
    assign defl[2]    = 1'b0;
  end else begin : g_rnd_chain
    logic [NR-1:0] sdefl;
    for (genvar r = 0; r < NR; r++) begin : g_rnd
      localparam int unsigned WI = WN >> r;
      localparam int unsigned WO = WI / 2;
      pkt_t from_below [WI];
      pkt_t from_above [WO];
      pkt_t up [WO];
      pkt_t dn [WI];
      logic [WO-1:0] d;
      if (r == 0) begin : g_first
        assign from_below = pair_up;
        assign pair_above = dn;
      end else begin : g_next
        assign from_below = g_rnd[r-1].up;
      end
      if (r == NR - 1) begin : g_last
        assign from_above = p_in;
        assign p_out      = up;
      end else begin : g_mid
        assign from_above = g_rnd[r+1].dn;
      end
      for (genvar j = 0; j < WO; j++) begin : g_sw
        pkt_t pin [1], pout [1], cin [2], cout [2];
        logic crdy [2];
        assign cin[0]    = from_below[j];
        assign cin[1]    = from_below[j + WO];
        assign dn[j]     = cout[0];
        assign dn[j+WO]  = cout[1];
        assign pin[0]    = from_above[j];
        assign up[j]     = pout[0];
        t_random_switch #(.AW(AW), .LEVEL(LEVEL), .PREFIX(PREFIX)) u_sw (
          .clk, .rst_n, .p_in(pin), .p_out(pout), .c_in(cin), .c_rdy(crdy), .c_out(cout),
          .deflect(d[j])
        );
      end
      assign sdefl[r] = |d;
    end
    assign defl[2] = |sdefl;
  end

  assign deflect = |defl;

endmodule
