// asym_bft: asymmetric butterfly fat tree network-on-chip for 2**AW PEs
// (256 by default), built from bufferless deflection-routed switches.
//
// The tree is split into four quarter subtrees st-0..st-3 whose roots are at
// level 2. Each quarter has its own per-level choice of t and pi switches
// (COMP_ST*), so quarters with heavy traffic can get more channels than the
// others. Above each pair of quarters (level 1) sits either an ordinary node
// of t or pi switches (equal child widths) or a converging switch that narrows
// unequal widths to CNV_W*. The root (level 0) has one two-port switch per
// channel arriving from each half; the two halves must deliver the same
// number of channels there.
//
// Defaults are the AS1 network of the evaluation: st-0 pi at all six levels
// (64 channels up), st-1 pi-t-pi-t-pi-pi from the PE level up (16 channels),
// joined by a 64-16-8 converging switch; st-2 and st-3 t-pi-t-pi-t-pi with a
// level-1 t node (8 channels); 8 root switches. AS0 is COMP_ST0 = COMP_ST1 =
// 8'hEC (pi-pi-pi-t-pi-pi, 32 channels) with a 32-32-8 converging switch.
//
// Packets are single flits (see bft_pkg): valid, 8-bit destination, 11-bit
// sequence number, 32-bit data. PE p injects on pe_in[p]; the packet is taken
// when pe_rdy[p] is 1 in that cycle (pe_rdy depends combinationally on pe_in
// and on the state of the network). Packets are delivered on pe_out[p] and
// must be accepted. Every switch hop takes one cycle; with deflection the
// order of arrival is not the order of sending, which is why packets carry a
// sequence number. deflect[3:0] flag a deflection in st-0..st-3, deflect[5:4]
// in the level-1 nodes, deflect[6] at the root (registered).
//
// Quarter subtrees, per-level switch types, the converging switch and the
// AS0/AS1 compositions follow the original asymmetric BFT design; the root built of two-port
// switches and the wiring permutation between levels are this design's own.
module asym_bft
  import bft_pkg::*;
#(
  parameter int unsigned AW       = 8,
  parameter logic [31:0] COMP_ST0 = 32'h0000_00FC,  // pi-pi-pi-pi-pi-pi
  parameter logic [31:0] COMP_ST1 = 32'h0000_00AC,  // pi-t-pi-t-pi-pi
  parameter logic [31:0] COMP_ST2 = 32'h0000_0054,  // t-pi-t-pi-t-pi
  parameter logic [31:0] COMP_ST3 = 32'h0000_0054,  // t-pi-t-pi-t-pi
  parameter l1_kind_e    L1_KIND0 = L1_CONVERGE,     // above st-0, st-1
  parameter l1_kind_e    L1_KIND1 = L1_T,            // above st-2, st-3
  parameter int unsigned CNV_W0   = 8,               // converging width, half 0
  parameter int unsigned CNV_W1   = 8,               // converging width, half 1
  localparam int unsigned NPE     = 2 ** AW
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pkt_t       pe_in  [NPE],
  output logic       pe_rdy [NPE],
  output pkt_t       pe_out [NPE],
  output logic [6:0] deflect
);
  localparam int unsigned QPE = NPE / 4;   // PEs per quarter
  localparam int unsigned WQ0 = up_width(COMP_ST0, 2, AW);
  localparam int unsigned WQ1 = up_width(COMP_ST1, 2, AW);
  localparam int unsigned WQ2 = up_width(COMP_ST2, 2, AW);
  localparam int unsigned WQ3 = up_width(COMP_ST3, 2, AW);

  function automatic int unsigned half_width(input l1_kind_e k, input int unsigned wl,
                                             input int unsigned cnv);
    case (k)
      L1_T:    return wl;
      L1_PI:   return 2 * wl;
      default: return cnv;
    endcase
  endfunction

  localparam int unsigned WH0 = half_width(L1_KIND0, WQ0, CNV_W0);
  localparam int unsigned WH1 = half_width(L1_KIND1, WQ2, CNV_W1);

  if (WH0 != WH1) begin : g_bad_root
    $error("asym_bft: the halves reach the root with %0d and %0d channels", WH0, WH1);
  end
  if ((L1_KIND0 != L1_CONVERGE && WQ0 != WQ1) || (L1_KIND1 != L1_CONVERGE && WQ2 != WQ3)) begin : g_bad_l1
    $error("asym_bft: a t or pi level-1 node needs children of equal width");
  end

  // quarter up channels
  pkt_t q0_up [WQ0], q0_dn [WQ0];
  pkt_t q1_up [WQ1], q1_dn [WQ1];
  pkt_t q2_up [WQ2], q2_dn [WQ2];
  pkt_t q3_up [WQ3], q3_dn [WQ3];
  // half up channels (level 1 to root)
  pkt_t h0_up [WH0], h0_dn [WH0];
  pkt_t h1_up [WH1], h1_dn [WH1];

  bft_subtree #(.AW(AW), .LEVEL(2), .PREFIX(0), .COMP(COMP_ST0)) u_st0 (
    .clk, .rst_n, .pe_in(pe_in[0 +: QPE]), .pe_rdy(pe_rdy[0 +: QPE]),
    .pe_out(pe_out[0 +: QPE]), .up_in(q0_dn), .up_out(q0_up), .deflect(deflect[0]));
  bft_subtree #(.AW(AW), .LEVEL(2), .PREFIX(1), .COMP(COMP_ST1)) u_st1 (
    .clk, .rst_n, .pe_in(pe_in[QPE +: QPE]), .pe_rdy(pe_rdy[QPE +: QPE]),
    .pe_out(pe_out[QPE +: QPE]), .up_in(q1_dn), .up_out(q1_up), .deflect(deflect[1]));
  bft_subtree #(.AW(AW), .LEVEL(2), .PREFIX(2), .COMP(COMP_ST2)) u_st2 (
    .clk, .rst_n, .pe_in(pe_in[2*QPE +: QPE]), .pe_rdy(pe_rdy[2*QPE +: QPE]),
    .pe_out(pe_out[2*QPE +: QPE]), .up_in(q2_dn), .up_out(q2_up), .deflect(deflect[2]));
  bft_subtree #(.AW(AW), .LEVEL(2), .PREFIX(3), .COMP(COMP_ST3)) u_st3 (
    .clk, .rst_n, .pe_in(pe_in[3*QPE +: QPE]), .pe_rdy(pe_rdy[3*QPE +: QPE]),
    .pe_out(pe_out[3*QPE +: QPE]), .up_in(q3_dn), .up_out(q3_up), .deflect(deflect[3]));

  asym_bft_l1 #(.AW(AW), .PREFIX(0), .KIND(L1_KIND0), .WL(WQ0), .WR(WQ1), .WP(WH0)) u_l1_0 (
    .clk, .rst_n, .l_in(q0_up), .l_out(q0_dn), .r_in(q1_up), .r_out(q1_dn),
    .p_in(h0_dn), .p_out(h0_up), .deflect(deflect[4]));
  asym_bft_l1 #(.AW(AW), .PREFIX(1), .KIND(L1_KIND1), .WL(WQ2), .WR(WQ3), .WP(WH1)) u_l1_1 (
    .clk, .rst_n, .l_in(q2_up), .l_out(q2_dn), .r_in(q3_up), .r_out(q3_dn),
    .p_in(h1_dn), .p_out(h1_up), .deflect(deflect[5]));

  // root: one two-port switch per channel pair
  logic [WH0-1:0] root_defl;
  for (genvar j = 0; j < WH0; j++) begin : g_root
    pkt_t pin [1], pout [1], cin [2], cout [2];
    logic crdy [2];
    assign pin[0]   = PKT_IDLE;
    assign cin[0]   = h0_up[j];
    assign cin[1]   = h1_up[j];
    assign h0_dn[j] = cout[0];
    assign h1_dn[j] = cout[1];
    bft_switch #(
      .NP(0), .AW(AW), .PREFIX_LEN(0), .PREFIX(0), .DIR_BIT(AW - 1), .RANDOM_DOWN(1'b0),
      .LEAF(1'b0)
    ) u_root (
      .clk, .rst_n, .p_in(pin), .p_out(pout), .c_in(cin), .c_rdy(crdy), .c_out(cout),
      .deflect(root_defl[j])
    );
  end
  assign deflect[6] = |root_defl;

endmodule
