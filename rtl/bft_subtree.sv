// bft_subtree: a symmetric butterfly fat tree subtree whose root switch node is
// at level LEVEL, serving the 2**(AW-LEVEL) PEs whose address starts with the
// LEVEL-bit PREFIX.
//
// COMP chooses the switch type of every level (bit l = 1: pi switches, 0: t
// switches). The levels are generated from the PEs upward. A switch node at a
// level holds one switch per up channel (WC) of each of its two child nodes;
// switch j takes channel j of the left and of the right child. Its parent
// ports become the node's up channels, parent port k of switch j being channel
// j + k*WC, so a pi level doubles the channel count and a t level keeps it
// (the usual BFT channel widths). The level next
// to the PEs has one switch per node, whose children are two PEs.
//
// Interface: pe_in/pe_rdy inject packets from the PEs (valid in the packet,
// accepted when pe_rdy is 1 in the same cycle), pe_out delivers packets to the
// PEs (valid in the packet, always accepted). up_in/up_out are the UPW channels
// to the next level up; a packet on up_in must be for this subtree or is sent
// back up. deflect is the OR of the switches' deflection flags. Each switch
// level adds one cycle.
//
// The per-level choice of t and pi switches follows the original asymmetric BFT design; the wiring
// permutation between levels is this design's choice (any permutation reaches
// the same PEs).
module bft_subtree
  import bft_pkg::*;
#(
  parameter int unsigned AW     = 8,
  parameter int unsigned LEVEL  = 2,
  parameter logic [31:0] PREFIX = '0,
  parameter logic [31:0] COMP   = 32'h0000_00FC,  // levels 7..2 pi: the densest subtree type
  localparam int unsigned NPE   = 2 ** (AW - LEVEL),
  localparam int unsigned UPW   = up_width(COMP, LEVEL, AW)
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t pe_in  [NPE],
  output logic pe_rdy [NPE],
  output pkt_t pe_out [NPE],
  input  pkt_t up_in  [UPW],
  output pkt_t up_out [UPW],
  output logic deflect
);
  localparam int unsigned NL = AW - LEVEL;   // switch levels in this subtree

  logic [NL-1:0] lvl_defl;

  // g_lvl[i] is BFT level l = AW-1-i. Its arrays:
  //   up[NODES*WU] - parent-port outputs, node m channel c at m*WU + c
  //   dn[2*NODES*WC] - child-port outputs, indexed like the level below's up
  for (genvar i = 0; i < NL; i++) begin : g_lvl
    localparam int unsigned L     = AW - 1 - i;
    localparam int unsigned NODES = 2 ** (L - LEVEL);
    localparam int unsigned NPS   = COMP[L] ? 2 : 1;
    localparam int unsigned WC    = (i == 0) ? 1 : up_width(COMP, L + 1, AW);
    localparam int unsigned WU    = WC * NPS;

    pkt_t up [NODES*WU];
    pkt_t dn [2*NODES*WC];
    logic rdy [2*NODES*WC];
    pkt_t from_below [2*NODES*WC];
    pkt_t from_above [NODES*WU];
    logic [NODES*WC-1:0] sw_defl;

    if (i == 0) begin : g_pe
      assign from_below = pe_in;
      assign pe_out     = dn;
      assign pe_rdy     = rdy;
    end else begin : g_below
      assign from_below = g_lvl[i-1].up;
    end
    if (i == NL - 1) begin : g_top
      assign from_above = up_in;
      assign up_out     = up;
    end else begin : g_above
      assign from_above = g_lvl[i+1].dn;
    end

    for (genvar m = 0; m < NODES; m++) begin : g_node
      for (genvar j = 0; j < WC; j++) begin : g_sw
        localparam logic [31:0] NPFX = (PREFIX << (L - LEVEL)) | m;
        pkt_t s_pin  [NPS];
        pkt_t s_pout [NPS];
        pkt_t s_cin  [2];
        pkt_t s_cout [2];
        logic s_crdy [2];
        for (genvar h = 0; h < 2; h++) begin : g_ch
          assign s_cin[h]                 = from_below[(2*m + h)*WC + j];
          assign dn [(2*m + h)*WC + j]    = s_cout[h];
          assign rdy[(2*m + h)*WC + j]    = s_crdy[h];
        end
        for (genvar k = 0; k < NPS; k++) begin : g_up
          assign s_pin[k]             = from_above[m*WU + j + k*WC];
          assign up[m*WU + j + k*WC]  = s_pout[k];
        end
        if (NPS == 2) begin : g_pi
          pi_switch #(.AW(AW), .LEVEL(L), .PREFIX(NPFX)) u_sw (
            .clk, .rst_n, .p_in(s_pin), .p_out(s_pout), .c_in(s_cin), .c_rdy(s_crdy),
            .c_out(s_cout), .deflect(sw_defl[m*WC + j])
          );
        end else begin : g_t
          t_switch #(.AW(AW), .LEVEL(L), .PREFIX(NPFX)) u_sw (
            .clk, .rst_n, .p_in(s_pin), .p_out(s_pout), .c_in(s_cin), .c_rdy(s_crdy),
            .c_out(s_cout), .deflect(sw_defl[m*WC + j])
          );
        end
      end
    end
    assign lvl_defl[i] = |sw_defl;
  end

  assign deflect = |lvl_defl;

endmodule
