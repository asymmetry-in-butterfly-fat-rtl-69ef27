// asym_bft_l1: the level-1 switch node of the asymmetric BFT, joining two
// quarter subtrees. KIND selects an ordinary node of WL t switches (WP = WL)
// or pi switches (WP = 2*WL), for children of equal width, or a converging
// switch for children of unequal width (WL, WR narrowed to WP). Ordinary nodes
// wire switch j to channel j of each child and parent port k of switch j to
// up channel j + k*WL. Ports are those of converging_switch; one cycle per
// hop. The choice between the three kinds per subtree pair follows the original
// design's compositions (a "c" entry at level 1 is a converging switch).
module asym_bft_l1
  import bft_pkg::*;
#(
  parameter int unsigned AW     = 8,
  parameter logic [31:0] PREFIX = '0,
  parameter l1_kind_e    KIND   = L1_CONVERGE,
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
  if (KIND == L1_CONVERGE) begin : g_cnv
    converging_switch #(.AW(AW), .LEVEL(1), .PREFIX(PREFIX), .WL(WL), .WR(WR), .WP(WP)) u_cnv (
      .clk, .rst_n, .l_in, .l_out, .r_in, .r_out, .p_in, .p_out, .deflect);
  end else begin : g_node
    localparam int unsigned NPS = (KIND == L1_PI) ? 2 : 1;
    logic [WL-1:0] d;
    for (genvar j = 0; j < WL; j++) begin : g_sw
      pkt_t pin [NPS], pout [NPS], cin [2], cout [2];
      logic crdy [2];
      assign cin[0]   = l_in[j];
      assign cin[1]   = r_in[j];
      assign l_out[j] = cout[0];
      assign r_out[j] = cout[1];
      for (genvar k = 0; k < NPS; k++) begin : g_up
        assign pin[k]          = p_in[j + k*WL];
        assign p_out[j + k*WL] = pout[k];
      end
      if (NPS == 2) begin : g_pi
        pi_switch #(.AW(AW), .LEVEL(1), .PREFIX(PREFIX)) u_sw (
          .clk, .rst_n, .p_in(pin), .p_out(pout), .c_in(cin), .c_rdy(crdy), .c_out(cout),
          .deflect(d[j]));
      end else begin : g_t
        t_switch #(.AW(AW), .LEVEL(1), .PREFIX(PREFIX)) u_sw (
          .clk, .rst_n, .p_in(pin), .p_out(pout), .c_in(cin), .c_rdy(crdy), .c_out(cout),
          .deflect(d[j]));
      end
    end
    assign deflect = |d;
  end
endmodule
