// pi_switch: bandwidth-preserving switch of the deflection-routed butterfly
// fat tree: two child ports and two parent ports, so a level of pi switches
// carries as many channels up as it receives from below. Upward packets take
// either parent port; downward packets go to the child named by this level's
// address bit. Losers of a port conflict are deflected to a free port; every
// packet leaves one cycle after it arrived. At the level next to the PEs
// (LEVEL = AW-1) PE injection is accepted (c_rdy) only when the desired port is
// free, and a parent packet that loses its PE port is sent back up.
//
// The switch type and port counts follow the original asymmetric BFT design; the arbitration order
// and leaf back-pressure are this design's own choices (see bft_switch).
module pi_switch
  import bft_pkg::*;
#(
  parameter int unsigned AW     = 8,        // PE address bits (256 PEs)
  parameter int unsigned LEVEL  = 7,        // BFT level, 0 = root, AW-1 = next to the PEs
  parameter logic [31:0] PREFIX = '0        // top LEVEL address bits of this switch's subtree
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t p_in  [2],   // from parent switch(es)
  output pkt_t p_out [2],   // to parent switch(es)
  input  pkt_t c_in  [2],   // from children (0 = left, 1 = right)
  output logic c_rdy [2],   // child input accepted (only meaningful at LEVEL == AW-1)
  output pkt_t c_out [2],   // to children
  output logic deflect      // a packet was deflected (registered)
);
  bft_switch #(
    .NP(2), .AW(AW), .PREFIX_LEN(LEVEL), .PREFIX(PREFIX), .DIR_BIT(AW - 1 - LEVEL),
    .RANDOM_DOWN(1'b0), .LEAF(LEVEL == AW - 1)
  ) u_core (
    .clk, .rst_n, .p_in, .p_out, .c_in, .c_rdy, .c_out, .deflect
  );
endmodule
