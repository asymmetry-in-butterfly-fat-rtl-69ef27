// t_switch: bandwidth-reducing switch of the deflection-routed butterfly fat
// tree: two child ports and one parent port, each a 52-bit single-flit packet
// channel in each direction. A packet whose destination lies outside the
// switch's subtree goes up; one inside goes to the child named by the address
// bit of this level. Losers of a port conflict are deflected to a free port,
// so the switch stores nothing and every packet leaves one cycle after it
// arrived. At the level next to the PEs (LEVEL = AW-1) a PE's packet is only
// accepted (c_rdy) when its desired port is free, and no PE is handed a packet
// that is not addressed to it.
//
// The switch type, its port count and the one-cycle hop follow the original asymmetric BFT design;
// the arbitration order and leaf back-pressure are this design's own choices
// (see bft_switch, which holds the logic).
module t_switch
  import bft_pkg::*;
#(
  parameter int unsigned AW     = 8,        // PE address bits (256 PEs)
  parameter int unsigned LEVEL  = 7,        // BFT level, 0 = root, AW-1 = next to the PEs
  parameter logic [31:0] PREFIX = '0        // top LEVEL address bits of this switch's subtree
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t p_in  [1],   // from parent switch(es)
  output pkt_t p_out [1],   // to parent switch(es)
  input  pkt_t c_in  [2],   // from children (0 = left, 1 = right)
  output logic c_rdy [2],   // child input accepted (only meaningful at LEVEL == AW-1)
  output pkt_t c_out [2],   // to children
  output logic deflect      // a packet was deflected (registered)
);
  bft_switch #(
    .NP(1), .AW(AW), .PREFIX_LEN(LEVEL), .PREFIX(PREFIX), .DIR_BIT(AW - 1 - LEVEL),
    .RANDOM_DOWN(1'b0), .LEAF(LEVEL == AW - 1)
  ) u_core (
    .clk, .rst_n, .p_in, .p_out, .c_in, .c_rdy, .c_out, .deflect
  );
endmodule
