// t_random_switch: the t-random (t') switch used in the upper stages of a
// converging switch. It is a t switch (two child ports, one parent port,
// bufferless deflection routing, one cycle per hop) except for the desired
// downward direction: instead of the destination address bit it alternates
// every cycle, left in one cycle and right in the next, so that downward
// traffic is spread over both halves of the wide channel below. Upward
// decisions (destination outside the subtree) and arbitration are those of
// the t switch. Below a t-random switch both children must lead to every
// destination of its subtree, as they do inside a converging switch.
//
// The alternating direction is the original design's rule; the phase (left in the
// first cycle after reset) is this design's choice.
module t_random_switch
  import bft_pkg::*;
#(
  parameter int unsigned AW     = 8,        // PE address bits (256 PEs)
  parameter int unsigned LEVEL  = 1,        // BFT level (converging switches sit at level 1)
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
    .RANDOM_DOWN(1'b1), .LEAF(LEVEL == AW - 1)
  ) u_core (
    .clk, .rst_n, .p_in, .p_out, .c_in, .c_rdy, .c_out, .deflect
  );
endmodule
