// bft_pkg: packet format and elaboration helpers shared by the deflection-routed
// butterfly fat tree (BFT) network.
//
// A packet is a single flit: 1 valid bit, 8 bits of destination PE address,
// an 11-bit sequence number and 32 bits of data (52 bits). The field widths
// follow the evaluated 256-PE network; the sequence number is carried for the
// reorder buffers in the PEs and is never looked at by a switch.
//
// Switch-type compositions are bit vectors indexed by BFT level (level 0 is the
// root, level ADDR_W-1 is the level whose switches connect to the PEs): a 1
// means the level is built from pi switches (two parent ports per switch), a 0
// means t switches (one parent port per switch).
package bft_pkg;

  localparam int unsigned ADDR_W = 8;   // PE address bits (256 PEs)
  localparam int unsigned SEQ_W  = 11;  // sequence number bits
  localparam int unsigned DATA_W = 32;  // payload bits

  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic [SEQ_W-1:0]  seq;
    logic [DATA_W-1:0] data;
  } pkt_t;

  localparam int unsigned PKT_W = $bits(pkt_t);  // 52

  localparam pkt_t PKT_IDLE = '0;

  // How the level-1 switch node above two sibling subtrees is built.
  typedef enum logic [1:0] {
    L1_T        = 2'd0,   // t switches (children must have equal widths)
    L1_PI       = 2'd1,   // pi switches (children must have equal widths)
    L1_CONVERGE = 2'd2    // converging switch (widths may differ)
  } l1_kind_e;

  // Number of up channels leaving the root switch node of a symmetric subtree
  // whose root is at level `lvl`, for an `aw`-bit address space. Each level
  // has as many switches as its child subtree has up channels; a pi level
  // doubles the channel count, a t level keeps it.
  function automatic int unsigned up_width(input logic [31:0] comp,
                                           input int unsigned lvl,
                                           input int unsigned aw);
    int unsigned w;
    w = 1;
    for (int unsigned l = aw - 1; l >= lvl; l--) begin
      w = comp[l] ? 2 * w : w;
      if (l == 0) break;
    end
    return w;
  endfunction

  function automatic int unsigned clog2u(input int unsigned v);
    return (v <= 1) ? 0 : $clog2(v);
  endfunction

endpackage
