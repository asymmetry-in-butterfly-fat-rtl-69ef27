// bft_switch: arbitration core shared by every switch of the deflection-routed
// butterfly fat tree (t, pi, t-random and the root switches).
//
// The switch is bufferless. It has two child ports and NP parent ports (0 for
// the root, 1 for a t switch, 2 for a pi switch); every port carries one
// single-flit packet per cycle in each direction. All packets that arrive in a
// cycle leave on distinct output ports in the next cycle (one register stage
// per hop), so a packet that cannot have the port it wants is deflected to a
// free one instead of being stored.
//
// Desired direction of a packet:
//   * destination outside this switch's subtree (the top PREFIX_LEN address
//     bits differ from PREFIX): any parent port;
//   * destination inside: the child selected by address bit DIR_BIT, or, when
//     RANDOM_DOWN is set (t-random switch), the child selected by a bit that
//     toggles every cycle, ignoring the address.
// Arbitration is greedy in a fixed order: parent inputs first, so that a
// packet that arrives from a parent but does not belong here (it was deflected
// into this subtree) takes a parent port before anything else and is turned
// back up at once. The two child inputs follow, their order swapped
// every cycle so that neither child can starve the other. Packets that lose
// their desired port then take the free ports in the order parents, left
// child, right child.
//
// LEAF switches have PEs as children. A PE may only be handed packets that are
// addressed to it, and PE injection can be held back, so at a leaf the parent
// inputs are placed first (a parent packet that loses its PE port is deflected
// upward) and a child input is then accepted (c_rdy) only when its desired
// port is still free. Away from the leaves
// c_rdy is always 1 and must not be used.
//
// The original design gives the switch types, the desired-direction rule of the
// t-random switch and the rule that deflected packets take priority and are
// turned back in the next cycle; the fixed arbitration order, the toggling
// child priority, the leaf injection back-pressure and the synchronous
// active-low reset are this design's choices.
//
// Ports: p_in/p_out parent side, c_in/c_out child side (index 0 = left,
// 1 = right), deflect = some packet left on a port it did not want this cycle
// (registered with the packets).
module bft_switch
  import bft_pkg::*;
#(
  parameter int unsigned NP          = 1,   // parent ports: 0 (root), 1 (t), 2 (pi)
  parameter int unsigned AW          = 8,   // address bits used for routing
  parameter int unsigned PREFIX_LEN  = 7,   // address bits naming this subtree
  parameter logic [31:0] PREFIX      = '0,  // their value
  parameter int unsigned DIR_BIT     = 0,   // address bit choosing the child
  parameter bit          RANDOM_DOWN = 1'b0,
  parameter bit          LEAF        = 1'b1,
  localparam int unsigned NPA        = (NP == 0) ? 1 : NP  // array size (the root keeps one unused port)
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t p_in  [NPA],
  output pkt_t p_out [NPA],
  input  pkt_t c_in  [2],
  output logic c_rdy [2],
  output pkt_t c_out [2],
  output logic deflect
);
  localparam int unsigned NI  = NP + 2;              // used inputs / outputs

  pkt_t in_pkt  [NI];   // inputs in priority order
  logic in_child[NI];   // input comes from a child
  logic in_src  [NI];   // child index (0 left, 1 right) for child inputs
  logic tog;            // child priority swap and t-random direction

  pkt_t out_nxt [NI];   // next outputs: 0..NP-1 parents, NP left, NP+1 right
  logic rdy_nxt [2];
  logic defl_nxt;

  function automatic logic in_subtree(input pkt_t p);
    logic [AW-1:0] a;
    a = p.addr[AW-1:0];
    if (PREFIX_LEN == 0) return 1'b1;
    return (a >> (AW - PREFIX_LEN)) == PREFIX[AW-1:0];
  endfunction

  always_comb begin
    logic [NI-1:0] used;
    logic [NI-1:0] placed;
    logic          up;
    int unsigned   want;
    // priority order
    for (int i = 0; i < int'(NP); i++) begin
      in_pkt[i]   = p_in[i];
      in_child[i] = 1'b0;
      in_src[i]   = 1'b0;
    end
    in_pkt[NP]     = tog ? c_in[1] : c_in[0];
    in_child[NP]   = 1'b1;
    in_src[NP]     = tog;
    in_pkt[NP+1]   = tog ? c_in[0] : c_in[1];
    in_child[NP+1] = 1'b1;
    in_src[NP+1]   = !tog;

    up       = 1'b0;
    want     = 0;
    used     = '0;
    placed   = '0;
    defl_nxt = 1'b0;
    for (int unsigned o = 0; o < NI; o++) out_nxt[o] = PKT_IDLE;
    rdy_nxt[0] = !LEAF;
    rdy_nxt[1] = !LEAF;

    // pass 0: desired ports (at a leaf, parent inputs only)
    // pass 1: deflection of packets that lost their desired port
    // pass 2: leaf only, PE injections, accepted on their desired port only
    for (int pass = 0; pass < 3; pass++) begin
      for (int unsigned i = 0; i < NI; i++) begin
        if (in_pkt[i].valid && !placed[i]) begin
          if ((pass == 0 && !(LEAF && in_child[i])) || (pass == 2 && LEAF && in_child[i])) begin
            up = (NP != 0) && !in_subtree(in_pkt[i]);
            if (up) begin
              for (int o = 0; o < int'(NP); o++) begin
                if (!placed[i] && !used[o]) begin
                  used[o]    = 1'b1;
                  placed[i]  = 1'b1;
                  out_nxt[o] = in_pkt[i];
                end
              end
            end else begin
              want = NP + ((RANDOM_DOWN ? tog : in_pkt[i].addr[DIR_BIT]) ? 1 : 0);
              if (!used[want]) begin
                used[want]    = 1'b1;
                placed[i]     = 1'b1;
                out_nxt[want] = in_pkt[i];
              end
            end
            if (LEAF && in_child[i] && placed[i]) rdy_nxt[in_src[i]] = 1'b1;
          end else if (pass == 1 && !(LEAF && in_child[i])) begin
            for (int unsigned o = 0; o < NI; o++) begin
              if (!placed[i] && !used[o] && !(LEAF && o >= NP)) begin
                used[o]    = 1'b1;
                placed[i]  = 1'b1;
                out_nxt[o] = in_pkt[i];
                defl_nxt   = 1'b1;
              end
            end
          end
        end
      end
    end
  end

  assign c_rdy = rdy_nxt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tog     <= 1'b0;
      deflect <= 1'b0;
      for (int o = 0; o < int'(NPA); o++) p_out[o] <= PKT_IDLE;
      c_out[0] <= PKT_IDLE;
      c_out[1] <= PKT_IDLE;
    end else begin
      tog     <= !tog;
      deflect <= defl_nxt;
      for (int o = 0; o < int'(NPA); o++) p_out[o] <= (o < int'(NP)) ? out_nxt[o] : PKT_IDLE;
      c_out[0] <= out_nxt[NP];
      c_out[1] <= out_nxt[NP+1];
    end
  end

endmodule
