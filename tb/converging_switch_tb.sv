// converging_switch_tb: self-checking testbench for converging_switch in the
// 16-8-2 size (16 channels from the left subtree, 8 from the right, 2 to the
// parent) at level 1 of a 32-PE address space (AW = 5, PREFIX = 0: the left
// quarter is addresses 0-7, the right quarter 8-15, the outside 16-31).
//
// The subtrees and the parent level are modelled here. A packet delivered
// down a left (right) channel is accepted if it is for the left (right)
// quarter, and otherwise sent back up the same channel in the next cycle, as
// a level-2 switch would; a packet leaving upward is accepted if it is for the
// outside and otherwise sent back down the same parent channel. Checks:
//   1. lone-packet delays: parent to the left subtree 4 cycles (two t-random
//      stages, the pairing stage, one pre-stage), to the right subtree 3,
//      left subtree to the outside 4, left to right subtree 2, right to the
//      outside 3;
//   2. spreading: eight packets entering one parent channel in consecutive
//      cycles, all for the same left-quarter address, must leave on at least
//      two different left channels (t switches alone would use one);
//   3. random traffic between all three sides: every packet arrives exactly
//      once on the correct side. Deflections and turn-backs must occur.
module converging_switch_tb;
  import bft_pkg::*;

  localparam int unsigned AW = 5;
  localparam int unsigned WL = 16, WR = 8, WP = 2;
  localparam int unsigned NPKT = 3000;
  localparam int unsigned LIMIT = 30000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pkt_t l_in [WL], l_out [WL], r_in [WR], r_out [WR], p_in [WP], p_out [WP];
  logic deflect;

  converging_switch #(.AW(AW), .LEVEL(1), .PREFIX(0), .WL(WL), .WR(WR), .WP(WP)) dut (.*);

  int checks = 0, failures = 0;
  int n_defl = 0, n_bounce = 0;
  int cycle = 0;
  int exp_dst [int];
  int tag_ctr = 1;
  int l_hits [WL];
  int r_hits [WR];
  int last_l_ch;

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (LIMIT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_t mk(input int dst);
    pkt_t p;
    p.valid = 1'b1;
    p.addr  = 8'(dst);
    p.seq   = SEQ_W'(tag_ctr);
    p.data  = DATA_W'(tag_ctr);
    exp_dst[tag_ctr] = dst;
    tag_ctr++;
    return p;
  endfunction

  // side of an address: 0 left quarter, 1 right quarter, 2 outside
  function automatic int side(input logic [7:0] a);
    return a[4] ? 2 : int'(a[3]);
  endfunction

  task automatic accept(input pkt_t p, input int where);
    int t;
    t = int'(p.data);
    check(exp_dst.exists(t) && side(8'(exp_dst[t])) == where, "packet delivered to the wrong side");
    exp_dst.delete(t);
  endtask

  // called just after a rising edge: take deliveries, prepare turn-backs
  task automatic collect(output int got);
    got = 0;
    for (int c = 0; c < int'(WL); c++) begin
      l_in[c] = PKT_IDLE;
      if (l_out[c].valid) begin
        if (side(l_out[c].addr) == 0) begin accept(l_out[c], 0); l_hits[c]++; got++; last_l_ch = c; end
        else begin l_in[c] = l_out[c]; n_bounce++; end
      end
    end
    for (int c = 0; c < int'(WR); c++) begin
      r_in[c] = PKT_IDLE;
      if (r_out[c].valid) begin
        if (side(r_out[c].addr) == 1) begin accept(r_out[c], 1); r_hits[c]++; got++; end
        else begin r_in[c] = r_out[c]; n_bounce++; end
      end
    end
    for (int c = 0; c < int'(WP); c++) begin
      p_in[c] = PKT_IDLE;
      if (p_out[c].valid) begin
        if (side(p_out[c].addr) == 2) begin accept(p_out[c], 2); got++; end
        else begin p_in[c] = p_out[c]; n_bounce++; end
      end
    end
  endtask

  task automatic lone(input int from, input int ch, input int dst, input int expect_lat);
    int got, t0, lat;
    @(negedge clk);
    case (from)
      0: l_in[ch] = mk(dst);
      1: r_in[ch] = mk(dst);
      default: p_in[ch] = mk(dst);
    endcase
    t0 = cycle;
    lat = -1;
    for (int w = 0; w < 20 && lat < 0; w++) begin
      @(posedge clk);
      #1;
      collect(got);
      if (got > 0) lat = cycle - t0;
    end
    check(lat == expect_lat, $sformatf("lone packet %0d->%0d took %0d cycles, expected %0d",
                                       from, dst, lat, expect_lat));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int got;
    int distinct;
    foreach (l_in[i]) l_in[i] = PKT_IDLE;
    foreach (r_in[i]) r_in[i] = PKT_IDLE;
    foreach (p_in[i]) p_in[i] = PKT_IDLE;
    foreach (l_hits[i]) l_hits[i] = 0;
    foreach (r_hits[i]) r_hits[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---- 1. lone packets
    lone(2, 0, 3, 4);
    lone(2, 1, 12, 3);     // to the narrow side: no pre-stage
    lone(0, 5, 20, 4);
    lone(0, 9, 9, 2);
    lone(1, 2, 1, 2);
    lone(1, 7, 30, 3);     // narrow side: no pre-stage
    check(exp_dst.size() == 0, "lone packets lost");

    // ---- 2. spreading by the t-random stages
    begin
      bit used [WL];
      foreach (used[i]) used[i] = 1'b0;
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        p_in[0] = mk(2);
        @(posedge clk);
        #1;
        collect(got);
        if (got > 0) used[last_l_ch] = 1'b1;
      end
      @(negedge clk);
      p_in[0] = PKT_IDLE;
      for (int w = 0; w < 20; w++) begin
        @(posedge clk);
        #1;
        collect(got);
        if (got > 0) used[last_l_ch] = 1'b1;
      end
      distinct = 0;
      foreach (used[i]) distinct += used[i] ? 1 : 0;
      check(distinct >= 2, $sformatf("stream used %0d left channel(s)", distinct));
      check(exp_dst.size() == 0, "stream packets lost");
    end

    // ---- 3. random traffic
    begin
      int left;
      left = NPKT;
      while (left > 0 || exp_dst.size() > 0) begin
        for (int c = 0; c < int'(WL); c++)
          if (!l_in[c].valid && left > 0 && $urandom_range(0, 7) == 0) begin
            l_in[c] = mk($urandom_range(0, 1) ? int'($urandom_range(8, 15)) : int'($urandom_range(16, 31)));
            left--;
          end
        for (int c = 0; c < int'(WR); c++)
          if (!r_in[c].valid && left > 0 && $urandom_range(0, 3) == 0) begin
            r_in[c] = mk($urandom_range(0, 1) ? int'($urandom_range(0, 7)) : int'($urandom_range(16, 31)));
            left--;
          end
        for (int c = 0; c < int'(WP); c++)
          if (!p_in[c].valid && left > 0) begin
            p_in[c] = mk(int'($urandom_range(0, 15)));
            left--;
          end
        @(posedge clk);
        #1;
        if (deflect) n_defl++;
        collect(got);
        @(negedge clk);
      end
    end
    check(n_defl > 0, "no deflection happened");
    check(n_bounce > 0, "no packet was turned back");
    begin
      int unused;
      unused = 0;
      foreach (l_hits[i]) if (l_hits[i] == 0) unused++;
      foreach (r_hits[i]) if (r_hits[i] == 0) unused++;
      check(unused == 0, $sformatf("%0d subtree channels never received a packet", unused));
    end
    $display("cycles=%0d deflect-cycles=%0d turned-back=%0d spread=%0d", cycle, n_defl, n_bounce, distinct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
