// bft_subtree_tb: self-checking testbench for bft_subtree.
//
// A 16-PE subtree rooted at level 1 of a 32-PE address space (AW = 5, PREFIX
// = 1) with mixed switch types (levels 4..1: pi, t, pi, pi) is exercised by
//   1. lone packets in an empty network, whose delivery time must equal the
//      hop count 2*(4 - L) + 1, L being the level where source and destination
//      subtrees meet;
//   2. random traffic: every PE sends MSGS packets to random PEs, inside or
//      outside the subtree, and packets enter from the parent level addressed
//      to PEs inside. The parent level is modelled here: a packet that leaves
//      upward but is addressed inside the subtree (it was deflected upward)
//      is sent back down on the same channel in the next cycle; one addressed
//      outside is counted as delivered.
// Every packet must arrive exactly once, at its own PE or outside. Deflections
// and refused injections must occur.
module bft_subtree_tb;
  import bft_pkg::*;

  localparam int unsigned AW    = 5;
  localparam int unsigned LEVEL = 1;
  localparam logic [31:0] PREFIX = 32'd1;
  localparam logic [31:0] COMP  = 32'b1_1010;   // levels 4,3,1 pi; level 2 t
  localparam int unsigned NPE   = 2 ** (AW - LEVEL);
  localparam int unsigned UPW   = up_width(COMP, LEVEL, AW);
  localparam int unsigned MSGS  = 64;
  localparam int unsigned LIMIT = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pkt_t pe_in  [NPE];
  logic pe_rdy [NPE];
  pkt_t pe_out [NPE];
  pkt_t up_in  [UPW];
  pkt_t up_out [UPW];
  logic deflect;

  bft_subtree #(.AW(AW), .LEVEL(LEVEL), .PREFIX(PREFIX), .COMP(COMP)) dut (.*);

  int checks = 0, failures = 0;
  int n_defl = 0, n_stall = 0, n_bounce = 0, n_out = 0, n_ext = 0;
  int cycle = 0;
  int exp_dst [int];       // tag -> destination address
  int sent [NPE];
  int tag_ctr = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic bit inside_st(input logic [7:0] a);
    return (a[AW-1:0] >> (AW - LEVEL)) == PREFIX[AW-1:0];
  endfunction

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (LIMIT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // delivery monitor (sampled just after each rising edge)
  task automatic collect(input bit bounce_ok);
    for (int p = 0; p < int'(NPE); p++) begin
      if (pe_out[p].valid) begin
        int t;
        t = int'(pe_out[p].data);
        check(exp_dst.exists(t), "unknown packet delivered to a PE");
        if (exp_dst.exists(t)) begin
          check(exp_dst[t] == int'(pe_out[p].addr), "packet at the wrong PE");
          check(pe_out[p].addr[AW-1:0] == AW'((PREFIX << (AW - LEVEL)) | p), "PE port mismatch");
          exp_dst.delete(t);
        end
      end
    end
    for (int c = 0; c < int'(UPW); c++) begin
      up_in[c] = PKT_IDLE;
      if (up_out[c].valid) begin
        if (inside_st(up_out[c].addr)) begin
          up_in[c] = up_out[c];          // turned back by the parent level
          n_bounce++;
          check(bounce_ok, "packet left a lone-packet test upward");
        end else begin
          int t;
          t = int'(up_out[c].data);
          check(exp_dst.exists(t) && exp_dst[t] == int'(up_out[c].addr), "bad packet leaving upward");
          exp_dst.delete(t);
          n_out++;
        end
      end
    end
  endtask

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

  initial begin
    pkt_t q [NPE][$];
    foreach (pe_in[i]) pe_in[i] = PKT_IDLE;
    foreach (up_in[i]) up_in[i] = PKT_IDLE;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---- 1. lone packets: latency equals hop count
    for (int s = 0; s < int'(NPE); s += 3) begin
      for (int d = 0; d < int'(NPE); d += 5) begin
        int dst, lca, t0, lat;
        if (d == s) continue;
        dst = int'((PREFIX << (AW - LEVEL)) | d);
        lca = AW - 1;
        while (((s ^ d) >> (AW - lca)) != 0) lca--;
        @(negedge clk);
        pe_in[s] = mk(dst);
        #1 check(pe_rdy[s], "injection into an empty network refused");
        t0 = cycle;
        @(negedge clk);
        pe_in[s] = PKT_IDLE;
        lat = -1;
        for (int w = 0; w < 40 && lat < 0; w++) begin
          if (pe_out[d].valid) lat = cycle - t0;
          else @(negedge clk);
        end
        check(lat == 2 * (AW - 1 - lca) + 1,
              $sformatf("lone packet %0d->%0d took %0d cycles, expected %0d", s, d, lat, 2 * (AW - 1 - lca) + 1));
        exp_dst.delete(int'(pe_out[d].data));
        repeat (2) @(negedge clk);
      end
    end
    check(exp_dst.size() == 0, "lone packets missing");

    // ---- 2. random traffic
    for (int p = 0; p < int'(NPE); p++)
      for (int m = 0; m < int'(MSGS); m++) begin
        int dst;
        if ($urandom_range(0, 3) == 0) dst = int'($urandom_range(0, 2 ** AW - 1));
        else dst = int'((PREFIX << (AW - LEVEL)) | $urandom_range(0, NPE - 1));
        if (dst == int'((PREFIX << (AW - LEVEL)) | p)) dst ^= 1;
        q[p].push_back(mk(dst));
        n_ext += inside_st(8'(dst)) ? 0 : 1;
      end
    begin
      int ext_left;
      ext_left = 200;
      while (exp_dst.size() > 0) begin
        // drive injections
        for (int p = 0; p < int'(NPE); p++) pe_in[p] = (q[p].size() > 0) ? q[p][0] : PKT_IDLE;
        for (int c = 0; c < int'(UPW); c++)
          if (!up_in[c].valid && ext_left > 0 && $urandom_range(0, 3) == 0) begin
            up_in[c] = mk(int'((PREFIX << (AW - LEVEL)) | $urandom_range(0, NPE - 1)));
            ext_left--;
          end
        #1;
        for (int p = 0; p < int'(NPE); p++)
          if (pe_in[p].valid) begin
            if (pe_rdy[p]) void'(q[p].pop_front());
            else n_stall++;
          end
        @(posedge clk);
        #1;
        if (deflect) n_defl++;
        collect(1'b1);
        @(negedge clk);
      end
    end
    check(exp_dst.size() == 0, "packets missing");
    check(n_defl > 0, "no deflection happened");
    check(n_stall > 0, "no injection was refused");
    check(n_out == n_ext, $sformatf("%0d packets left upward, %0d expected", n_out, n_ext));
    $display("cycles=%0d deflect-cycles=%0d stalls=%0d bounced=%0d upward=%0d", cycle, n_defl, n_stall, n_bounce, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
