// t_random_switch_tb: self-checking testbench for t_random_switch.
//
// Random packets (70% valid per port, destinations inside and outside the
// switch's subtree, unique data tags) are driven into a level-1 instance. Each
// cycle the outputs are compared, one cycle later, with rules worked out here
// from the inputs alone:
//   * every accepted packet leaves on exactly one port after one cycle and no
//     packet is invented (conservation);
//   * a packet from a parent whose destination is outside the subtree leaves
//     on a parent port (turned back with priority);
//   * a port that some packet wanted carries a packet that wanted it;
//   * the first parent packet that wants a child gets it;
//   * deflect is 1 exactly when some packet left on a port it did not want;
//   * a packet coming down goes left in even cycles after reset and right in
//     odd ones, unless an earlier packet took that child.
// Deflections and both downward directions must be seen at least once.
module t_random_switch_tb;
  import bft_pkg::*;

  localparam int unsigned AW = 8;
  localparam int unsigned NP = 1;
  localparam int unsigned NI = NP + 2;
  localparam int unsigned NCYC = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_defl = 0;
  int n_stall = 0;
  int n_dir [2] = '{0, 0};
  int cyc = 0;   // cycles since reset release

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // one harness per instance
  typedef struct {
    pkt_t in [NI];        // 0..NP-1 parents, NP left, NP+1 right
    logic acc [NI];
  } rec_t;

  // instance mid: LEVEL 1
  pkt_t mid_pin [NP], mid_pout [NP], mid_cin [2], mid_cout [2];
  logic mid_crdy [2];
  logic mid_dfl;
  rec_t mid_rec;
  t_random_switch #(.AW(AW), .LEVEL(1), .PREFIX(32'h1)) u_mid (
    .clk, .rst_n, .p_in(mid_pin), .p_out(mid_pout), .c_in(mid_cin),
    .c_rdy(mid_crdy), .c_out(mid_cout), .deflect(mid_dfl));


  // desired output (0..NP-1 = any parent -> returns NP+2 as "up")
  function automatic int desired(input pkt_t p, input int unsigned lvl, input logic [31:0] pfx,
                                 input bit rnd, input int c);
    logic [AW-1:0] a;
    a = p.addr[AW-1:0];
    if (NP != 0 && lvl != 0 && ((a >> (AW - lvl)) != pfx[AW-1:0])) return NI;   // up
    if (rnd) return NP + ((c + 1) % 2);
    return NP + int'(a[AW-1-lvl]);
  endfunction

  function automatic pkt_t rand_pkt(input int unsigned lvl, input logic [31:0] pfx,
                                    input int tag, input bit leaf, input int port);
    pkt_t p;
    logic [AW-1:0] a;
    p.valid = ($urandom_range(0, 99) < 70);
    a = AW'($urandom());
    if ($urandom_range(0, 99) < 60) a = AW'((pfx << (AW - lvl)) | (a & ((1 << (AW - lvl)) - 1)));
    if (leaf && port >= int'(NP) && a == AW'((pfx << 1) | (port - NP))) a[0] = ~a[0];
    p.addr = AW'(a);
    p.seq  = SEQ_W'($urandom());
    p.data = DATA_W'(tag);
    return p;
  endfunction

  task automatic judge(input rec_t r, input pkt_t outs [NI], input logic dfl,
                       input int unsigned lvl, input logic [31:0] pfx, input bit rnd,
                       input bit leaf, input int c);
    int want [NI];
    int where [NI];
    bit any_defl;
    bit child_taken [2];
    any_defl = 1'b0;
    child_taken = '{1'b0, 1'b0};
    for (int i = 0; i < int'(NI); i++) begin
      want[i] = r.in[i].valid ? desired(r.in[i], lvl, pfx, rnd, c) : -1;
      where[i] = -1;
    end
    // conservation
    for (int o = 0; o < int'(NI); o++) begin
      int hits;
      hits = 0;
      if (outs[o].valid) begin
        for (int i = 0; i < int'(NI); i++)
          if (r.in[i].valid && r.acc[i] && outs[o] == r.in[i]) begin
            hits++;
            where[i] = o;
          end
        check(hits == 1, $sformatf("output %0d carries an unknown packet", o));
      end
    end
    for (int i = 0; i < int'(NI); i++) begin
      if (r.in[i].valid && r.acc[i]) begin
        check(where[i] >= 0, $sformatf("input %0d packet lost", i));
        if (where[i] >= 0) begin
          if (want[i] == int'(NI)) begin
            if (where[i] >= int'(NP)) any_defl = 1'b1;
          end else if (where[i] != want[i]) any_defl = 1'b1;
        end
      end
    end
    // turned-back and parent priority
    for (int i = 0; i < int'(NP); i++) begin
      if (r.in[i].valid && want[i] == int'(NI))
        check(where[i] >= 0 && where[i] < int'(NP), "out-of-subtree parent packet not sent up");
      if (r.in[i].valid && want[i] >= int'(NP) && want[i] < int'(NI)) begin
        if (!child_taken[want[i] - NP])
          check(where[i] == want[i], "first parent packet did not get its child");
        child_taken[want[i] - NP] = 1'b1;
      end
    end
    // productive: a wanted child port carries a packet that wanted it, and the
    // parent ports carry as many upward packets as they can
    begin
      int n_up, n_up_placed;
      n_up = 0;
      n_up_placed = 0;
      for (int i = 0; i < int'(NI); i++)
        if (r.in[i].valid && r.acc[i] && want[i] == int'(NI)) begin
          n_up++;
          if (where[i] >= 0 && where[i] < int'(NP)) n_up_placed++;
        end
      check(n_up_placed == ((n_up < int'(NP)) ? n_up : int'(NP)), "parent ports not used by upward packets");
    end
    for (int o = int'(NP); o < int'(NI); o++) begin
      bit wanted;
      wanted = 1'b0;
      for (int i = 0; i < int'(NI); i++)
        if (r.in[i].valid && r.acc[i] && want[i] == o) wanted = 1'b1;
      if (wanted) begin
        bit good;
        good = 1'b0;
        for (int i = 0; i < int'(NI); i++)
          if (where[i] == o && want[i] == o) good = 1'b1;
        check(good, $sformatf("port %0d wanted but not used productively", o));
      end
    end
    check(dfl == any_defl, $sformatf("deflect flag %0d, expected %0d", dfl, any_defl));
    if (failures > 0 && failures < 4) begin
      for (int i = 0; i < int'(NI); i++) $display("  in%0d v=%0d a=%h acc=%0d want=%0d where=%0d", i, r.in[i].valid, r.in[i].addr, r.acc[i], want[i], where[i]);
      for (int o = 0; o < int'(NI); o++) $display("  out%0d v=%0d a=%h d=%0d", o, outs[o].valid, outs[o].addr, outs[o].data);
    end
    if (any_defl) n_defl++;
    for (int i = int'(NP); i < int'(NI); i++)
      if (r.in[i].valid && !rnd && want[i] >= int'(NP) && want[i] < int'(NI)) n_dir[want[i] - NP]++;
    for (int i = 0; i < int'(NP); i++)
      if (r.in[i].valid && rnd && where[i] >= int'(NP)) begin
        check(where[i] == want[i] || child_taken[want[i]-NP], "t-random direction not followed");
        n_dir[where[i] - NP]++;
      end
    if (leaf) begin
      for (int o = int'(NP); o < int'(NI); o++)
        if (outs[o].valid)
          check(outs[o].addr[AW-1:0] == AW'((pfx << 1) | (o - NP)), "PE handed a packet for another PE");
      for (int i = int'(NP); i < int'(NI); i++)
        if (r.in[i].valid) begin
          if (r.acc[i]) check(where[i] == want[i] || (want[i] == int'(NI) && where[i] < int'(NP)),
                              "accepted injection not on its desired port");
          else begin
            n_stall++;
            check((want[i] < int'(NI)) ? outs[want[i]].valid : 1'b1, "injection refused although its port was free");
          end
        end
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NP); i++) mid_pin[i] = PKT_IDLE;
    mid_cin[0] = PKT_IDLE;
    mid_cin[1] = PKT_IDLE;

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCYC; k++) begin
      @(negedge clk);
      for (int i = 0; i < int'(NP); i++) mid_pin[i] = rand_pkt(1, 32'h1, 0 + k*8 + i, 0, i);
      for (int i = 0; i < 2; i++) mid_cin[i] = rand_pkt(1, 32'h1, 0 + k*8 + 4 + i, 0, NP + i);

      #1;
      for (int i = 0; i < int'(NP); i++) begin mid_rec.in[i] = mid_pin[i]; mid_rec.acc[i] = 1'b1; end
      for (int i = 0; i < 2; i++) begin mid_rec.in[NP+i] = mid_cin[i]; mid_rec.acc[NP+i] = mid_crdy[i]; end

      @(posedge clk);
      #1;
      begin
        pkt_t o [NI];
        for (int i = 0; i < int'(NP); i++) o[i] = mid_pout[i];
        o[NP] = mid_cout[0];
        o[NP+1] = mid_cout[1];
        judge(mid_rec, o, mid_dfl, 1, 32'h1, 1'b1, 1'b0, cyc);
      end

      cyc++;
    end
    check(n_defl > 0, "no deflection was exercised");
    check(n_dir[0] > 0 && n_dir[1] > 0, "t-random never used both directions");

    $display("deflections=%0d stalls=%0d dir=%0d/%0d", n_defl, n_stall, n_dir[0], n_dir[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
