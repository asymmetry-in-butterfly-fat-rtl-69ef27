// asym_bft_tb: end-to-end testbench of the asymmetric BFT at its default size
// (256 PEs, AS1 composition, 64-16-8 converging switch), with no parameter
// overridden.
//
// Behavioural PEs inject packets and check what they receive. Phases:
//   1. lone packets in an empty network, whose delivery time must equal the
//      number of switch hops on the path (one cycle per hop), e.g. 18 cycles
//      from PE 0 (st-0) to PE 255 (st-3): 6 levels up st-0, 2 pre-stages,
//      the pairing stage and 1 t-random stage of the converging switch, the
//      root, the level-1 t node of st-2/st-3 and 6 levels down st-3;
//   2. the four synthetic traffic patterns of the evaluation, MSGS packets
//      per sending PE each, PEs trying to inject every cycle (slow senders
//      with probability 1/SLOW):
//        Test-0 every PE sends to random PEs;
//        Test-1 all PEs of st-0,1 and a quarter of st-2,3 send to random PEs;
//        Test-2 st-0,1 send within st-0,1, st-2,3 send slowly to st-0,1;
//        Test-3 st-0 sends within st-0, st-1,2,3 send slowly to st-0.
// Every packet must reach its destination exactly once with its data and
// sequence number intact. Throughput (packets/cycle/PE) is printed per test.
// Deflections in every region (each quarter, each level-1 node, root) and
// refused injections must each be seen at least once.
module asym_bft_tb;
  import bft_pkg::*;

  localparam int unsigned NPE   = 256;
  localparam int unsigned QPE   = NPE / 4;
  localparam int unsigned MSGS  = 1024;  // messages per PE, as in the evaluation
  localparam int unsigned SLOW  = 8;
  localparam int unsigned LIMIT = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pkt_t pe_in  [NPE];
  logic pe_rdy [NPE];
  pkt_t pe_out [NPE];
  logic [6:0] deflect;

  asym_bft dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_defl [7];
  int n_stall = 0;
  int exp_dst [int];
  int exp_seq [int];
  int tag_ctr = 1;
  int seq_ctr [NPE];

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

  function automatic pkt_t mk(input int src, input int dst);
    pkt_t p;
    p.valid = 1'b1;
    p.addr  = 8'(dst);
    p.seq   = SEQ_W'(seq_ctr[src]);
    p.data  = DATA_W'(tag_ctr);
    exp_dst[tag_ctr] = dst;
    exp_seq[tag_ctr] = seq_ctr[src] % (2 ** SEQ_W);
    seq_ctr[src]++;
    tag_ctr++;
    return p;
  endfunction

  // deliveries, sampled just after a rising edge
  task automatic collect(output int got, output int last_pe);
    got = 0;
    last_pe = -1;
    for (int p = 0; p < int'(NPE); p++)
      if (pe_out[p].valid) begin
        int t;
        t = int'(pe_out[p].data);
        check(exp_dst.exists(t), "unknown or duplicate packet delivered");
        if (exp_dst.exists(t)) begin
          check(exp_dst[t] == p && int'(pe_out[p].addr) == p, "packet delivered to the wrong PE");
          check(exp_seq[t] == int'(pe_out[p].seq), "sequence number corrupted");
          exp_dst.delete(t);
          exp_seq.delete(t);
        end
        got++;
        last_pe = p;
      end
    for (int r = 0; r < 7; r++) if (deflect[r]) n_defl[r]++;
  endtask

  task automatic lone(input int s, input int d, input int hops);
    int got, lp, t0, lat;
    @(negedge clk);
    pe_in[s] = mk(s, d);
    #1 check(pe_rdy[s], "injection into an empty network refused");
    t0 = cycle;
    lat = -1;
    for (int w = 0; w < 60 && lat < 0; w++) begin
      @(posedge clk);
      #1;
      pe_in[s] = PKT_IDLE;
      collect(got, lp);
      if (got > 0) lat = cycle - t0;
    end
    check(lat == hops, $sformatf("lone packet %0d->%0d took %0d cycles, expected %0d", s, d, lat, hops));
  endtask

  function automatic int quarter(input int p);
    return p / QPE;
  endfunction

  function automatic int rnd_in(input int q0, input int nq);
    return int'($urandom_range(q0 * QPE, (q0 + nq) * QPE - 1));
  endfunction

  // one traffic pattern; returns throughput x1000
  task automatic run_test(input int test);
    pkt_t q [NPE][$];
    bit   slow [NPE];
    int   t0, total, got, lp;
    total = 0;
    for (int p = 0; p < int'(NPE); p++) begin
      int qd;
      bit active;
      qd = quarter(p);
      slow[p] = 1'b0;
      active = 1'b1;
      if (test == 1 && qd >= 2 && (p % 4) != 0) active = 1'b0;
      if ((test == 2 && qd >= 2) || (test == 3 && qd >= 1)) slow[p] = 1'b1;
      if (active)
        for (int m = 0; m < int'(MSGS); m++) begin
          int d;
          case (test)
            0, 1: d = rnd_in(0, 4);
            2:    d = rnd_in(0, 2);
            default: d = (qd == 0) ? rnd_in(0, 1) : rnd_in(0, 1);
          endcase
          if (d == p) d = d ^ 1;
          q[p].push_back(mk(p, d));
          total++;
        end
    end
    t0 = cycle;
    while (exp_dst.size() > 0) begin
      @(negedge clk);
      for (int p = 0; p < int'(NPE); p++)
        pe_in[p] = (q[p].size() > 0 && (!slow[p] || $urandom_range(0, SLOW - 1) == 0)) ? q[p][0] : PKT_IDLE;
      #1;
      for (int p = 0; p < int'(NPE); p++)
        if (pe_in[p].valid) begin
          if (pe_rdy[p]) void'(q[p].pop_front());
          else n_stall++;
        end
      @(posedge clk);
      #1;
      collect(got, lp);
      if (cycle - t0 > 150000) break;
    end
    @(negedge clk);
    foreach (pe_in[p]) pe_in[p] = PKT_IDLE;
    check(exp_dst.size() == 0, $sformatf("Test-%0d: %0d packets not delivered", test, exp_dst.size()));
    $display("Test-%0d: %0d packets in %0d cycles, throughput %0.4f pkt/cycle/PE", test, total,
             cycle - t0, real'(total) / real'(cycle - t0) / real'(NPE));
  endtask

  initial begin
    foreach (pe_in[i]) pe_in[i] = PKT_IDLE;
    foreach (seq_ctr[i]) seq_ctr[i] = 0;
    foreach (n_defl[i]) n_defl[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---- 1. lone packets: hop counts of the AS1 network
    lone(0, 1, 1);        // same level-7 switch
    lone(0, 2, 3);
    lone(0, 63, 11);      // across st-0 (meet at level 2)
    lone(0, 64, 15);      // st-0 -> st-1: 6 up, 2 pre-stages, pairing, 6 down
    lone(64, 0, 15);
    lone(0, 255, 18);     // st-0 -> st-3 via the root
    lone(255, 0, 18);
    lone(70, 200, 16);    // st-1 -> st-3: 6 up, pairing, t-random, root, level-1 t, 6 down
    lone(128, 192, 13);   // st-2 -> st-3: 6 up, level-1 t, 6 down

    // ---- 2. synthetic traffic
    for (int t = 0; t < 4; t++) run_test(t);

    for (int r = 0; r < 7; r++)
      check(n_defl[r] > 0, $sformatf("no deflection in region %0d", r));
    check(n_stall > 0, "no injection was refused");
    $display("deflect-cycles st0..st3 %0d %0d %0d %0d, level-1 %0d %0d, root %0d; refused injections %0d",
             n_defl[0], n_defl[1], n_defl[2], n_defl[3], n_defl[4], n_defl[5], n_defl[6], n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
