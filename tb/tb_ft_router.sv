// tb_ft_router: end-to-end test of the fault-tolerant router at its default sizes.
//
// The router sits at mesh position (3,3). Behind every input port a source model
// keeps per-VC credits, opens packets on free downstream VCs and sends one flit per
// cycle; behind every output port a sink checks the flits and returns credits after a
// random delay. Each flit carries its packet number and sequence number, so the
// scoreboard can check, independently of the router, that every packet leaves on the
// port XY routing names, in order, on a single output VC, with head and tail markers
// where they belong, and that every packet is delivered.
//
// Directed cases first measure the head-flit latency on an empty router, from the
// cycle a flit is driven on an input link to the cycle it is seen on the output link:
// five cycles fault free (buffer write, then one per pipeline stage), unchanged with
// a faulty primary routing unit, a faulty VA arbiter set (borrowed from an idle sibling) and a faulty crossbar
// multiplexer (secondary path), and one cycle more when the port's first SA arbiter is
// faulty and the flit has to be moved into the default-winner VC. Then random traffic
// runs fault free and under a set of permanent faults, one or more in every stage,
// and the test counts how often each mechanism acted: duplicate RC, VA arbiter
// borrowing, SA bypass, VC-to-VC transfer, secondary crossbar path, and VA retry
// around a faulty second-stage arbiter (the faulty downstream VC must never be used).
// A last phase applies the largest fault set the design tolerates at once, 27 faults:
// every primary RC unit, three of the four VA arbiter sets of every port, every
// first-stage SA arbiter, and crossbar multiplexers M2 and M4.
module tb_ft_router;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  localparam logic [2:0] MY_X = 3'd3, MY_Y = 3'd3;
  localparam int MAXPKT = 4096;

  logic  [NUM_PORTS-1:0]            in_valid;
  vc_t   [NUM_PORTS-1:0]            in_vc;
  flit_t [NUM_PORTS-1:0]            in_flit;
  logic  [NUM_PORTS-1:0]            credit_out_valid;
  vc_t   [NUM_PORTS-1:0]            credit_out_vc;
  logic  [NUM_PORTS-1:0]            out_valid;
  vc_t   [NUM_PORTS-1:0]            out_vc;
  flit_t [NUM_PORTS-1:0]            out_flit;
  logic  [NUM_PORTS-1:0]            credit_in_valid;
  vc_t   [NUM_PORTS-1:0]            credit_in_vc;
  logic  [NUM_PORTS-1:0]            f_rc_p, f_rc_d, f_sa1, f_sa2, f_xb;
  logic  [NUM_IVC-1:0]              f_va1;
  logic  [NUM_PORTS-1:0][NUM_VCS-1:0] f_va2;
  logic  [NUM_PORTS-1:0]            ev_rc_dup, ev_sa_bypass, ev_xfer, ev_secondary;
  logic  [NUM_IVC-1:0]              ev_va_borrow;

  ft_router dut (
    .clk(clk), .rst_n(rst_n), .cur_x(MY_X), .cur_y(MY_Y),
    .in_valid(in_valid), .in_vc(in_vc), .in_flit(in_flit),
    .credit_out_valid(credit_out_valid), .credit_out_vc(credit_out_vc),
    .out_valid(out_valid), .out_vc(out_vc), .out_flit(out_flit),
    .credit_in_valid(credit_in_valid), .credit_in_vc(credit_in_vc),
    .fault_rc_primary(f_rc_p), .fault_rc_dup(f_rc_d), .fault_va1(f_va1),
    .fault_va2(f_va2), .fault_sa1(f_sa1), .fault_sa2(f_sa2), .fault_xb(f_xb),
    .ev_rc_dup(ev_rc_dup), .ev_va_borrow(ev_va_borrow), .ev_sa_bypass(ev_sa_bypass),
    .ev_xfer(ev_xfer), .ev_secondary(ev_secondary)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference XY routing ----------------
  function automatic int ref_port(logic [5:0] dest);
    int x, y;
    x = dest[2:0];
    y = dest[5:3];
    if (x > MY_X) return 2;
    if (x < MY_X) return 4;
    if (y > MY_Y) return 1;
    if (y < MY_Y) return 3;
    return 0;
  endfunction

  function automatic flit_t make_flit(int id, int seq, int len, logic [5:0] dest);
    flit_t f;
    f        = '0;
    f[31]    = (seq == 0);
    f[30]    = (seq == len - 1);
    f[29:24] = dest;
    f[23:12] = id[11:0];
    f[11:8]  = seq[3:0];
    f[7:0]   = 8'(id * 7 + seq);
    return f;
  endfunction

  // ---------------- scoreboard ----------------
  int   pk_port [MAXPKT];
  int   pk_len  [MAXPKT];
  int   pk_next [MAXPKT];
  int   pk_vc   [MAXPKT];
  logic [5:0] pk_dest [MAXPKT];
  int   next_id, delivered, created;
  int   ovc_owner [NUM_PORTS][NUM_VCS];   // packet holding an output VC, -1 free
  int   va2_bad_o, va2_bad_v;              // downstream VC whose VA arbiter is faulty
  int   last_out_cycle, last_in_cycle;

  // ---------------- source models ----------------
  int  src_cred [NUM_PORTS][NUM_VCS];
  int  src_pkt  [NUM_PORTS][NUM_VCS];     // -1: VC free at source side
  int  src_seq  [NUM_PORTS][NUM_VCS];
  int  src_rr   [NUM_PORTS];
  bit  gen_on;
  int  gen_rate;                           // percent per cycle per port
  int  max_pkts;

  // ---------------- sink models ----------------
  int  snk_q [NUM_PORTS][$];

  // mechanism counters
  int n_rc_dup, n_borrow, n_bypass, n_xfer, n_secondary, n_va2_avoid;

  task automatic reset_router();
    rst_n = 1'b0;
    in_valid = '0; in_vc = '0; in_flit = '0;
    credit_in_valid = '0; credit_in_vc = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      snk_q[p].delete();
      src_rr[p] = 0;
      for (int v = 0; v < NUM_VCS; v++) begin
        src_cred[p][v]  = BUF_DEPTH;
        src_pkt[p][v]   = -1;
        src_seq[p][v]   = 0;
        ovc_owner[p][v] = -1;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic clear_faults();
    f_rc_p = '0; f_rc_d = '0; f_va1 = '0; f_va2 = '0;
    f_sa1 = '0; f_sa2 = '0; f_xb = '0;
    va2_bad_o = -1; va2_bad_v = -1;
  endtask

  // Opens a packet at the source side of input port p on VC v.
  task automatic open_packet(int p, int v, logic [5:0] dest, int len);
    int id;
    id = next_id % MAXPKT;
    next_id++;
    created++;
    pk_port[id] = ref_port(dest);
    pk_len[id]  = len;
    pk_next[id] = 0;
    pk_vc[id]   = -1;
    pk_dest[id] = dest;
    src_pkt[p][v] = id;
    src_seq[p][v] = 0;
  endtask

  // One cycle of all models, run at the falling edge.
  task automatic step_models();
    // Sinks: check what the router put out at the last rising edge.
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (out_valid[o]) begin
        int id, seq;
        flit_t f;
        f   = out_flit[o];
        id  = f[23:12];
        seq = f[11:8];
        last_out_cycle = cycle;
        check(pk_port[id] == o, $sformatf("pkt %0d left on port %0d, expected %0d", id, o, pk_port[id]));
        check(pk_next[id] == seq, $sformatf("pkt %0d flit %0d out of order (exp %0d)", id, seq, pk_next[id]));
        check(f[31] == (seq == 0) && f[30] == (seq == pk_len[id] - 1) && f[7:0] == 8'(id * 7 + seq),
              $sformatf("pkt %0d flit %0d content", id, seq));
        if (seq == 0) begin
          check(ovc_owner[o][out_vc[o]] == -1, $sformatf("output VC %0d/%0d taken twice", o, out_vc[o]));
          ovc_owner[o][out_vc[o]] = id;
          pk_vc[id] = out_vc[o];
          if (va2_bad_o >= 0) begin
            check(!(o == va2_bad_o && out_vc[o] == va2_bad_v), "faulty VA arbiter's VC was allocated");
            if (o == va2_bad_o) n_va2_avoid++;
          end
        end else begin
          check(pk_vc[id] == out_vc[o], $sformatf("pkt %0d changed output VC", id));
        end
        pk_next[id] = seq + 1;
        if (seq == pk_len[id] - 1) begin
          delivered++;
          ovc_owner[o][out_vc[o]] = -1;
        end
        snk_q[o].push_back(out_vc[o]);
      end
    end
    // Sinks return credits, one per port per cycle, not always at once.
    for (int o = 0; o < NUM_PORTS; o++) begin
      credit_in_valid[o] = 1'b0;
      if (snk_q[o].size() > 0 && $urandom_range(99) < 70) begin
        credit_in_valid[o] = 1'b1;
        credit_in_vc[o]    = vc_t'(snk_q[o].pop_front());
      end
    end
    // Sources: credits back from the router.
    for (int p = 0; p < NUM_PORTS; p++)
      if (credit_out_valid[p]) src_cred[p][credit_out_vc[p]]++;
    // Mechanism counters.
    n_rc_dup    += $countones(ev_rc_dup);
    n_borrow    += $countones(ev_va_borrow);
    n_bypass    += $countones(ev_sa_bypass);
    n_xfer      += $countones(ev_xfer);
    n_secondary += $countones(ev_secondary);
    // Sources: open packets and send one flit per port.
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_valid[p] = 1'b0;
      if (gen_on && created < max_pkts && $urandom_range(99) < gen_rate) begin
        int v;
        v = $urandom_range(NUM_VCS - 1);
        if (src_pkt[p][v] < 0 && src_cred[p][v] == BUF_DEPTH)
          open_packet(p, v, 6'($urandom_range(63)), 1 + $urandom_range(5));
      end
      for (int k = 0; k < NUM_VCS; k++) begin
        int v;
        v = (src_rr[p] + k) % NUM_VCS;
        if (!in_valid[p] && src_pkt[p][v] >= 0 && src_cred[p][v] > 0) begin
          int id;
          id = src_pkt[p][v];
          in_valid[p] = 1'b1;
          in_vc[p]    = vc_t'(v);
          in_flit[p]  = make_flit(id, src_seq[p][v], pk_len[id], pk_dest[id]);
          last_in_cycle = cycle;
          src_cred[p][v]--;
          src_seq[p][v]++;
          if (src_seq[p][v] == pk_len[id]) src_pkt[p][v] = -1;
          src_rr[p] = (v + 1) % NUM_VCS;
        end
      end
    end
  endtask

  always @(negedge clk) if (rst_n) step_models();

  // Sends one single-flit packet from port p on VC v and returns the number of
  // cycles until it appears at the output.
  task automatic one_packet_latency(int p, int v, logic [5:0] dest, output int lat);
    int start, d0;
    d0 = delivered;
    @(negedge clk);
    open_packet(p, v, dest, 1);
    start = cycle;
    while (delivered == d0 && cycle < start + 50) @(negedge clk);
    // from the cycle the flit is driven on the link to the cycle it is seen leaving
    lat = last_out_cycle - last_in_cycle;
  endtask

  task automatic run_random(int npk, int rate);
    int c0;
    created  = 0;
    max_pkts = npk;
    gen_rate = rate;
    delivered = 0;
    gen_on   = 1'b1;
    c0 = cycle;
    while (delivered < npk && cycle < c0 + 60000) @(negedge clk);
    gen_on = 1'b0;
    check(delivered == npk, $sformatf("delivered %0d of %0d packets", delivered, npk));
    repeat (20) @(negedge clk);
  endtask

  int lat;
  initial begin
    next_id = 0; delivered = 0; created = 0; gen_on = 1'b0; gen_rate = 0; max_pkts = 0;
    n_rc_dup = 0; n_borrow = 0; n_bypass = 0; n_xfer = 0; n_secondary = 0; n_va2_avoid = 0;
    last_out_cycle = 0; last_in_cycle = 0;
    clear_faults();
    reset_router();

    // ---- zero-load latency, fault free: one cycle per pipeline stage ----
    one_packet_latency(1, 0, {3'd4, 3'd3}, lat);      // to north
    check(lat == 5, $sformatf("fault-free latency %0d, expected 5", lat));
    one_packet_latency(0, 2, {3'd3, 3'd6}, lat);      // to east
    check(lat == 5, $sformatf("fault-free latency %0d, expected 5", lat));

    // ---- duplicate RC unit: no extra latency ----
    clear_faults(); f_rc_p[2] = 1'b1; reset_router();
    one_packet_latency(2, 1, {3'd3, 3'd0}, lat);      // to west
    check(lat == 5, $sformatf("latency with duplicate RC %0d, expected 5", lat));
    // both RC units of a port faulty: the packet cannot be routed
    clear_faults(); f_rc_p[2] = 1'b1; f_rc_d[2] = 1'b1; reset_router();
    begin
      int d0;
      d0 = delivered;
      one_packet_latency(2, 1, {3'd3, 3'd0}, lat);
      check(delivered == d0, "packet routed although both RC units are faulty");
    end

    // ---- VA arbiter borrowing from an idle VC: no extra latency ----
    clear_faults(); f_va1[3*NUM_VCS + 0] = 1'b1; reset_router();
    one_packet_latency(3, 0, {3'd0, 3'd3}, lat);      // to south
    check(lat == 5, $sformatf("latency with borrowed VA arbiters %0d, expected 5", lat));

    // ---- crossbar secondary path (M3 faulty, out3 = east via M2): no extra latency ----
    clear_faults(); f_xb[2] = 1'b1; reset_router();
    one_packet_latency(4, 3, {3'd3, 3'd7}, lat);      // to east
    check(lat == 5, $sformatf("latency over secondary path %0d, expected 5", lat));

    // ---- SA bypass with transfer into the default winner: one extra cycle ----
    clear_faults(); f_sa1[1] = 1'b1; reset_router();
    while (dut.u_sa.tmr_q != '0) @(negedge clk);
    one_packet_latency(1, int'(dut.u_sa.dw_q[1]) ^ 1, {3'd3, 3'd3}, lat);   // to local
    check(lat == 6, $sformatf("latency with VC transfer %0d, expected 6", lat));

    // ---- random traffic, fault free ----
    clear_faults(); reset_router();
    run_random(400, 30);

    // ---- random traffic under faults in every stage ----
    clear_faults();
    f_rc_p[0] = 1'b1;  f_rc_p[4] = 1'b1;                 // RC: primaries of two ports
    f_va1[1*NUM_VCS + 0] = 1'b1;                          // VA stage 1
    f_va1[1*NUM_VCS + 2] = 1'b1;
    f_va1[3*NUM_VCS + 1] = 1'b1;
    f_va2[2][0] = 1'b1; va2_bad_o = 2; va2_bad_v = 0;     // VA stage 2 (east VC0)
    f_sa1[2] = 1'b1;   f_sa1[0] = 1'b1;                   // SA stage 1
    f_xb[1] = 1'b1;                                        // M2: out2 through M3
    f_sa2[4] = 1'b1;                                       // arbiter of out5: via M4
    reset_router();
    run_random(600, 35);

    // ---- the largest fault set the design is meant to survive: 27 faults ----
    // every primary RC unit, three of the four VA arbiter sets of every port, every
    // first-stage SA arbiter, and crossbar multiplexers M2 and M4
    clear_faults();
    f_rc_p = '1;
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VCS; v++)
        if (v != p % NUM_VCS) f_va1[p*NUM_VCS + v] = 1'b1;
    f_sa1 = '1;
    f_xb[1] = 1'b1; f_xb[3] = 1'b1;
    check($countones({f_rc_p, f_va1, f_sa1, f_xb}) == 27, "27-fault set");
    reset_router();
    run_random(300, 25);

    check(n_rc_dup > 0,    "duplicate RC unit never used");
    check(n_borrow > 0,    "VA arbiters never borrowed");
    check(n_bypass > 0,    "SA bypass never used");
    check(n_xfer > 0,      "no VC-to-VC transfer happened");
    check(n_secondary > 0, "secondary crossbar path never used");
    check(n_va2_avoid > 0, "no packet was allocated around the faulty VA arbiter");
    $display("mechanisms: rc_dup=%0d va_borrow=%0d sa_bypass=%0d xfer=%0d secondary=%0d va2_avoid=%0d",
             n_rc_dup, n_borrow, n_bypass, n_xfer, n_secondary, n_va2_avoid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
