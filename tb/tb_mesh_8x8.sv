// tb_mesh_8x8: 64 routers wired into an 8x8 mesh, run with and without permanent
// faults.
//
// Every router's four mesh ports are linked to its neighbours (north = +y, east = +x);
// ports on the mesh edge are left idle, which XY routing never uses. The local port
// of every node is driven by a packet source with one credit counter per VC and
// read by a sink that returns each credit at once. Packets carry their id, flit
// number and a check byte, so the sink checks that every flit reaches the node named
// in its head flit, in order, with the right content.
//
// Phases:
//   1. one packet from (0,0) to (7,7): 14 hops, 15 routers of 5 cycles each, so the
//      head must arrive exactly 75 cycles after it is put on the first link;
//   2. uniform random traffic with no faults: every packet must arrive; the mean
//      head latency is recorded;
//   3. the same traffic with faults in every router, chosen among the sets the router
//      tolerates: the primary RC unit of a port, up to three of the four VA arbiter
//      sets of a port, first-stage SA arbiters, and one crossbar multiplexer or
//      second-stage SA arbiter. Every packet must still arrive; the mean latency
//      and its increase over phase 2 are printed, and each fault-tolerance mechanism
//      must have acted somewhere in the mesh.
module tb_mesh_8x8;
  import noc_pkg::*;

  localparam int W = 8;
  localparam int N = W * W;
  localparam int MAXPKT = 4096;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  // link nets, per node and port
  wire  [NUM_PORTS-1:0] in_valid [N];
  wire  vc_t   [NUM_PORTS-1:0] in_vc   [N];
  wire  flit_t [NUM_PORTS-1:0] in_flit [N];
  wire  [NUM_PORTS-1:0] cr_in_valid [N];
  wire  vc_t   [NUM_PORTS-1:0] cr_in_vc [N];
  logic [NUM_PORTS-1:0] out_valid [N];
  vc_t   [NUM_PORTS-1:0] out_vc   [N];
  flit_t [NUM_PORTS-1:0] out_flit [N];
  logic [NUM_PORTS-1:0] cr_out_valid [N];
  vc_t   [NUM_PORTS-1:0] cr_out_vc [N];

  // local-port drive from the test
  logic  loc_valid [N];
  vc_t   loc_vc    [N];
  flit_t loc_flit  [N];

  // faults per router
  logic [NUM_PORTS-1:0]              f_rc_p [N], f_rc_d [N], f_sa1 [N], f_sa2 [N], f_xb [N];
  logic [NUM_IVC-1:0]                f_va1 [N];
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] f_va2 [N];

  // mechanism activity per router
  logic [NUM_PORTS-1:0] ev_rc_dup [N], ev_sa_bypass [N], ev_xfer [N], ev_secondary [N];
  logic [NUM_IVC-1:0]   ev_va_borrow [N];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % W;
    localparam int Y = n / W;

    ft_router u_r (
      .clk(clk), .rst_n(rst_n), .cur_x(COORD_W'(X)), .cur_y(COORD_W'(Y)),
      .in_valid(in_valid[n]), .in_vc(in_vc[n]), .in_flit(in_flit[n]),
      .credit_out_valid(cr_out_valid[n]), .credit_out_vc(cr_out_vc[n]),
      .out_valid(out_valid[n]), .out_vc(out_vc[n]), .out_flit(out_flit[n]),
      .credit_in_valid(cr_in_valid[n]), .credit_in_vc(cr_in_vc[n]),
      .fault_rc_primary(f_rc_p[n]), .fault_rc_dup(f_rc_d[n]), .fault_va1(f_va1[n]),
      .fault_va2(f_va2[n]), .fault_sa1(f_sa1[n]), .fault_sa2(f_sa2[n]), .fault_xb(f_xb[n]),
      .ev_rc_dup(ev_rc_dup[n]), .ev_va_borrow(ev_va_borrow[n]), .ev_sa_bypass(ev_sa_bypass[n]),
      .ev_xfer(ev_xfer[n]), .ev_secondary(ev_secondary[n])
    );

    // local port: source drives the input, the sink returns every credit at once
    assign in_valid[n][0]    = loc_valid[n];
    assign in_vc[n][0]       = loc_vc[n];
    assign in_flit[n][0]     = loc_flit[n];
    assign cr_in_valid[n][0] = out_valid[n][0];
    assign cr_in_vc[n][0]    = out_vc[n][0];

    // port p takes its input from neighbour nb's opposite port
    for (genvar p = 1; p < NUM_PORTS; p++) begin : g_port
      localparam int NB  = (p == 1) ? n + W : (p == 2) ? n + 1 : (p == 3) ? n - W : n - 1;
      localparam int OPP = (p == 1) ? 3 : (p == 2) ? 4 : (p == 3) ? 1 : 2;
      localparam bit HAS = (p == 1) ? (Y < W - 1) : (p == 2) ? (X < W - 1) :
                           (p == 3) ? (Y > 0) : (X > 0);
      if (HAS) begin : g_link
        assign in_valid[n][p]    = out_valid[NB][OPP];
        assign in_vc[n][p]       = out_vc[NB][OPP];
        assign in_flit[n][p]     = out_flit[NB][OPP];
        assign cr_in_valid[n][p] = cr_out_valid[NB][OPP];
        assign cr_in_vc[n][p]    = cr_out_vc[NB][OPP];
      end else begin : g_edge
        assign in_valid[n][p]    = 1'b0;
        assign in_vc[n][p]       = '0;
        assign in_flit[n][p]     = '0;
        assign cr_in_valid[n][p] = 1'b0;
        assign cr_in_vc[n][p]    = '0;
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- traffic models ----------------
  int   cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int         pk_dst  [MAXPKT];
  int         pk_len  [MAXPKT];
  int         pk_next [MAXPKT];
  int         pk_t0   [MAXPKT];
  int         next_id, created, delivered, max_pkts, gen_rate;
  longint     lat_sum;
  bit         gen_on;
  int         src_cred [N][NUM_VCS];
  int         src_pkt  [N][NUM_VCS];
  int         src_seq  [N][NUM_VCS];
  int         n_rc_dup, n_borrow, n_bypass, n_xfer, n_secondary;
  int         last_lat;

  function automatic flit_t make_flit(int id, int seq, int len, int dst);
    flit_t f;
    f = '0;
    f[31] = (seq == 0); f[30] = (seq == len - 1);
    f[29:24] = 6'(dst);                       // {y, x} = node index
    f[23:12] = 12'(id); f[11:8] = 4'(seq); f[7:0] = 8'(id * 5 + seq);
    return f;
  endfunction

  task automatic open_packet(int n, int v, int dst, int len);
    int id;
    id = next_id % MAXPKT;
    next_id++;
    created++;
    pk_dst[id] = dst; pk_len[id] = len; pk_next[id] = 0; pk_t0[id] = -1;
    src_pkt[n][v] = id; src_seq[n][v] = 0;
  endtask

  task automatic step_models();
    for (int n = 0; n < N; n++) begin
      // sink
      if (out_valid[n][0]) begin
        int id, seq;
        flit_t f;
        f = out_flit[n][0]; id = f[23:12]; seq = f[11:8];
        check(pk_dst[id] == n, $sformatf("pkt %0d reached node %0d, sent to %0d", id, n, pk_dst[id]));
        check(pk_next[id] == seq, $sformatf("pkt %0d flit %0d out of order", id, seq));
        check(f == make_flit(id, seq, pk_len[id], pk_dst[id]), $sformatf("pkt %0d flit %0d content", id, seq));
        if (seq == 0) begin
          last_lat = cycle - pk_t0[id];
          lat_sum += last_lat;
        end
        pk_next[id] = seq + 1;
        if (seq == pk_len[id] - 1) delivered++;
      end
      // credits from the router's local input port
      if (cr_out_valid[n][0]) src_cred[n][cr_out_vc[n][0]]++;
      // mechanism counters
      n_rc_dup    += $countones(ev_rc_dup[n]);
      n_borrow    += $countones(ev_va_borrow[n]);
      n_bypass    += $countones(ev_sa_bypass[n]);
      n_xfer      += $countones(ev_xfer[n]);
      n_secondary += $countones(ev_secondary[n]);
      // source
      loc_valid[n] = 1'b0;
      if (gen_on && created < max_pkts && $urandom_range(999) < gen_rate) begin
        int v, d;
        v = $urandom_range(NUM_VCS - 1);
        do d = $urandom_range(N - 1); while (d == n);
        if (src_pkt[n][v] < 0 && src_cred[n][v] == BUF_DEPTH)
          open_packet(n, v, d, 1 + $urandom_range(4));
      end
      for (int v = 0; v < NUM_VCS; v++)
        if (!loc_valid[n] && src_pkt[n][v] >= 0 && src_cred[n][v] > 0) begin
          int id;
          id = src_pkt[n][v];
          loc_valid[n] = 1'b1; loc_vc[n] = vc_t'(v);
          loc_flit[n]  = make_flit(id, src_seq[n][v], pk_len[id], pk_dst[id]);
          if (src_seq[n][v] == 0) pk_t0[id] = cycle;
          src_cred[n][v]--; src_seq[n][v]++;
          if (src_seq[n][v] == pk_len[id]) src_pkt[n][v] = -1;
        end
    end
  endtask

  always @(negedge clk) if (rst_n) step_models();

  task automatic clear_faults();
    for (int n = 0; n < N; n++) begin
      f_rc_p[n] = '0; f_rc_d[n] = '0; f_sa1[n] = '0; f_sa2[n] = '0; f_xb[n] = '0;
      f_va1[n] = '0; f_va2[n] = '0;
    end
  endtask

  // Faults each router survives: RC primaries, up to three VA sets per port, SA
  // first-stage arbiters, and one crossbar multiplexer or SA output arbiter.
  task automatic inject_faults(output int nf);
    nf = 0;
    for (int n = 0; n < N; n++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        int keep;
        if ($urandom_range(3) == 0) begin f_rc_p[n][p] = 1'b1; nf++; end
        if ($urandom_range(3) == 0) begin f_sa1[n][p]  = 1'b1; nf++; end
        keep = $urandom_range(NUM_VCS - 1);
        for (int v = 0; v < NUM_VCS; v++)
          if (v != keep && $urandom_range(2) == 0) begin f_va1[n][p*NUM_VCS + v] = 1'b1; nf++; end
      end
      case ($urandom_range(3))
        0: begin f_xb[n][$urandom_range(NUM_PORTS - 1)]  = 1'b1; nf++; end
        1: begin f_sa2[n][$urandom_range(NUM_PORTS - 1)] = 1'b1; nf++; end
        default: ;
      endcase
    end
  endtask

  task automatic reset_mesh();
    rst_n = 1'b0;
    for (int n = 0; n < N; n++) begin
      loc_valid[n] = 1'b0; loc_vc[n] = '0; loc_flit[n] = '0;
      for (int v = 0; v < NUM_VCS; v++) begin
        src_cred[n][v] = BUF_DEPTH; src_pkt[n][v] = -1; src_seq[n][v] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic run_traffic(int npk, int rate, output real mean_lat);
    int c0;
    created = 0; delivered = 0; lat_sum = 0; next_id = 0;
    max_pkts = npk; gen_rate = rate; gen_on = 1'b1;
    c0 = cycle;
    while (delivered < npk && cycle < c0 + 60000) @(negedge clk);
    gen_on = 1'b0;
    check(delivered == npk, $sformatf("delivered %0d of %0d packets", delivered, npk));
    mean_lat = real'(lat_sum) / real'(delivered > 0 ? delivered : 1);
  endtask

  real lat_ok, lat_flt;
  int  nf;

  initial begin
    gen_on = 1'b0; gen_rate = 0; max_pkts = 0; created = 0; delivered = 0; next_id = 0;
    lat_sum = 0; last_lat = 0;
    n_rc_dup = 0; n_borrow = 0; n_bypass = 0; n_xfer = 0; n_secondary = 0;
    clear_faults();
    reset_mesh();

    // 1. corner to corner at zero load: 15 routers x 5 cycles
    open_packet(0, 0, N - 1, 1);
    max_pkts = 0;
    begin
      int c0;
      c0 = cycle;
      while (delivered == 0 && cycle < c0 + 300) @(negedge clk);
    end
    check(delivered == 1 && last_lat == 75,
          $sformatf("corner-to-corner latency %0d, expected 75", last_lat));

    // 2. uniform random traffic, no faults
    reset_mesh();
    run_traffic(2500, 15, lat_ok);

    // 3. the same traffic with faults in every router
    clear_faults();
    inject_faults(nf);
    reset_mesh();
    n_rc_dup = 0; n_borrow = 0; n_bypass = 0; n_xfer = 0; n_secondary = 0;
    run_traffic(2500, 15, lat_flt);

    $display("mesh: %0d faults injected; mean head latency %0.2f fault-free, %0.2f with faults (+%0.1f%%)",
             nf, lat_ok, lat_flt, 100.0 * (lat_flt - lat_ok) / lat_ok);
    $display("mechanisms: rc_dup=%0d va_borrow=%0d sa_bypass=%0d xfer=%0d secondary=%0d",
             n_rc_dup, n_borrow, n_bypass, n_xfer, n_secondary);
    check(n_rc_dup > 0,    "duplicate RC unit never used");
    check(n_borrow > 0,    "VA arbiters never borrowed");
    check(n_bypass > 0,    "SA bypass never used");
    check(n_xfer > 0,      "no VC-to-VC transfer");
    check(n_secondary > 0, "secondary crossbar path never used");
    check(lat_flt >= lat_ok, "faults made the mesh faster");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
