// ft_sa_allocator: two-stage separable switch allocator with a default-winner bypass
// around each first-stage arbiter.
//
// Stage 1: one NUM_VCS:1 arbiter per input port picks one of that port's requesting
// VCs; a NUM_VCS:1 multiplexer then forwards the output port that VC asks for.
// Stage 2: one NUM_PORTS:1 arbiter per output port picks one input port among those
// whose stage-1 winner asks for it. The winner of both stages pops one flit in this
// cycle ('in_gnt', 'in_gnt_vc') and crosses the crossbar in the next one; 'out_gnt'
// and 'out_src' say which input port each crossbar multiplexer takes.
//
// Bypass: next to every stage-1 arbiter a small register holds a default winner VC
// and a 2:1 multiplexer chooses between the arbiter's result and the register. When
// the detector flags the arbiter ('fault_arb1'), the register's VC is taken as the
// stage-1 winner without arbitration, provided it is requesting. So that no VC
// starves, the register steps to the next VC every DW_PERIOD cycles (the document
// only asks that each VC be default winner for a period of time; the length is this
// design's choice). The input port uses 'dw_vc' to move flits into the default
// winner when it is empty ('block_port' keeps a port out of allocation in the cycle
// of such a move).
//
// Stage 2 has no correction circuit of its own: a flagged stage-2 arbiter
// ('fault_arb2') grants nothing, and the route computation sends flits for that
// output through the crossbar's secondary path, i.e. they ask for another port.
//
// Stage-1 pointers move only when their winner also wins stage 2; stage-2 pointers
// move on every grant. Combinational from requests to grants.
module ft_sa_allocator
  import noc_pkg::*;
#(
  parameter int unsigned DW_PERIOD = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic  [NUM_IVC-1:0]     req,
  input  port_t [NUM_IVC-1:0]     req_port,    // SP if FSP set, else R
  input  logic  [NUM_PORTS-1:0]   block_port,
  input  logic  [NUM_PORTS-1:0]   fault_arb1,  // per input port
  input  logic  [NUM_PORTS-1:0]   fault_arb2,  // per output port
  output logic  [NUM_PORTS-1:0]   in_gnt,
  output vc_t   [NUM_PORTS-1:0]   in_gnt_vc,
  output logic  [NUM_PORTS-1:0]   in_bypass,   // grant came through the bypass path
  output logic  [NUM_PORTS-1:0]   out_gnt,
  output port_t [NUM_PORTS-1:0]   out_src,
  output vc_t   [NUM_PORTS-1:0]   dw_vc
);

  localparam int unsigned TW = (DW_PERIOD > 1) ? $clog2(DW_PERIOD) : 1;

  // Default-winner registers and their rotation timer.
  vc_t   [NUM_PORTS-1:0] dw_q;
  logic  [TW-1:0]        tmr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr_q <= '0;
      dw_q  <= '0;
    end else if (int'(tmr_q) == DW_PERIOD - 1) begin
      tmr_q <= '0;
      for (int p = 0; p < NUM_PORTS; p++) dw_q[p] <= dw_q[p] + 1'b1;
    end else begin
      tmr_q <= tmr_q + 1'b1;
    end
  end

  assign dw_vc = dw_q;

  // Stage 1.
  logic  [NUM_PORTS-1:0] s1_valid;
  vc_t   [NUM_PORTS-1:0] s1_vc;
  port_t [NUM_PORTS-1:0] s1_port;
  logic  [NUM_PORTS-1:0] s1_adv;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_s1
    logic [NUM_VCS-1:0] r1, g1;
    logic               a_any;
    vc_t                a_idx;
    assign r1 = (block_port[p] || fault_arb1[p]) ? '0 : req[p*NUM_VCS +: NUM_VCS];
    rr_arbiter #(.N(NUM_VCS)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(r1), .advance(s1_adv[p]),
      .gnt(g1), .gnt_idx(a_idx), .gnt_any(a_any)
    );
    // 2:1 bypass multiplexer: arbiter result or default winner.
    always_comb begin
      if (fault_arb1[p]) begin
        s1_vc[p]    = dw_q[p];
        s1_valid[p] = !block_port[p] && req[p*NUM_VCS + int'(dw_q[p])];
      end else begin
        s1_vc[p]    = a_idx;
        s1_valid[p] = a_any;
      end
      // NUM_VCS:1 multiplexer forwarding the winner's requested output port.
      s1_port[p] = req_port[p*NUM_VCS + int'(s1_vc[p])];
    end
  end

  // Stage 2.
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] s2_req, s2_gnt;
  logic [NUM_PORTS-1:0]                s2_any;
  port_t [NUM_PORTS-1:0]               s2_idx;

  always_comb begin
    s2_req = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      if (s1_valid[p] && !fault_arb2[s1_port[p]]) s2_req[s1_port[p]][p] = 1'b1;
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_s2
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(s2_req[o]), .advance(1'b1),
      .gnt(s2_gnt[o]), .gnt_idx(s2_idx[o]), .gnt_any(s2_any[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_gnt[p]    = s1_valid[p] && s2_gnt[s1_port[p]][p];
      in_gnt_vc[p] = s1_vc[p];
      in_bypass[p] = in_gnt[p] && fault_arb1[p];
      s1_adv[p]    = in_gnt[p];
    end
    out_gnt = s2_any;
    out_src = s2_idx;
  end

endmodule
