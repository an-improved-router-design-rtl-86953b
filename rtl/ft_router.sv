// ft_router: a 5-port, 4-VC wormhole router for a 2D mesh whose four pipeline
// stages (routing computation RC, VC allocation VA, switch allocation SA, crossbar
// traversal XB) each keep working after a permanent fault.
//
// Structure: five ft_input_port blocks (VC buffers, VC state, duplicated XY routing
// unit, VC-to-VC transfer), one ft_va_allocator (arbiter sharing between VCs of a
// port), one ft_sa_allocator (default-winner bypass of the first-stage arbiters),
// one ft_crossbar (secondary path to every output) and output_vc_state (downstream
// VC status and credits). How each stage survives a fault:
//   RC  - the duplicate routing unit of the port takes over;
//   VA  - a VC whose stage-1 arbiters failed borrows those of a sibling VC; a failed
//         stage-2 arbiter just makes the request retry for another downstream VC;
//   SA  - a failed stage-1 arbiter is bypassed by a rotating default winner, and
//         flits are moved into that VC when it is empty;
//   XB / SA stage 2 - a failed crossbar multiplexer or output arbiter makes the
//         output unreachable on its own path; the route computation then sends the
//         flits through a neighbouring multiplexer and the crossbar's correction
//         demultiplexers and multiplexers.
// Faults are not detected here: the 'fault_*' inputs carry the verdicts of an
// external detector and are expected to be static (permanent faults).
//
// Link interface per port: 'in_valid/in_vc/in_flit' with 'credit_out_*' returned
// upstream one per popped flit; 'out_valid/out_vc/out_flit' with 'credit_in_*' from
// downstream. Credit-based flow control, one credit per flit slot.
//
// Timing: a head flit sampled from the link at clock edge 0 is routed in the next
// cycle, gets its VC in the one after, wins the switch in the third and crosses the
// crossbar in the fourth; the output link register shows it after edge 4. Counted
// from the cycle the flit is driven on the input link, the zero-load latency is five
// cycles. Body flits follow one per cycle. The 'ev_*' outputs
// flag, per cycle, each time one of the fault-tolerance mechanisms acts.
//
// Lint notes: 'rst_n' is both the asynchronous reset of the registers and the
// 'disable iff' condition of the crossbar assertion below, which some linters
// report as a net used both synchronously and asynchronously; the assertion is not
// logic. The routing units' busy flags and the second-stage grant outputs of the
// switch allocator are left unconnected here because the pop signals of the input
// ports already carry the same information.
module ft_router
  import noc_pkg::*;
#(
  parameter int unsigned DW_PERIOD = 16   // cycles each VC stays SA default winner
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [COORD_W-1:0]               cur_x,
  input  logic [COORD_W-1:0]               cur_y,
  // input links
  input  logic  [NUM_PORTS-1:0]            in_valid,
  input  vc_t   [NUM_PORTS-1:0]            in_vc,
  input  flit_t [NUM_PORTS-1:0]            in_flit,
  output logic  [NUM_PORTS-1:0]            credit_out_valid,
  output vc_t   [NUM_PORTS-1:0]            credit_out_vc,
  // output links
  output logic  [NUM_PORTS-1:0]            out_valid,
  output vc_t   [NUM_PORTS-1:0]            out_vc,
  output flit_t [NUM_PORTS-1:0]            out_flit,
  input  logic  [NUM_PORTS-1:0]            credit_in_valid,
  input  vc_t   [NUM_PORTS-1:0]            credit_in_vc,
  // fault status from the detector
  input  logic  [NUM_PORTS-1:0]            fault_rc_primary,
  input  logic  [NUM_PORTS-1:0]            fault_rc_dup,
  input  logic  [NUM_IVC-1:0]              fault_va1,  // per input VC arbiter set
  input  logic  [NUM_PORTS-1:0][NUM_VCS-1:0] fault_va2, // per downstream VC arbiter
  input  logic  [NUM_PORTS-1:0]            fault_sa1,  // per input port
  input  logic  [NUM_PORTS-1:0]            fault_sa2,  // per output port
  input  logic  [NUM_PORTS-1:0]            fault_xb,   // multiplexer M1..M5
  // mechanism activity
  output logic  [NUM_PORTS-1:0]            ev_rc_dup,
  output logic  [NUM_IVC-1:0]              ev_va_borrow,
  output logic  [NUM_PORTS-1:0]            ev_sa_bypass,
  output logic  [NUM_PORTS-1:0]            ev_xfer,
  output logic  [NUM_PORTS-1:0]            ev_secondary
);

  // ---------------- input ports ----------------
  logic      [NUM_PORTS-1:0]               port_unreach;
  logic      [NUM_IVC-1:0]                 va_req, va_gnt, sa_req, credit_ok;
  port_t     [NUM_IVC-1:0]                 va_port, sa_port;
  vc_t       [NUM_IVC-1:0]                 va_gnt_vc;
  vc_state_t [NUM_IVC-1:0]                 vc_state;
  logic      [NUM_PORTS-1:0]               sa_in_gnt, xfer_busy, rc_busy;
  vc_t       [NUM_PORTS-1:0]               sa_in_vc, dw_vc;
  flit_t     [NUM_PORTS-1:0]               pop_flit;
  vc_state_t [NUM_PORTS-1:0]               pop_state;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0]       ds_free, ds_credit_ok;

  assign port_unreach = fault_sa2 | fault_xb;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    ft_input_port u_port (
      .clk(clk), .rst_n(rst_n), .cur_x(cur_x), .cur_y(cur_y),
      .in_valid(in_valid[p]), .in_vc(in_vc[p]), .in_flit(in_flit[p]),
      .credit_out_valid(credit_out_valid[p]), .credit_out_vc(credit_out_vc[p]),
      .fault_rc_primary(fault_rc_primary[p]), .fault_rc_dup(fault_rc_dup[p]),
      .port_unreach(port_unreach), .sa_fault(fault_sa1[p]), .dw_vc(dw_vc[p]),
      .va_req(va_req[p*NUM_VCS +: NUM_VCS]), .va_port(va_port[p*NUM_VCS +: NUM_VCS]),
      .va_gnt(va_gnt[p*NUM_VCS +: NUM_VCS]), .va_gnt_vc(va_gnt_vc[p*NUM_VCS +: NUM_VCS]),
      .vc_state(vc_state[p*NUM_VCS +: NUM_VCS]),
      .credit_ok(credit_ok[p*NUM_VCS +: NUM_VCS]),
      .sa_req(sa_req[p*NUM_VCS +: NUM_VCS]), .sa_port(sa_port[p*NUM_VCS +: NUM_VCS]),
      .sa_gnt(sa_in_gnt[p]), .sa_gnt_vc(sa_in_vc[p]),
      .pop_flit(pop_flit[p]), .pop_state(pop_state[p]),
      .xfer_busy(xfer_busy[p]), .rc_busy(rc_busy[p]), .rc_dup_used(ev_rc_dup[p])
    );
  end

  always_comb begin
    for (int i = 0; i < NUM_IVC; i++)
      credit_ok[i] = ds_credit_ok[vc_state[i].r][vc_state[i].o];
  end

  // ---------------- VC allocation ----------------
  logic [NUM_IVC-1:0]  unused_vf;
  vc_t  [NUM_IVC-1:0]  unused_id;
  port_t [NUM_IVC-1:0] unused_r2;

  ft_va_allocator u_va (
    .clk(clk), .rst_n(rst_n), .req(va_req), .req_port(va_port), .ds_free(ds_free),
    .fault_arb1(fault_va1), .fault_arb2(fault_va2),
    .gnt(va_gnt), .gnt_vc(va_gnt_vc), .gnt_borrowed(ev_va_borrow),
    .lend_vf(unused_vf), .lend_id(unused_id), .lend_r2(unused_r2)
  );

  // ---------------- switch allocation ----------------
  logic  [NUM_PORTS-1:0] sa_out_gnt;
  port_t [NUM_PORTS-1:0] sa_out_src;

  ft_sa_allocator #(.DW_PERIOD(DW_PERIOD)) u_sa (
    .clk(clk), .rst_n(rst_n), .req(sa_req), .req_port(sa_port),
    .block_port(xfer_busy), .fault_arb1(fault_sa1), .fault_arb2(fault_sa2),
    .in_gnt(sa_in_gnt), .in_gnt_vc(sa_in_vc), .in_bypass(ev_sa_bypass),
    .out_gnt(sa_out_gnt), .out_src(sa_out_src), .dw_vc(dw_vc)
  );

  assign ev_xfer = xfer_busy;

  // ---------------- downstream VC state ----------------
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] alloc;
  logic [NUM_PORTS-1:0]              send, send_tail;
  vc_t  [NUM_PORTS-1:0]              send_vc;

  always_comb begin
    alloc     = '0;
    send      = '0;
    send_tail = '0;
    send_vc   = '0;
    for (int i = 0; i < NUM_IVC; i++)
      if (va_gnt[i]) alloc[va_port[i]][va_gnt_vc[i]] = 1'b1;
    for (int p = 0; p < NUM_PORTS; p++)
      if (sa_in_gnt[p]) begin
        send[pop_state[p].r]      = 1'b1;
        send_vc[pop_state[p].r]   = pop_state[p].o;
        send_tail[pop_state[p].r] = flit_is_tail(pop_flit[p]);
      end
  end

  output_vc_state u_ovs (
    .clk(clk), .rst_n(rst_n), .alloc(alloc), .send(send), .send_vc(send_vc),
    .send_tail(send_tail), .credit_in(credit_in_valid), .credit_in_vc(credit_in_vc),
    .free(ds_free), .credit_ok(ds_credit_ok)
  );

  // ---------------- SA -> XB pipeline register ----------------
  logic  [NUM_PORTS-1:0] xb_valid_q;
  flit_t [NUM_PORTS-1:0] xb_flit_q;
  port_t [NUM_PORTS-1:0] xb_mux_q, xb_dst_q;
  vc_t   [NUM_PORTS-1:0] xb_vc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xb_valid_q <= '0;
      xb_flit_q  <= '0;
      xb_mux_q   <= '0;
      xb_dst_q   <= '0;
      xb_vc_q    <= '0;
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        xb_valid_q[p] <= sa_in_gnt[p];
        if (sa_in_gnt[p]) begin
          xb_flit_q[p] <= pop_flit[p];
          xb_mux_q[p]  <= pop_state[p].fsp ? pop_state[p].sp : pop_state[p].r;
          xb_dst_q[p]  <= pop_state[p].r;
          xb_vc_q[p]   <= pop_state[p].o;
        end
      end
    end
  end

  // ---------------- crossbar ----------------
  logic  [NUM_PORTS-1:0] m_valid;
  port_t [NUM_PORTS-1:0] m_sel, m_dst;
  vc_t   [NUM_PORTS-1:0] dst_vc;
  logic  [NUM_PORTS-1:0] xo_valid;
  flit_t [NUM_PORTS-1:0] xo_flit;

  always_comb begin
    m_valid      = '0;
    m_sel        = '0;
    m_dst        = '0;
    dst_vc       = '0;
    ev_secondary = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      if (xb_valid_q[p]) begin
        m_valid[xb_mux_q[p]] = 1'b1;
        m_sel[xb_mux_q[p]]   = port_t'(p);
        m_dst[xb_mux_q[p]]   = xb_dst_q[p];
        dst_vc[xb_dst_q[p]]  = xb_vc_q[p];
        if (xb_mux_q[p] != xb_dst_q[p]) ev_secondary[xb_dst_q[p]] = 1'b1;
      end
  end

  ft_crossbar u_xb (
    .in_flit(xb_flit_q), .m_valid(m_valid), .m_sel(m_sel), .m_dst(m_dst),
    .mux_fault(fault_xb), .out_valid(xo_valid), .out_flit(xo_flit)
  );

  // ---------------- output link registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_vc    <= '0;
      out_flit  <= '0;
    end else begin
      out_valid <= xo_valid;
      for (int o = 0; o < NUM_PORTS; o++)
        if (xo_valid[o]) begin
          out_vc[o]   <= dst_vc[o];
          out_flit[o] <= xo_flit[o];
        end
    end
  end

  // The switch allocator gives each multiplexer to at most one input port.
  for (genvar m = 0; m < NUM_PORTS; m++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({xb_valid_q[0] && xb_mux_q[0] == port_t'(m),
                xb_valid_q[1] && xb_mux_q[1] == port_t'(m),
                xb_valid_q[2] && xb_mux_q[2] == port_t'(m),
                xb_valid_q[3] && xb_mux_q[3] == port_t'(m),
                xb_valid_q[4] && xb_mux_q[4] == port_t'(m)}))
      else $error("crossbar multiplexer %0d given to two inputs", m);
  end

endmodule
