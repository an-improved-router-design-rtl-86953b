// ft_input_port: one input port of the router: NUM_VCS virtual-channel buffers of
// BUF_DEPTH flits, their state fields, the port's fault-tolerant routing computation
// and the VC-to-VC transfer used with the switch-allocator bypass.
//
// Each VC keeps the fields G (pipeline state), R (route), O (downstream VC), P
// (read/write pointers and fill count), SP and FSP (secondary crossbar path). A head
// flit at the front of an idle VC goes through routing computation (one VC per
// cycle, lowest index first); the result and the secondary-path fields are written
// and the VC enters VC allocation; a VA grant writes O and makes the VC active.
// An active VC with a flit and a downstream credit ('credit_ok') requests the switch;
// a switch grant pops the front flit in the same cycle and hands it, with the VC's
// fields, to the crossbar stage. Popping a tail flit returns the VC to idle. Every
// pop returns one credit upstream.
//
// Transfer: when this port's first-stage switch arbiter is flagged faulty
// ('sa_fault'), only the default-winner VC ('dw_vc') can win the switch. If that VC
// is idle and empty while another VC is active and holds flits, all flits and state
// fields of that VC are copied into the default winner in one cycle, and the port
// takes no switch grant in that cycle ('xfer_busy'). To keep the upstream router's
// credit accounting right, the port keeps a table from the VC number used on the
// link (logical) to the buffer that holds it (physical); a transfer swaps the two
// entries, so later flits of the moved packet follow it and its credits are returned
// under the number the upstream router knows. The table is this design's addition;
// the document says only that flits and state fields are moved. A transfer is not
// started in a cycle in which a flit arrives for either of the two VCs.
//
// Timing: a flit presented on the link is written at the clock edge; a head flit
// spends one cycle each in RC and VA (more if it must wait) before it can request
// the switch.
module ft_input_port
  import noc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [COORD_W-1:0]     cur_x,
  input  logic [COORD_W-1:0]     cur_y,
  // link from upstream
  input  logic                   in_valid,
  input  vc_t                    in_vc,
  input  flit_t                  in_flit,
  output logic                   credit_out_valid,
  output vc_t                    credit_out_vc,
  // fault status
  input  logic                   fault_rc_primary,
  input  logic                   fault_rc_dup,
  input  logic [NUM_PORTS-1:0]   port_unreach,
  input  logic                   sa_fault,
  input  vc_t                    dw_vc,
  // VC allocation
  output logic  [NUM_VCS-1:0]    va_req,
  output port_t [NUM_VCS-1:0]    va_port,
  input  logic  [NUM_VCS-1:0]    va_gnt,
  input  vc_t   [NUM_VCS-1:0]    va_gnt_vc,
  // switch allocation
  output vc_state_t [NUM_VCS-1:0] vc_state,
  input  logic  [NUM_VCS-1:0]    credit_ok,
  output logic  [NUM_VCS-1:0]    sa_req,
  output port_t [NUM_VCS-1:0]    sa_port,
  input  logic                   sa_gnt,
  input  vc_t                    sa_gnt_vc,
  output flit_t                  pop_flit,
  output vc_state_t              pop_state,
  // status
  output logic                   xfer_busy,
  output logic                   rc_busy,
  output logic                   rc_dup_used
);

  localparam int unsigned PW = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1;

  flit_t                    buf_q [NUM_VCS][BUF_DEPTH];
  logic [PW-1:0]            rd_q  [NUM_VCS];
  logic [PW-1:0]            wr_q  [NUM_VCS];
  logic [CRED_W-1:0]        cnt_q [NUM_VCS];
  vc_state_t [NUM_VCS-1:0]  st_q;
  vc_t  [NUM_VCS-1:0]       map_q;   // logical -> physical
  vc_t  [NUM_VCS-1:0]       inv_q;   // physical -> logical

  flit_t [NUM_VCS-1:0]      front;

  always_comb begin
    for (int v = 0; v < NUM_VCS; v++) front[v] = buf_q[v][rd_q[v]];
  end

  // Physical VC written by the incoming flit.
  vc_t wr_vc;
  assign wr_vc = map_q[in_vc];

  // ---- routing computation: first idle VC with a head flit at its front ----
  logic              rc_sel_valid;
  vc_t               rc_sel;
  logic              rc_valid, rc_fsp, rc_using_dup;
  port_t             rc_route, rc_sp;

  always_comb begin
    rc_sel_valid = 1'b0;
    rc_sel       = '0;
    for (int v = 0; v < NUM_VCS; v++) begin
      if (!rc_sel_valid && st_q[v].g == G_IDLE && cnt_q[v] != '0 && flit_is_head(front[v])) begin
        rc_sel_valid = 1'b1;
        rc_sel       = vc_t'(v);
      end
    end
  end

  ft_rc_stage u_rc (
    .dest(flit_dest(front[rc_sel])), .cur_x(cur_x), .cur_y(cur_y),
    .fault_primary(fault_rc_primary), .fault_dup(fault_rc_dup),
    .port_unreach(port_unreach),
    .valid(rc_valid), .route(rc_route), .sp(rc_sp), .fsp(rc_fsp),
    .using_dup(rc_using_dup)
  );

  assign rc_busy     = rc_sel_valid && rc_valid;
  assign rc_dup_used = rc_busy && rc_using_dup;

  // ---- transfer into the default winner ----
  logic xfer_src_valid;
  vc_t  xfer_src;

  always_comb begin
    vc_t j;
    j              = '0;
    xfer_src_valid = 1'b0;
    xfer_src       = '0;
    if (sa_fault && st_q[dw_vc].g == G_IDLE && cnt_q[dw_vc] == '0 &&
        !(in_valid && wr_vc == dw_vc)) begin
      for (int k = 1; k < NUM_VCS; k++) begin
        j = vc_t'(int'(dw_vc) + k);
        if (!xfer_src_valid && st_q[j].g == G_ACTIVE && cnt_q[j] != '0 &&
            !(in_valid && wr_vc == j)) begin
          xfer_src_valid = 1'b1;
          xfer_src       = j;
        end
      end
    end
  end

  assign xfer_busy = xfer_src_valid;

  // ---- requests to the allocators ----
  always_comb begin
    for (int v = 0; v < NUM_VCS; v++) begin
      va_req[v]  = st_q[v].g == G_VA;
      va_port[v] = st_q[v].r;
      sa_req[v]  = st_q[v].g == G_ACTIVE && cnt_q[v] != '0 && credit_ok[v];
      sa_port[v] = st_q[v].fsp ? st_q[v].sp : st_q[v].r;
    end
  end

  assign vc_state  = st_q;
  assign pop_flit  = front[sa_gnt_vc];
  assign pop_state = st_q[sa_gnt_vc];

  assign credit_out_valid = sa_gnt;
  assign credit_out_vc    = inv_q[sa_gnt_vc];

  // ---- state update ----
  logic [NUM_VCS-1:0] push, pop;

  always_comb begin
    for (int v = 0; v < NUM_VCS; v++) begin
      push[v] = in_valid && wr_vc == vc_t'(v);
      pop[v]  = sa_gnt && sa_gnt_vc == vc_t'(v);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        rd_q[v]  <= '0;
        wr_q[v]  <= '0;
        cnt_q[v] <= '0;
        map_q[v] <= vc_t'(v);
        inv_q[v] <= vc_t'(v);
        for (int d = 0; d < BUF_DEPTH; d++) buf_q[v][d] <= '0;
      end
      st_q <= '0;
    end else begin
      // Buffer write and pop (pointers and count).
      for (int v = 0; v < NUM_VCS; v++) begin
        if (push[v]) begin
          buf_q[v][wr_q[v]] <= in_flit;
          wr_q[v] <= (int'(wr_q[v]) == BUF_DEPTH - 1) ? '0 : wr_q[v] + 1'b1;
        end
        if (pop[v]) rd_q[v] <= (int'(rd_q[v]) == BUF_DEPTH - 1) ? '0 : rd_q[v] + 1'b1;
        cnt_q[v] <= cnt_q[v] + CRED_W'(push[v]) - CRED_W'(pop[v]);
      end

      // VC state fields.
      if (rc_sel_valid && rc_valid) begin
        st_q[rc_sel].g   <= G_VA;
        st_q[rc_sel].r   <= rc_route;
        st_q[rc_sel].sp  <= rc_sp;
        st_q[rc_sel].fsp <= rc_fsp;
      end
      for (int v = 0; v < NUM_VCS; v++) begin
        if (va_gnt[v] && st_q[v].g == G_VA) begin
          st_q[v].g <= G_ACTIVE;
          st_q[v].o <= va_gnt_vc[v];
        end
      end
      if (sa_gnt && flit_is_tail(front[sa_gnt_vc])) st_q[sa_gnt_vc].g <= G_IDLE;

      // Transfer: copy flits, pointers, count and state fields; swap the map.
      // No pop happens at this port in a transfer cycle, and no push to either VC.
      if (xfer_src_valid) begin
        for (int d = 0; d < BUF_DEPTH; d++) buf_q[dw_vc][d] <= buf_q[xfer_src][d];
        rd_q[dw_vc]  <= rd_q[xfer_src];
        wr_q[dw_vc]  <= wr_q[xfer_src];
        cnt_q[dw_vc] <= cnt_q[xfer_src];
        st_q[dw_vc]  <= st_q[xfer_src];
        cnt_q[xfer_src] <= '0;
        rd_q[xfer_src]  <= wr_q[xfer_src];
        st_q[xfer_src]  <= '0;
        map_q[inv_q[xfer_src]] <= dw_vc;
        map_q[inv_q[dw_vc]]    <= xfer_src;
        inv_q[dw_vc]           <= inv_q[xfer_src];
        inv_q[xfer_src]        <= inv_q[dw_vc];
      end
    end
  end

endmodule
