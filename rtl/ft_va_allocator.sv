// ft_va_allocator: two-stage separable virtual-channel allocator with arbiter
// sharing between the VCs of an input port.
//
// Stage 1: every input VC owns a set of NUM_PORTS arbiters of NUM_VCS:1, one per
// output port. The arbiter of the VC's routed output port picks one free VC of the
// downstream router. Stage 2: one arbiter of NUM_IVC:1 per downstream VC picks one
// of the input VCs that chose it. A request that wins stage 2 is granted in the
// same cycle ('gnt', 'gnt_vc'); one that loses retries next cycle, and since every
// stage-1 arbiter moves its pointer after each pick, the retry names another free
// downstream VC when there is one.
//
// Fault tolerance, stage 1: when the detector flags an input VC's arbiter set
// ('fault_arb1'), the whole set is retired. The VC then borrows the set of another
// VC of the same port: scanning upward (with wrap) from itself, it takes the first
// VC whose arbiters are healthy, whose own packet is not in VC allocation (idle or
// in switch allocation) and that is not lending already. The borrowing is recorded
// in the lender's R2 (route), ID (borrower) and VF (flag) fields: in the cycle of
// the first attempt the lender's arbiters already work for the borrower, so a
// successful first attempt costs no cycle; if it fails, VF holds the loan until the
// borrower is served, and then R2, ID and VF are cleared. If a head flit reaches the
// lender's own VC while a loan is held, the lender's arbiters allocate for their own
// VC first and serve the borrower from the cycle after that VC is granted, which
// costs the borrower the extra cycle the document describes. When no lender is
// available the borrower simply waits a cycle.
//
// Fault tolerance, stage 2: a flagged stage-2 arbiter ('fault_arb2') grants nothing;
// the input VC that chose that downstream VC loses and picks another one on retry.
// No extra circuit is involved.
//
// Input VC i is index port*NUM_VCS + vc in every flattened vector. The R2/ID/VF
// fields sit here next to the arbiters they steer; in the document they are drawn
// among the VC state fields of the input port.
module ft_va_allocator
  import noc_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic  [NUM_IVC-1:0]            req,         // VC in VA state
  input  port_t [NUM_IVC-1:0]            req_port,    // its R field
  input  logic  [NUM_PORTS-1:0][NUM_VCS-1:0] ds_free, // downstream VC free
  input  logic  [NUM_IVC-1:0]            fault_arb1,  // stage-1 arbiter set faulty
  input  logic  [NUM_PORTS-1:0][NUM_VCS-1:0] fault_arb2, // stage-2 arbiter faulty
  output logic  [NUM_IVC-1:0]            gnt,
  output vc_t   [NUM_IVC-1:0]            gnt_vc,
  output logic  [NUM_IVC-1:0]            gnt_borrowed, // granted through another VC's arbiters
  output logic  [NUM_IVC-1:0]            lend_vf,     // VF field of each VC
  output vc_t   [NUM_IVC-1:0]            lend_id,     // ID field
  output port_t [NUM_IVC-1:0]            lend_r2      // R2 field
);

  localparam int unsigned IVW = $clog2(NUM_IVC);

  // Loan registers (R2, ID, VF), indexed by the lending VC.
  logic  [NUM_IVC-1:0] vf_q;
  vc_t   [NUM_IVC-1:0] id_q;
  port_t [NUM_IVC-1:0] r2_q;

  // Who each arbiter set serves this cycle.
  logic  [NUM_IVC-1:0] srv_valid;
  logic  [NUM_IVC-1:0] srv_loan;    // serving a borrower
  vc_t   [NUM_IVC-1:0] srv_id;      // VC (within the port) being served
  port_t [NUM_IVC-1:0] srv_port;

  always_comb begin
    logic [NUM_VCS-1:0] has_lender, taken;
    logic               found;
    int                 li, lj, j;
    srv_valid  = '0;
    srv_loan   = '0;
    srv_id     = '0;
    srv_port   = '0;
    has_lender = '0;
    taken      = '0;
    found      = 1'b0;
    li         = 0;
    lj         = 0;
    j          = 0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      has_lender = '0;
      taken      = '0;
      // Loans already held; they wait while the lender allocates for itself.
      for (int jj = 0; jj < NUM_VCS; jj++) begin
        lj = p * NUM_VCS + jj;
        if (vf_q[lj]) has_lender[id_q[lj]] = 1'b1;
        if (vf_q[lj] && !req[lj]) begin
          srv_valid[lj] = 1'b1;
          srv_loan[lj]  = 1'b1;
          srv_id[lj]    = id_q[lj];
          srv_port[lj]  = r2_q[lj];
        end
      end
      // Healthy VCs in VA use their own arbiters.
      for (int jj = 0; jj < NUM_VCS; jj++) begin
        lj = p * NUM_VCS + jj;
        if (req[lj] && !fault_arb1[lj]) begin
          srv_valid[lj] = 1'b1;
          srv_id[lj]    = vc_t'(jj);
          srv_port[lj]  = req_port[lj];
        end
      end
      // VCs with retired arbiters look for a lender.
      for (int i = 0; i < NUM_VCS; i++) begin
        li    = p * NUM_VCS + i;
        found = 1'b0;
        if (req[li] && fault_arb1[li] && !has_lender[i]) begin
          for (int k = 1; k < NUM_VCS; k++) begin
            j  = (i + k) % NUM_VCS;
            lj = p * NUM_VCS + j;
            if (!found && !fault_arb1[lj] && !req[lj] && !vf_q[lj] && !taken[j]) begin
              found         = 1'b1;
              taken[j]      = 1'b1;
              srv_valid[lj] = 1'b1;
              srv_loan[lj]  = 1'b1;
              srv_id[lj]    = vc_t'(i);
              srv_port[lj]  = req_port[li];
            end
          end
        end
      end
    end
  end

  // Stage 1: NUM_PORTS arbiters of NUM_VCS:1 per input VC.
  logic [NUM_IVC-1:0]                d1_valid;
  vc_t  [NUM_IVC-1:0]                d1_vc;
  logic [NUM_IVC-1:0][NUM_PORTS-1:0] s1_any;
  vc_t  [NUM_IVC-1:0][NUM_PORTS-1:0] s1_idx;

  for (genvar j = 0; j < NUM_IVC; j++) begin : g_s1_set
    for (genvar o = 0; o < NUM_PORTS; o++) begin : g_s1_arb
      logic [NUM_VCS-1:0] r1, g1;
      assign r1 = (srv_valid[j] && srv_port[j] == port_t'(o)) ? ds_free[o] : '0;
      rr_arbiter #(.N(NUM_VCS)) u_arb (
        .clk(clk), .rst_n(rst_n), .req(r1), .advance(1'b1),
        .gnt(g1), .gnt_idx(s1_idx[j][o]), .gnt_any(s1_any[j][o])
      );
    end
    assign d1_valid[j] = s1_any[j][srv_port[j]];
    assign d1_vc[j]    = s1_idx[j][srv_port[j]];
  end

  // Stage 2: one NUM_IVC:1 arbiter per downstream VC. Requests are indexed by the
  // input VC being served, not by the arbiter set doing the work.
  logic [NUM_PORTS-1:0][NUM_VCS-1:0][NUM_IVC-1:0] s2_req, s2_gnt;

  // Input VC served by each arbiter set.
  logic [NUM_IVC-1:0][IVW-1:0] served;

  for (genvar j = 0; j < NUM_IVC; j++) begin : g_served
    assign served[j] = IVW'((j / NUM_VCS) * NUM_VCS) + IVW'(srv_id[j]);
  end

  always_comb begin
    s2_req = '0;
    for (int j = 0; j < NUM_IVC; j++)
      if (d1_valid[j] && !fault_arb2[srv_port[j]][d1_vc[j]])
        s2_req[srv_port[j]][d1_vc[j]][served[j]] = 1'b1;
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_s2_port
    for (genvar k = 0; k < NUM_VCS; k++) begin : g_s2_arb
      logic [IVW-1:0] unused_idx;
      logic           unused_any;
      rr_arbiter #(.N(NUM_IVC)) u_arb (
        .clk(clk), .rst_n(rst_n), .req(s2_req[o][k]), .advance(1'b1),
        .gnt(s2_gnt[o][k]), .gnt_idx(unused_idx), .gnt_any(unused_any)
      );
    end
  end

  // Grants back to the served input VCs; loan bookkeeping.
  logic [NUM_IVC-1:0] set_won;

  always_comb begin
    gnt          = '0;
    gnt_vc       = '0;
    gnt_borrowed = '0;
    set_won      = '0;
    for (int j = 0; j < NUM_IVC; j++) begin
      if (d1_valid[j] && s2_gnt[srv_port[j]][d1_vc[j]][served[j]]) begin
        set_won[j]              = 1'b1;
        gnt[served[j]]          = 1'b1;
        gnt_vc[served[j]]       = d1_vc[j];
        gnt_borrowed[served[j]] = srv_loan[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vf_q <= '0;
      id_q <= '0;
      r2_q <= '0;
    end else begin
      for (int j = 0; j < NUM_IVC; j++) begin
        if (srv_loan[j] && !set_won[j]) begin
          vf_q[j] <= 1'b1;
          id_q[j] <= srv_id[j];
          r2_q[j] <= srv_port[j];
        end else if (srv_loan[j]) begin
          vf_q[j] <= 1'b0;
          id_q[j] <= '0;
          r2_q[j] <= '0;
        end
      end
    end
  end

  assign lend_vf = vf_q;
  assign lend_id = id_q;
  assign lend_r2 = r2_q;

endmodule
