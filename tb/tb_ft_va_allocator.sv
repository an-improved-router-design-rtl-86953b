// tb_ft_va_allocator: directed and random test of the VC allocator with arbiter
// sharing.
//
// Directed cases: a healthy VC is granted in the cycle it asks; a VC with retired
// arbiters borrows an idle sibling's and is still granted in the same cycle; when
// the borrowed attempt fails for lack of a free downstream VC, the lender's VF, ID
// and R2 fields hold the loan until the grant and are then cleared; a lender whose
// own VC starts allocating serves itself first and the borrower a cycle later; when all
// siblings are themselves allocating, the borrower is served one cycle later; a
// faulty second-stage arbiter's downstream VC is never given out and the request
// is served with another VC one cycle later. A random phase then checks that grants
// go only to requesting VCs, only to free downstream VCs with healthy second-stage
// arbiters, never twice per downstream VC per cycle, and that no request starves.
module tb_ft_va_allocator;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic  [NUM_IVC-1:0]                 req, fault_arb1, gnt, gnt_borrowed, lend_vf;
  port_t [NUM_IVC-1:0]                 req_port, lend_r2;
  vc_t   [NUM_IVC-1:0]                 gnt_vc, lend_id;
  logic  [NUM_PORTS-1:0][NUM_VCS-1:0]  ds_free, fault_arb2;

  ft_va_allocator dut (
    .clk(clk), .rst_n(rst_n), .req(req), .req_port(req_port), .ds_free(ds_free),
    .fault_arb1(fault_arb1), .fault_arb2(fault_arb2), .gnt(gnt), .gnt_vc(gnt_vc),
    .gnt_borrowed(gnt_borrowed), .lend_vf(lend_vf), .lend_id(lend_id), .lend_r2(lend_r2)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0; req = '0; req_port = '0; fault_arb1 = '0; fault_arb2 = '0; ds_free = '1;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  // random-phase model
  int busy_t  [NUM_PORTS][NUM_VCS];
  int wait_t  [NUM_IVC];
  int n_borrow;

  initial begin
    do_reset();

    // 1. healthy VC: granted in the same cycle
    req[5] = 1'b1; req_port[5] = 3'd2; #1;
    check(gnt[5] && !gnt_borrowed[5], "healthy VC not granted at once");
    @(negedge clk); req = '0;

    // 2. retired arbiters, idle sibling: borrowed, granted in the same cycle
    fault_arb1[4] = 1'b1;
    req[4] = 1'b1; req_port[4] = 3'd3; #1;
    check(gnt[4] && gnt_borrowed[4], "borrower not granted at once");
    @(negedge clk); req = '0;
    check(lend_vf == '0, "loan kept after a successful first attempt");

    // 3. failed borrowed attempt: loan held in VF/ID/R2 of the lender (VC1 of port 1)
    ds_free[3] = '0;
    req[4] = 1'b1; req_port[4] = 3'd3; #1;
    check(!gnt[4], "grant without a free downstream VC");
    @(negedge clk);
    check(lend_vf[5] && lend_id[5] == 2'd0 && lend_r2[5] == 3'd3, "R2/ID/VF not set on the lender");
    ds_free[3][2] = 1'b1; #1;
    check(gnt[4] && gnt_vc[4] == 2'd2 && gnt_borrowed[4], "borrower not served through the held loan");
    @(negedge clk); req = '0; ds_free = '1;
    check(!lend_vf[5] && lend_id[5] == '0 && lend_r2[5] == '0, "R2/ID/VF not cleared after the grant");

    // 3b. held loan, then a head flit reaches the lender itself: the lender's own VC
    // is served first and the borrower one cycle after it
    ds_free[3] = '0; ds_free[1] = 4'b0100;
    req[4] = 1'b1; req_port[4] = 3'd3;
    @(negedge clk);
    check(lend_vf[5] && lend_id[5] == 2'd0, "loan not held");
    req[5] = 1'b1; req_port[5] = 3'd1; ds_free[3] = 4'b1000; #1;
    check(gnt[5] && gnt_vc[5] == 2'd2 && !gnt_borrowed[5] && !gnt[4], "lender's own VC not served first");
    @(negedge clk); req[5] = 1'b0; #1;
    check(gnt[4] && gnt_vc[4] == 2'd3 && gnt_borrowed[4], "borrower not served in the next cycle");
    @(negedge clk); req = '0; ds_free = '1;
    check(!lend_vf[5], "loan not cleared");

    // 4. all siblings allocating: the borrower waits one cycle
    req[4] = 1'b1; req_port[4] = 3'd0;
    req[5] = 1'b1; req_port[5] = 3'd1;
    req[6] = 1'b1; req_port[6] = 3'd2;
    req[7] = 1'b1; req_port[7] = 3'd3; #1;
    check(!gnt[4] && gnt[5] && gnt[6] && gnt[7], "siblings or borrower wrong in the first cycle");
    @(negedge clk); req[5] = 1'b0; req[6] = 1'b0; req[7] = 1'b0; #1;
    check(gnt[4] && gnt_borrowed[4], "borrower not served one cycle later");
    @(negedge clk); req = '0; fault_arb1 = '0;

    // 5. faulty second-stage arbiter: its downstream VC is never given out
    do_reset();
    fault_arb2[2][0] = 1'b1;
    ds_free[2] = 4'b0011;
    req[0] = 1'b1; req_port[0] = 3'd2; #1;
    check(!gnt[0], "granted through a faulty second-stage arbiter");
    @(negedge clk); #1;
    check(gnt[0] && gnt_vc[0] == 2'd1, "retry did not pick the other free VC");
    @(negedge clk); req = '0; fault_arb2 = '0; ds_free = '1;

    // 6. random traffic with faults
    do_reset();
    n_borrow = 0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VCS; v++) busy_t[p][v] = 0;
      fault_arb1[p*NUM_VCS + $urandom_range(NUM_VCS-1)] = 1'b1;
      if (p % 2 == 0) fault_arb1[p*NUM_VCS + $urandom_range(NUM_VCS-1)] = 1'b1;
    end
    fault_arb2[1][2] = 1'b1; fault_arb2[4][0] = 1'b1;
    for (int i = 0; i < NUM_IVC; i++) wait_t[i] = 0;
    for (int t = 0; t < 5000; t++) begin
      logic [NUM_PORTS-1:0][NUM_VCS-1:0] taken;
      logic [NUM_IVC-1:0] g_snap;
      vc_t  [NUM_IVC-1:0] gv_snap;
      for (int o = 0; o < NUM_PORTS; o++)
        for (int k = 0; k < NUM_VCS; k++) ds_free[o][k] = (busy_t[o][k] == 0);
      for (int i = 0; i < NUM_IVC; i++)
        if (!req[i] && $urandom_range(99) < 20) begin
          req[i] = 1'b1; req_port[i] = port_t'($urandom_range(NUM_PORTS-1)); wait_t[i] = 0;
        end
      #1;
      taken = '0;
      for (int i = 0; i < NUM_IVC; i++) if (gnt[i]) begin
        check(req[i], "grant without request");
        check(ds_free[req_port[i]][gnt_vc[i]], "granted a busy downstream VC");
        check(!fault_arb2[req_port[i]][gnt_vc[i]], "granted through a faulty stage-2 arbiter");
        check(!taken[req_port[i]][gnt_vc[i]], "downstream VC granted twice");
        taken[req_port[i]][gnt_vc[i]] = 1'b1;
        if (gnt_borrowed[i]) n_borrow++;
      end
      g_snap  = gnt;
      gv_snap = gnt_vc;
      @(negedge clk);
      for (int o = 0; o < NUM_PORTS; o++)
        for (int k = 0; k < NUM_VCS; k++) if (busy_t[o][k] > 0) busy_t[o][k]--;
      for (int i = 0; i < NUM_IVC; i++) begin
        if (g_snap[i]) begin
          req[i] = 1'b0;
          busy_t[req_port[i]][gv_snap[i]] = 1 + $urandom_range(6);
        end else if (req[i]) begin
          wait_t[i]++;
          if (wait_t[i] == 300) check(0, $sformatf("input VC %0d starves", i));
        end
      end
    end
    check(n_borrow > 50, $sformatf("only %0d borrowed grants", n_borrow));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
