// tb_ft_sa_allocator: random test of the switch allocator and its bypass path.
//
// Every cycle random VCs request random output ports. Checked against rules worked
// out here: at most one grant per input port and per output port, grants only to
// requesting VCs, out_src naming the granted input for the requested port, nothing
// for a blocked input port or through a faulty second-stage arbiter, and, for an
// input port whose first-stage arbiter is faulty, only the default winner may win.
// The default winner must step to the next VC every DW_PERIOD cycles, and a VC that
// keeps requesting must win within a bounded time (bypass included).
module tb_ft_sa_allocator;
  import noc_pkg::*;

  localparam int unsigned DWP = 8;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic  [NUM_IVC-1:0]   req;
  port_t [NUM_IVC-1:0]   req_port;
  logic  [NUM_PORTS-1:0] block_port, fault_arb1, fault_arb2, in_gnt, in_bypass, out_gnt;
  vc_t   [NUM_PORTS-1:0] in_gnt_vc, dw_vc;
  port_t [NUM_PORTS-1:0] out_src;

  ft_sa_allocator #(.DW_PERIOD(DWP)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .req_port(req_port), .block_port(block_port),
    .fault_arb1(fault_arb1), .fault_arb2(fault_arb2), .in_gnt(in_gnt),
    .in_gnt_vc(in_gnt_vc), .in_bypass(in_bypass), .out_gnt(out_gnt), .out_src(out_src),
    .dw_vc(dw_vc)
  );

  int checks = 0, failures = 0;
  int n_bypass = 0;
  int wait_t [NUM_IVC];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; req = '0; req_port = '0; block_port = '0;
    fault_arb1 = 5'b00101; fault_arb2 = 5'b01000;
    for (int i = 0; i < NUM_IVC; i++) wait_t[i] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 8000; c++) begin
      logic [NUM_PORTS-1:0] out_used, g_snap;
      vc_t  [NUM_PORTS-1:0] gv_snap;
      // new requests; a VC keeps its request until it is served
      for (int i = 0; i < NUM_IVC; i++)
        if (!req[i] && $urandom_range(99) < 15) begin
          int o;
          do o = $urandom_range(NUM_PORTS-1); while (fault_arb2[o]);
          req[i] = 1'b1; req_port[i] = port_t'(o); wait_t[i] = 0;
        end
      block_port = ($urandom_range(9) == 0) ? 5'(1 << $urandom_range(4)) : '0;
      #1;
      // default winner register steps every DWP cycles, the same for all ports
      for (int p = 0; p < NUM_PORTS; p++)
        check(int'(dw_vc[p]) == (c / DWP) % NUM_VCS, $sformatf("default winner %0d at cycle %0d", dw_vc[p], c));
      out_used = '0;
      for (int p = 0; p < NUM_PORTS; p++) if (in_gnt[p]) begin
        int i;
        i = p * NUM_VCS + int'(in_gnt_vc[p]);
        check(req[i], "grant without request");
        check(!block_port[p], "grant to a blocked port");
        check(!fault_arb2[req_port[i]], "grant through a faulty output arbiter");
        check(!out_used[req_port[i]], "output port granted twice");
        out_used[req_port[i]] = 1'b1;
        check(out_gnt[req_port[i]] && out_src[req_port[i]] == port_t'(p), "out_src mismatch");
        check(in_bypass[p] == fault_arb1[p], "bypass flag");
        if (fault_arb1[p]) begin
          check(in_gnt_vc[p] == dw_vc[p], "faulty-arbiter port granted a non-default VC");
          n_bypass++;
        end
      end
      for (int o = 0; o < NUM_PORTS; o++)
        if (out_gnt[o]) check(out_used[o], "output granted with no input granted");
      g_snap  = in_gnt;
      gv_snap = in_gnt_vc;
      @(negedge clk);
      for (int i = 0; i < NUM_IVC; i++) if (req[i]) wait_t[i]++;
      for (int p = 0; p < NUM_PORTS; p++)
        if (g_snap[p]) req[p * NUM_VCS + int'(gv_snap[p])] = 1'b0;
      for (int i = 0; i < NUM_IVC; i++)
        if (req[i] && wait_t[i] == 200) check(0, $sformatf("VC %0d starves", i));
    end
    check(n_bypass > 100, "bypass path rarely used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
