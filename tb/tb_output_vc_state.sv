// tb_output_vc_state: random test of the downstream VC status and credit counters.
//
// A reference model kept here tracks, per output port and downstream VC, the busy
// flag and the credit count. Random legal stimulus allocates free VCs, sends flits
// (the last one of a packet as a tail) while credits remain and returns credits that
// are outstanding; after every edge 'free' and 'credit_ok' must match the model.
module tb_output_vc_state;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic [NUM_PORTS-1:0][NUM_VCS-1:0] alloc, free, credit_ok;
  logic [NUM_PORTS-1:0]              send, send_tail, credit_in;
  vc_t  [NUM_PORTS-1:0]              send_vc, credit_in_vc;

  output_vc_state dut (
    .clk(clk), .rst_n(rst_n), .alloc(alloc), .send(send), .send_vc(send_vc),
    .send_tail(send_tail), .credit_in(credit_in), .credit_in_vc(credit_in_vc),
    .free(free), .credit_ok(credit_ok)
  );

  int checks = 0, failures = 0;
  int m_busy [NUM_PORTS][NUM_VCS];
  int m_cred [NUM_PORTS][NUM_VCS];
  int m_left [NUM_PORTS][NUM_VCS];   // flits still to send in the packet
  int n_free_again = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; alloc = '0; send = '0; send_tail = '0; send_vc = '0;
    credit_in = '0; credit_in_vc = '0;
    for (int o = 0; o < NUM_PORTS; o++)
      for (int k = 0; k < NUM_VCS; k++) begin
        m_busy[o][k] = 0; m_cred[o][k] = BUF_DEPTH; m_left[o][k] = 0;
      end
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 10000; c++) begin
      @(negedge clk);
      for (int o = 0; o < NUM_PORTS; o++)
        for (int k = 0; k < NUM_VCS; k++) begin
          check(free[o][k] == (m_busy[o][k] == 0 && m_cred[o][k] == BUF_DEPTH), "free flag");
          check(credit_ok[o][k] == (m_cred[o][k] > 0), "credit_ok flag");
        end
      alloc = '0; send = '0; send_tail = '0; credit_in = '0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        int k;
        // allocate a free VC now and then
        k = $urandom_range(NUM_VCS-1);
        if (m_busy[o][k] == 0 && m_cred[o][k] == BUF_DEPTH && $urandom_range(3) == 0) begin
          alloc[o][k] = 1'b1;
          m_busy[o][k] = 1;
          m_left[o][k] = 1 + $urandom_range(6);
        end
        // send one flit on a busy VC holding credits (not the one just allocated)
        k = $urandom_range(NUM_VCS-1);
        if (m_busy[o][k] == 1 && !alloc[o][k] && m_left[o][k] > 0 && m_cred[o][k] > 0 &&
            $urandom_range(1) == 0) begin
          send[o] = 1'b1; send_vc[o] = vc_t'(k);
          m_cred[o][k]--;
          m_left[o][k]--;
          if (m_left[o][k] == 0) begin
            send_tail[o] = 1'b1;
            m_busy[o][k] = 0;
          end
        end
        // return an outstanding credit
        k = $urandom_range(NUM_VCS-1);
        if (m_cred[o][k] < BUF_DEPTH && !(send[o] && send_vc[o] == vc_t'(k)) && $urandom_range(2) == 0) begin
          credit_in[o] = 1'b1; credit_in_vc[o] = vc_t'(k);
          m_cred[o][k]++;
          if (m_busy[o][k] == 0 && m_cred[o][k] == BUF_DEPTH) n_free_again++;
        end
      end
    end
    check(n_free_again > 50, "VCs rarely released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
