// output_vc_state: what the router knows about the VCs of its downstream neighbours:
// which are held by a packet, and how many credits (free buffer slots) each has.
//
// For every output port and every downstream VC it keeps a busy flag and a credit
// counter starting at BUF_DEPTH. A VA grant ('alloc') sets busy. A flit leaving on
// that VC ('send', counted when the switch is granted) takes one credit, and a tail
// flit clears busy. A credit returned by the neighbour ('credit_in') adds one. A VC
// is offered to VC allocation ('free') only when it is not busy and all its credits
// are back, so a downstream VC holds at most one packet. 'credit_ok' tells the
// switch allocator that at least one slot is free.
//
// The document names a credit-count field 'C' per VC without further detail; the
// counters are kept here per downstream VC, the usual arrangement for credit-based
// flow control, and the policy above is this design's choice.
//
// 'rst_n' resets the counters asynchronously and also disables the credit-overflow
// assertion; linters may report it as both a synchronous and an asynchronous net,
// which is harmless since the assertion is not logic.
module output_vc_state
  import noc_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0]  alloc,
  input  logic [NUM_PORTS-1:0]               send,
  input  vc_t  [NUM_PORTS-1:0]               send_vc,
  input  logic [NUM_PORTS-1:0]               send_tail,
  input  logic [NUM_PORTS-1:0]               credit_in,
  input  vc_t  [NUM_PORTS-1:0]               credit_in_vc,
  output logic [NUM_PORTS-1:0][NUM_VCS-1:0]  free,
  output logic [NUM_PORTS-1:0][NUM_VCS-1:0]  credit_ok
);

  logic [NUM_PORTS-1:0][NUM_VCS-1:0]              busy_q;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0][CRED_W-1:0]  cred_q;

  logic [NUM_PORTS-1:0][NUM_VCS-1:0] dec, inc;

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int k = 0; k < NUM_VCS; k++) begin
        dec[o][k] = send[o] && send_vc[o] == vc_t'(k);
        inc[o][k] = credit_in[o] && credit_in_vc[o] == vc_t'(k);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      for (int o = 0; o < NUM_PORTS; o++)
        for (int k = 0; k < NUM_VCS; k++) cred_q[o][k] <= CRED_W'(BUF_DEPTH);
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int k = 0; k < NUM_VCS; k++) begin
          cred_q[o][k] <= cred_q[o][k] - CRED_W'(dec[o][k]) + CRED_W'(inc[o][k]);
          if (alloc[o][k])                    busy_q[o][k] <= 1'b1;
          else if (dec[o][k] && send_tail[o]) busy_q[o][k] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int k = 0; k < NUM_VCS; k++) begin
        free[o][k]      = !busy_q[o][k] && cred_q[o][k] == CRED_W'(BUF_DEPTH);
        credit_ok[o][k] = cred_q[o][k] != '0;
      end
  end

  // A neighbour never returns a credit for a VC whose buffer it already reported
  // empty.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      credit_in[o] |-> (cred_q[o][credit_in_vc[o]] != CRED_W'(BUF_DEPTH)) ||
                       (send[o] && send_vc[o] == credit_in_vc[o]))
      else $error("credit returned beyond buffer depth on output %0d", o);
  end

endmodule
