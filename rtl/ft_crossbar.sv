// ft_crossbar: 5x5 crossbar with a secondary path to every output port.
//
// As in a plain crossbar, five 5:1 multiplexers M1..M5 each take one input port.
// Behind them sits the correction circuitry: demultiplexers D1 (1:3, behind M2),
// D2, D3 and D4 (1:2, behind M3, M4 and M5) and 2:1 multiplexers P1..P5 in front of
// the outputs. They are wired so that
//   out1 <- M1 or M2 (via D1)        out4 <- M4 or M5 (via D3 / D4)
//   out2 <- M2 or M3 (via D1 / D2)   out5 <- M5 or M4 (via D4 / D3)
//   out3 <- M3 or M2 (via D2 / D1)
// Fault free, Mk feeds out k, like the plain crossbar. If Mk cannot be used, the
// switch allocator sends the flits for out k through the other multiplexer that
// reaches it and steers that multiplexer's demultiplexer and out k's 2:1 multiplexer.
//
// Control per multiplexer m (0-based, Mk is m = k-1): 'm_valid', 'm_sel' (input port)
// and 'm_dst' (output port its flit is meant for). The D and P select lines are
// decoded here from 'm_dst'; each P multiplexer takes its first input from the
// primary path and its second from the secondary path (an ordering chosen here). A
// multiplexer flagged faulty ('mux_fault') passes nothing. Purely combinational.
module ft_crossbar
  import noc_pkg::*;
(
  input  flit_t [NUM_PORTS-1:0] in_flit,
  input  logic  [NUM_PORTS-1:0] m_valid,
  input  port_t [NUM_PORTS-1:0] m_sel,
  input  port_t [NUM_PORTS-1:0] m_dst,
  input  logic  [NUM_PORTS-1:0] mux_fault,
  output logic  [NUM_PORTS-1:0] out_valid,
  output flit_t [NUM_PORTS-1:0] out_flit
);

  // Multiplexers M1..M5.
  flit_t [NUM_PORTS-1:0] m_out;
  logic  [NUM_PORTS-1:0] m_v;

  always_comb begin
    for (int m = 0; m < NUM_PORTS; m++) begin
      m_v[m]   = m_valid[m] && !mux_fault[m] && mux_reaches(port_t'(m), m_dst[m]);
      m_out[m] = in_flit[m_sel[m]];
    end
  end

  // Demultiplexers: D1 (M2 -> P1/P2/P3), D2 (M3 -> P2/P3), D3 (M4 -> P4/P5),
  // D4 (M5 -> P4/P5). Each branch carries the flit and a valid bit.
  logic d1_p1, d1_p2, d1_p3, d2_p2, d2_p3, d3_p4, d3_p5, d4_p4, d4_p5;

  always_comb begin
    d1_p1 = m_v[1] && m_dst[1] == 3'd0;
    d1_p2 = m_v[1] && m_dst[1] == 3'd1;
    d1_p3 = m_v[1] && m_dst[1] == 3'd2;
    d2_p2 = m_v[2] && m_dst[2] == 3'd1;
    d2_p3 = m_v[2] && m_dst[2] == 3'd2;
    d3_p4 = m_v[3] && m_dst[3] == 3'd3;
    d3_p5 = m_v[3] && m_dst[3] == 3'd4;
    d4_p4 = m_v[4] && m_dst[4] == 3'd3;
    d4_p5 = m_v[4] && m_dst[4] == 3'd4;
  end

  // 2:1 multiplexers P1..P5: first input primary, second input secondary.
  always_comb begin
    // P1: M1 | D1
    out_valid[0] = (m_v[0] && m_dst[0] == 3'd0) || d1_p1;
    out_flit[0]  = d1_p1 ? m_out[1] : m_out[0];
    // P2: D1 | D2
    out_valid[1] = d1_p2 || d2_p2;
    out_flit[1]  = d2_p2 ? m_out[2] : m_out[1];
    // P3: D2 | D1
    out_valid[2] = d2_p3 || d1_p3;
    out_flit[2]  = d1_p3 ? m_out[1] : m_out[2];
    // P4: D3 | D4
    out_valid[3] = d3_p4 || d4_p4;
    out_flit[3]  = d4_p4 ? m_out[4] : m_out[3];
    // P5: D4 | D3
    out_valid[4] = d4_p5 || d3_p5;
    out_flit[4]  = d3_p5 ? m_out[3] : m_out[4];
  end

endmodule
