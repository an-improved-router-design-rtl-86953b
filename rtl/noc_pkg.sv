// noc_pkg: sizes, flit format and VC state encoding shared by every block of the
// fault-tolerant router.
//
// The router has five input and five output ports with four virtual channels (VCs)
// per port, each VC holding four flits, and a 32-bit flit datapath; these are the
// sizes the router was evaluated at. It sits in an 8x8 mesh, so a node is named by a
// 6-bit number made of a 3-bit X and a 3-bit Y coordinate.
//
// Flit layout (a choice of this design; only the 32-bit width is given):
//   [31]    head marker       [30] tail marker  (both set: single-flit packet)
//   [29:24] destination node, {y[2:0], x[2:0]}, meaningful in head flits
//   [23:0]  payload
//
// Port numbering (this design's choice): 0 local, 1 north (+y), 2 east (+x),
// 3 south (-y), 4 west (-x). Crossbar multiplexer Mk of the figures drives output
// port k-1.
package noc_pkg;

  localparam int unsigned NUM_PORTS = 5;   // p_i = p_o
  localparam int unsigned NUM_VCS   = 4;   // v
  localparam int unsigned BUF_DEPTH = 4;   // flits per VC
  localparam int unsigned FLIT_W    = 32;
  localparam int unsigned COORD_W   = 3;   // 8x8 mesh
  localparam int unsigned NODE_W    = 2 * COORD_W;

  localparam int unsigned PORT_W  = $clog2(NUM_PORTS);
  localparam int unsigned VC_W    = $clog2(NUM_VCS);
  localparam int unsigned CRED_W  = $clog2(BUF_DEPTH + 1);
  localparam int unsigned NUM_IVC = NUM_PORTS * NUM_VCS;  // input VCs of the router

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [PORT_W-1:0] port_t;
  typedef logic [VC_W-1:0]   vc_t;

  localparam port_t PORT_LOCAL = 3'd0;
  localparam port_t PORT_NORTH = 3'd1;
  localparam port_t PORT_EAST  = 3'd2;
  localparam port_t PORT_SOUTH = 3'd3;
  localparam port_t PORT_WEST  = 3'd4;

  // 'G' field: where the packet held by a VC is in the pipeline.
  typedef enum logic [1:0] {
    G_IDLE    = 2'd0,   // no packet, or a head flit waiting for RC
    G_VA      = 2'd1,   // route known, waiting for a downstream VC
    G_ACTIVE  = 2'd2    // downstream VC held, flits go through SA and XB
  } vc_g_t;

  // Per-VC state fields of the input port (G, R, O, SP, FSP). The P (pointer)
  // field lives with the buffer and the C (credit) field with the output side.
  typedef struct packed {
    vc_g_t g;
    port_t r;     // RC result: real output port
    vc_t   o;     // VA result: downstream VC
    port_t sp;    // output port to arbitrate for in SA when FSP is set
    logic  fsp;   // secondary crossbar path in use
  } vc_state_t;

  function automatic logic flit_is_head(flit_t f);
    return f[31];
  endfunction

  function automatic logic flit_is_tail(flit_t f);
    return f[30];
  endfunction

  function automatic logic [NODE_W-1:0] flit_dest(flit_t f);
    return f[29:24];
  endfunction

  // Crossbar secondary path (Fig. 6): the multiplexer whose output can be steered
  // to output port 'o' when o's own multiplexer or SA arbiter is out of service.
  //   out1 <- M2, out2 <- M3, out3 <- M2, out4 <- M5, out5 <- M4
  function automatic port_t secondary_port(port_t o);
    case (o)
      3'd0:    return 3'd1;
      3'd1:    return 3'd2;
      3'd2:    return 3'd1;
      3'd3:    return 3'd4;
      default: return 3'd3;
    endcase
  endfunction

  // True when multiplexer 'm' can reach output port 'o' through the correction
  // circuitry of Fig. 6: M1 -> {out1}, M2 -> {out1,out2,out3}, M3 -> {out2,out3},
  // M4 -> {out4,out5}, M5 -> {out4,out5}.
  function automatic logic mux_reaches(port_t m, port_t o);
    case (m)
      3'd0:    return o == 3'd0;
      3'd1:    return o <= 3'd2;
      3'd2:    return o == 3'd1 || o == 3'd2;
      3'd3:    return o == 3'd3 || o == 3'd4;
      default: return o == 3'd3 || o == 3'd4;
    endcase
  endfunction

endpackage
