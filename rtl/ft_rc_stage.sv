// ft_rc_stage: routing computation stage of one input port, with spatial redundancy.
//
// Two identical XY routing units work on the head flit's destination. The primary
// unit is used while it is healthy; when the fault detector flags it
// ('fault_primary'), it is switched off and the duplicate is switched on instead.
// With both flagged no valid route is produced ('valid' low) and the head flit waits.
//
// The stage also fills the secondary-path fields: if the computed output port is
// marked unreachable through its own crossbar multiplexer or SA arbiter
// ('port_unreach'), 'fsp' is set and 'sp' names the output port whose multiplexer
// can be steered to the wanted port (Fig. 6 wiring); otherwise 'sp' equals the route.
// Combinational; the input port registers the result into the VC state.
module ft_rc_stage
  import noc_pkg::*;
(
  input  logic [NODE_W-1:0]    dest,
  input  logic [COORD_W-1:0]   cur_x,
  input  logic [COORD_W-1:0]   cur_y,
  input  logic                 fault_primary,
  input  logic                 fault_dup,
  input  logic [NUM_PORTS-1:0] port_unreach,
  output logic                 valid,
  output port_t                route,
  output port_t                sp,
  output logic                 fsp,
  output logic                 using_dup
);

  logic  prim_valid, dup_valid;
  port_t prim_port, dup_port;

  xy_rc_unit u_primary (
    .en(!fault_primary), .dest(dest), .cur_x(cur_x), .cur_y(cur_y),
    .valid(prim_valid), .out_port(prim_port)
  );

  // The duplicate is turned on only once the primary is known to be faulty.
  xy_rc_unit u_duplicate (
    .en(fault_primary && !fault_dup), .dest(dest), .cur_x(cur_x), .cur_y(cur_y),
    .valid(dup_valid), .out_port(dup_port)
  );

  always_comb begin
    using_dup = !prim_valid && dup_valid;
    valid     = prim_valid || dup_valid;
    route     = prim_valid ? prim_port : dup_port;
    fsp       = valid && port_unreach[route];
    sp        = fsp ? secondary_port(route) : route;
  end

endmodule
