// mc_router_top: multicast control plane of an N-port router.
//
// Every port has a multicast module (input multiplexer, multicast control,
// tree memory, output queue). The heads of the output queues enter a unicast
// N x N crossbar; crossbar output j is the router's line output j and also
// loops back into module j, so a packet delivered to a port is both sent out
// of that port and circulated further down the session's tree by that port.
// This arrangement follows the letter's block diagram.
//
// The crossbar scheduler is not part of this RTL: each port's request
// (sched_req_valid, sched_req_dest = destination port of its head message)
// is brought out, and the scheduler returns, per output j, sched_sel_valid[j]
// and the input sched_sel_in[j] it connects. A message moves when its output
// module is ready; the scheduler can keep a grant until then.
//
// The line inputs take new data packets (with the SID the root's address
// lookup produced) and the CREATE, ADD and REMOVE requests of the sessions
// rooted at that port. The number of ports is N_PORTS of mc_pkg. line_out_valid[j] pulses for each data packet that
// leaves on port j. Line outputs are assumed always ready.
module mc_router_top
  import mc_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // line inputs
  input  logic  [N_PORTS-1:0]       line_in_valid,
  output logic  [N_PORTS-1:0]       line_in_ready,
  input  msg_t  [N_PORTS-1:0]       line_in_msg,
  // line outputs (data packets only)
  output logic  [N_PORTS-1:0]       line_out_valid,
  output msg_t  [N_PORTS-1:0]       line_out_msg,
  // crossbar scheduler
  output logic  [N_PORTS-1:0]       sched_req_valid,
  output port_t [N_PORTS-1:0]       sched_req_dest,
  input  logic  [N_PORTS-1:0]       sched_sel_valid,
  input  port_t [N_PORTS-1:0]       sched_sel_in,
  // status
  output logic  [N_PORTS-1:0]       created_valid,
  output sid_t  [N_PORTS-1:0]       created_sid,
  output logic  [N_PORTS-1:0]       collide,
  output evt_t  [N_PORTS-1:0]       evt
);
  localparam int unsigned N = N_PORTS;

  logic [N-1:0] xo_valid, xo_ready;   // crossbar inputs (module outputs)
  msg_t [N-1:0] xo_msg;
  logic [N-1:0] xi_valid, xi_ready;   // crossbar outputs (module inputs)
  msg_t [N-1:0] xi_msg;

  for (genvar p = 0; p < N; p++) begin : g_port
    mc_module #(.MY_ID(port_t'(p)), .OUT_DEPTH(OUT_DEPTH)) u_module (
      .clk, .rst_n,
      .line_valid(line_in_valid[p]), .line_ready(line_in_ready[p]), .line_msg(line_in_msg[p]),
      .xin_valid(xi_valid[p]), .xin_ready(xi_ready[p]), .xin_msg(xi_msg[p]),
      .req_valid(xo_valid[p]), .req_dest(sched_req_dest[p]), .xout_msg(xo_msg[p]),
      .xbar_ready(xo_ready[p]),
      .created_valid(created_valid[p]), .created_sid(created_sid[p]),
      .collide(collide[p]), .evt(evt[p])
    );
    assign line_out_valid[p] = xi_valid[p] && xi_ready[p] && (xi_msg[p].kind == MSG_DATA);
    assign line_out_msg[p]   = xi_msg[p];
  end

  assign sched_req_valid = xo_valid;

  mc_crossbar #(.N(N)) u_xbar (
    .clk, .rst_n,
    .in_valid(xo_valid), .in_msg(xo_msg), .in_ready(xo_ready),
    .sel_valid(sched_sel_valid), .sel_in(sched_sel_in),
    .out_valid(xi_valid), .out_msg(xi_msg), .out_ready(xi_ready)
  );
endmodule
