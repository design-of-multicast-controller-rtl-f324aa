// mc_module: the multicast module of one router port.
//
// Chain: input multiplexer (new packets from the line input, old packets from
// the crossbar) -> multicast control with its tree memory -> output queue.
// The head of the output queue is this port's request to the crossbar
// scheduler: req_valid with the destination port req_dest; the message is
// taken when xbar_ready is high. The grouping of multiplexer, control and
// scheduler per port follows the letter's block diagram; the scheduler itself
// is not part of this module (its request and grant signals are brought out)
// and the output queue is this design's addition that decouples the control
// from the crossbar. New packets from the line are taken only while the
// output queue is empty, and packets from the crossbar always go first: this
// keeps in-flight traffic draining. Queues are finite, so a circular wait of
// full queues between ports is still possible under sustained overload; the
// letter says nothing on flow control.
//
// Latency: a message accepted at clock edge E, with the control idle and the
// queue empty, puts its first output at the queue head (req_valid) after edge
// E+2; the crossbar can take it at edge E+3.
module mc_module
  import mc_pkg::*;
#(
  parameter port_t       MY_ID     = '0,
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  // line input: new packets and requests
  input  logic line_valid,
  output logic line_ready,
  input  msg_t line_msg,
  // from the crossbar: packets other modules sent to this port
  input  logic xin_valid,
  output logic xin_ready,
  input  msg_t xin_msg,
  // to the crossbar, through the scheduler
  output logic  req_valid,
  output port_t req_dest,
  output msg_t  xout_msg,
  input  logic  xbar_ready,
  // status
  output logic  created_valid,
  output sid_t  created_sid,
  output logic  collide,
  output evt_t  evt
);
  logic   mx_valid, mx_ready;
  msg_t   mx_msg;
  logic   ct_valid, ct_ready;
  msg_t   ct_msg;
  sid_t   mem_raddr, mem_waddr, free_sid;
  entry_t mem_rdata, mem_wdata;
  logic   mem_we, free_any;

  mc_input_mux u_mux (
    .clk, .rst_n,
    .new_valid(line_valid), .new_allow(!req_valid), .new_ready(line_ready), .new_msg(line_msg),
    .old_valid(xin_valid),  .old_ready(xin_ready),  .old_msg(xin_msg),
    .out_valid(mx_valid),   .out_ready(mx_ready),   .out_msg(mx_msg),
    .collide
  );

  mc_control #(.MY_ID(MY_ID)) u_ctrl (
    .clk, .rst_n,
    .in_valid(mx_valid), .in_ready(mx_ready), .in_msg(mx_msg),
    .out_valid(ct_valid), .out_ready(ct_ready), .out_msg(ct_msg),
    .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata,
    .mem_free_any(free_any), .mem_free_sid(free_sid),
    .created_valid, .created_sid, .evt
  );

  mc_tree_mem u_mem (
    .clk, .rst_n,
    .raddr(mem_raddr), .rdata(mem_rdata),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .free_any, .free_sid
  );

  mc_fifo #(.DEPTH(OUT_DEPTH)) u_outq (
    .clk, .rst_n,
    .push_valid(ct_valid), .push_ready(ct_ready), .push_data(ct_msg),
    .pop_valid(req_valid), .pop_ready(xbar_ready), .pop_data(xout_msg)
  );

  assign req_dest = xout_msg.dest;
endmodule
