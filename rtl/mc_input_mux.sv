// mc_input_mux: the multiplexer at the front of each multicast module.
//
// A module takes packets from two sources: new packets that enter the router
// at this port's line input, and old packets that other modules have already
// processed and sent through the crossbar. The multiplexer passes one of them
// per cycle to the multicast control. That the multiplexer exists and what it
// joins follows the letter; the arbitration is this design's choice: old
// packets always go first, so traffic already inside the router drains before
// new load is taken, and a new packet is taken only while new_allow is high
// (the module raises it when its output queue is empty). The source not
// served is held by deasserting its ready.
//
// Interface: valid/ready on both inputs and on the output; combinational
// from inputs to output (no added latency, no state). `collide` is high in a
// cycle in which both sources offer a packet.
module mc_input_mux
  import mc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // new packets from the line input
  input  logic new_valid,
  input  logic new_allow,
  output logic new_ready,
  input  msg_t new_msg,
  // old packets from the crossbar
  input  logic old_valid,
  output logic old_ready,
  input  msg_t old_msg,
  // to the multicast control
  output logic out_valid,
  input  logic out_ready,
  output msg_t out_msg,
  output logic collide
);
  logic sel_old;

  assign sel_old   = old_valid;
  assign out_valid = old_valid || (new_valid && new_allow);
  assign out_msg   = sel_old ? old_msg : new_msg;
  assign old_ready = out_ready &&  sel_old;
  assign new_ready = out_ready && !sel_old && new_allow;
  assign collide   = new_valid && old_valid;

  // Exactly one source is served per accepted transfer.
  a_one_served: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && out_ready) |-> (old_ready ^ new_ready));
endmodule
