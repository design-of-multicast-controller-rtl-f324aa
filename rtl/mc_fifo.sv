// mc_fifo: small synchronous FIFO of messages, used as the output queue of a
// multicast module between its control and the crossbar.
//
// Valid/ready on both sides. push_ready is low when full; pop_valid is high
// while the FIFO holds a message and pop_data shows the oldest one. A push
// and a pop in the same cycle are both taken. Reset empties it. DEPTH must be
// a power of two. The queue itself is this design's choice.
module mc_fifo
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_valid,
  output logic push_ready,
  input  msg_t push_data,
  output logic pop_valid,
  input  logic pop_ready,
  output msg_t pop_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  msg_t          mem [DEPTH];
  logic [AW:0]   wr_ptr, rd_ptr;
  logic          full, empty;

  assign empty      = (wr_ptr == rd_ptr);
  assign full       = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign push_ready = !full;
  assign pop_valid  = !empty;
  assign pop_data   = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push_valid && push_ready) mem[wr_ptr[AW-1:0]] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push_valid && push_ready) wr_ptr <= wr_ptr + 1'b1;
      if (pop_valid && pop_ready)   rd_ptr <= rd_ptr + 1'b1;
    end
  end
endmodule
