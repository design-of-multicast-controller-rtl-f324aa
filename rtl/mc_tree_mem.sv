// mc_tree_mem: the multicast tree memory of one port.
//
// One entry per multicast session that passes the port, addressed by the
// session's SID at this port. An entry names the parent and the two children
// of this port in the session's circulation tree, each as (port ID, SID), and
// the port's tree level (entry_t in mc_pkg). Keeping exactly parent and
// children per entry follows the letter; the level field, the word layout and
// the free-SID search are this design's choices.
//
// Timing: one synchronous read port (data one cycle after the address) and
// one write port. A separate register of valid bits, kept in step with the
// valid field of every write, feeds a priority encoder that offers the lowest
// free SID combinationally; free_any is low when every SID is in use. After
// reset every entry reads as invalid: the array itself is not cleared, so the
// read data is masked with the valid register.
module mc_tree_mem
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = N_SID
) (
  input  logic   clk,
  input  logic   rst_n,
  input  sid_t   raddr,
  output entry_t rdata,
  input  logic   we,
  input  sid_t   waddr,
  input  entry_t wdata,
  output logic   free_any,
  output sid_t   free_sid
);
  localparam int unsigned AW = $clog2(DEPTH);

  entry_t            mem [DEPTH];
  logic [AW-1:0]     ra, wa;        // addresses cut to the memory size
  logic [DEPTH-1:0]  used;
  entry_t            rd_q;
  logic              rd_used_q;

  assign ra = raddr[AW-1:0];
  assign wa = waddr[AW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wdata;
    rd_q <= mem[ra];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      used      <= '0;
      rd_used_q <= 1'b0;
    end else begin
      if (we) used[wa] <= wdata.vld;
      rd_used_q <= used[ra];
    end
  end

  always_comb begin
    rdata     = rd_q;
    rdata.vld = rd_q.vld && rd_used_q;
  end

  always_comb begin
    free_any = 1'b0;
    free_sid = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!used[i]) begin
        free_any = 1'b1;
        free_sid = sid_t'(i);
      end
    end
  end
endmodule
