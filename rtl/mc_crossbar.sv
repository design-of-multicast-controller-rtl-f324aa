// mc_crossbar: the unicast N x N crossbar between the multicast modules.
//
// Input i carries the head message of module i, which names its destination
// port. For every output j the scheduler supplies sel_valid[j] and the input
// sel_in[j] that output j takes this cycle. Output j shows that input's
// message when it is valid and addressed to j; the input sees ready when the
// output's receiver is ready. Each output feeds both the router's line output
// and the multiplexer of module j. The fabric is combinational; only its
// place in the router is given by the block diagram, the select interface is
// this design's choice. A scheduler must not give one input to two outputs;
// an assertion checks this.
module mc_crossbar
  import mc_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic  [N-1:0]          in_valid,
  input  msg_t  [N-1:0]          in_msg,
  output logic  [N-1:0]          in_ready,
  input  logic  [N-1:0]          sel_valid,
  input  logic  [N-1:0][$clog2(N)-1:0] sel_in,
  output logic  [N-1:0]          out_valid,
  output msg_t  [N-1:0]          out_msg,
  input  logic  [N-1:0]          out_ready
);
  logic [N-1:0][N-1:0] conn;   // conn[j][i]: output j passes input i

  always_comb begin
    for (int j = 0; j < N; j++) begin
      conn[j]      = '0;
      out_msg[j]   = in_msg[sel_in[j]];
      out_valid[j] = 1'b0;
      if (sel_valid[j] && in_valid[sel_in[j]] &&
          int'(in_msg[sel_in[j]].dest) == j) begin
        out_valid[j]       = 1'b1;
        conn[j][sel_in[j]] = 1'b1;
      end
    end
    in_ready = '0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        if (conn[j][i] && out_ready[j]) in_ready[i] = 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_chk
    logic [N-1:0] col;
    for (genvar j = 0; j < N; j++) begin : g_col
      assign col[j] = conn[j][i];
    end
    a_one_output: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col));
  end
endmodule
