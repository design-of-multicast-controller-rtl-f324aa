// xbar_sched_model: behavioural stand-in for the router's crossbar scheduler,
// used only by testbenches.
//
// Each output picks, among the inputs whose head message is addressed to it,
// the first one at or after a round-robin pointer; the pointers advance every
// cycle. Since an input requests one output only, no input is given to two
// outputs. The real scheduler is a separate design and is not modelled.
module xbar_sched_model
  import mc_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic  [N-1:0]                  req_valid,
  input  port_t [N-1:0]                  req_dest,
  output logic  [N-1:0]                  sel_valid,
  output logic  [N-1:0][$clog2(N)-1:0]   sel_in
);
  logic [$clog2(N)-1:0] ptr;

  always_comb begin
    sel_valid = '0;
    sel_in    = '0;
    for (int j = 0; j < N; j++) begin
      for (int k = N - 1; k >= 0; k--) begin
        int i;
        i = (int'(ptr) + k + j) % N;
        if (req_valid[i] && int'(req_dest[i]) == j) begin
          sel_valid[j] = 1'b1;
          sel_in[j]    = i[$clog2(N)-1:0];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else        ptr <= ptr + 1'b1;
  end
endmodule
