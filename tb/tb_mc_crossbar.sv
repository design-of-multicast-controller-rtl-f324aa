// tb_mc_crossbar: test of the N x N crossbar at 16 ports.
//
// Every cycle each input gets a random message with a random destination and
// each output a random select (or none) and a random ready. The expected
// output valid, output message and input ready are computed here from the
// definition: output j carries the selected input when that input is valid
// and addressed to j, and an input is ready when such an output is ready.
// Selections never give one input to two outputs (the crossbar asserts it).
module tb_mc_crossbar;
  import mc_pkg::*;

  localparam int N = N_PORTS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [N-1:0] in_valid, in_ready, sel_valid, out_valid, out_ready;
  msg_t  [N-1:0] in_msg, out_msg;
  port_t [N-1:0] sel_in;

  mc_crossbar #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_msg, .in_ready, .sel_valid, .sel_in,
                           .out_valid, .out_msg, .out_ready);

  int checks = 0, failures = 0;
  int passed = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = '0; in_msg = '0; sel_valid = '0; sel_in = '0; out_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      bit taken [N];
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(3) != 0);
        in_msg[i] = '0;
        in_msg[i].dest = port_t'($urandom_range(N - 1));
        in_msg[i].data = DATA_W'($urandom);
        taken[i] = 0;
      end
      // a random permutation of inputs; some outputs left unselected
      for (int j = 0; j < N; j++) begin
        int i;
        do i = int'($urandom_range(N - 1)); while (taken[i]);
        taken[i] = 1;
        sel_in[j] = port_t'(i);
        // usually pick an input that wants this output, if there is a free one
        for (int c = 0; c < N; c++)
          if (!taken[c] && in_msg[c].dest == port_t'(j) && $urandom_range(1) == 1) begin
            taken[i] = 0; taken[c] = 1; sel_in[j] = port_t'(c); break;
          end
        sel_valid[j] = ($urandom_range(4) != 0);
        out_ready[j] = ($urandom_range(3) != 0);
      end
      #1;
      for (int j = 0; j < N; j++) begin
        bit want;
        want = sel_valid[j] && in_valid[sel_in[j]] && in_msg[sel_in[j]].dest == port_t'(j);
        check(out_valid[j] == want, $sformatf("out_valid[%0d]", j));
        if (want) begin
          check(out_msg[j] == in_msg[sel_in[j]], $sformatf("out_msg[%0d]", j));
          if (out_ready[j]) passed++;
        end
      end
      for (int i = 0; i < N; i++) begin
        bit want;
        want = 0;
        for (int j = 0; j < N; j++)
          if (sel_valid[j] && sel_in[j] == port_t'(i) && in_valid[i] &&
              in_msg[i].dest == port_t'(j) && out_ready[j]) want = 1;
        check(in_ready[i] == want, $sformatf("in_ready[%0d]", i));
      end
    end
    check(passed > 1000, $sformatf("messages passed: %0d", passed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
