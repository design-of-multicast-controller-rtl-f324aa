// tb_mc_input_mux: test of the input multiplexer.
//
// Random valid patterns on both sources, random new_allow and random output
// ready. Every cycle the expected selection is worked out here: a crossbar
// (old) packet whenever one is offered, otherwise a line (new) packet if it is
// allowed. Checks output valid, data, both readies and the collision flag,
// and that every packet offered by either source is passed on exactly once
// and in order.
module tb_mc_input_mux;
  import mc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic new_valid, new_allow, new_ready, old_valid, old_ready, out_valid, out_ready, collide;
  msg_t new_msg, old_msg, out_msg;

  mc_input_mux dut (.clk, .rst_n, .new_valid, .new_allow, .new_ready, .new_msg,
                    .old_valid, .old_ready, .old_msg, .out_valid, .out_ready, .out_msg, .collide);

  int checks = 0, failures = 0;
  int new_sent = 0, old_sent = 0, new_got = 0, old_got = 0;

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

  function automatic msg_t mk_pkt(bit old, int n);
    msg_t m;
    m = '0;
    m.kind = MSG_DATA;
    m.dir  = old;
    m.data = DATA_W'(n);
    return m;
  endfunction

  initial begin
    new_valid = 0; old_valid = 0; new_allow = 1; out_ready = 1;
    new_msg = mk_pkt(0, 0); old_msg = mk_pkt(1, 0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // a source keeps its packet until taken; otherwise it may offer the next one
      if (!new_valid) begin
        new_valid = ($urandom_range(2) != 0);
        new_msg   = mk_pkt(0, new_sent);
      end
      if (!old_valid) begin
        old_valid = ($urandom_range(2) != 0);
        old_msg   = mk_pkt(1, old_sent);
      end
      new_allow = ($urandom_range(3) != 0);
      out_ready = ($urandom_range(3) != 0);
      #1;
      begin
        bit want_old, want_new;
        want_old = old_valid;
        want_new = !old_valid && new_valid && new_allow;
        check(out_valid == (want_old || want_new), "out_valid");
        check(collide == (old_valid && new_valid), "collide");
        check(old_ready == (out_ready && old_valid), "old_ready");
        check(new_ready == (out_ready && !old_valid && new_allow), "new_ready");
        if (want_old) check(out_msg == old_msg, "old packet passed");
        else if (want_new) check(out_msg == new_msg, "new packet passed");
        if (out_valid && out_ready) begin
          if (out_msg.dir) begin
            check(int'(out_msg.data) == old_got, "old packets in order");
            old_got++;
          end else begin
            check(int'(out_msg.data) == new_got, "new packets in order");
            new_got++;
          end
        end
      end
      @(posedge clk);
      if (old_valid && old_ready) begin old_valid = 0; old_sent++; end
      if (new_valid && new_ready) begin new_valid = 0; new_sent++; end
    end
    check(old_got == old_sent && new_got == new_sent && new_got > 100,
          $sformatf("all taken: old %0d/%0d new %0d/%0d", old_got, old_sent, new_got, new_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
