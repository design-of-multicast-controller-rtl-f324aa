// tb_mc_module: test of one multicast module (port 10).
//
// Drives the line input and the crossbar input and watches the request side
// toward the crossbar. Checks: a session created from the line gets SID 0;
// an add request produces the ATTACH for the new port, which reaches the
// queue head 2 edges after acceptance; while the queue holds a message a new
// line packet is refused but a crossbar packet is taken; once the queue
// drains the waiting line packet is circulated to the child learned from the
// crossbar; a tree memory entry is created for an ATTACH arriving from the
// crossbar. Expected messages are written out by hand from the algorithm.
module tb_mc_module;
  import mc_pkg::*;

  localparam port_t ME = 4'd10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  line_valid, line_ready, xin_valid, xin_ready, req_valid, xbar_ready;
  logic  created_valid, collide;
  msg_t  line_msg, xin_msg, xout_msg;
  port_t req_dest;
  sid_t  created_sid;
  evt_t  evt;

  mc_module #(.MY_ID(ME)) dut (
    .clk, .rst_n, .line_valid, .line_ready, .line_msg, .xin_valid, .xin_ready, .xin_msg,
    .req_valid, .req_dest, .xout_msg, .xbar_ready, .created_valid, .created_sid, .collide, .evt
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  int created_seen = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (created_valid) created_seen = int'(created_sid);
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic node_t nd(int port, int sid);
    return '{vld: 1'b1, port: port_t'(port), sid: sid_t'(sid)};
  endfunction

  function automatic msg_t mk(msg_kind_e kind, int dest, int sid, int level = 0, bit dir = 0,
                               node_t a = '0, int data = 0);
    msg_t m;
    m = '0;
    m.kind = kind; m.dest = port_t'(dest); m.sid = sid_t'(sid); m.level = lvl_t'(level);
    m.dir = dir; m.a = a; m.data = DATA_W'(data);
    return m;
  endfunction

  // returns the edge number at which the line message was accepted
  task automatic send_line(msg_t m, output int t);
    @(negedge clk);
    line_msg = m; line_valid = 1'b1;
    #1;
    while (!line_ready) @(negedge clk);
    t = cyc + 1;
    @(negedge clk);
    line_valid = 1'b0;
  endtask

  task automatic send_x(msg_t m, output int t);
    @(negedge clk);
    xin_msg = m; xin_valid = 1'b1;
    #1;
    while (!xin_ready) @(negedge clk);
    t = cyc + 1;
    @(negedge clk);
    xin_valid = 1'b0;
  endtask

  // waits for the queue head, checks it and when it appeared, and pops it
  task automatic expect_head(msg_t want, int t_from, int lat, string what);
    int n;
    n = 0;
    while (!req_valid && n < 50) begin @(negedge clk); n++; end
    check(req_valid && xout_msg == want && req_dest == want.dest,
          $sformatf("%s: head %p, want %p", what, xout_msg, want));
    if (lat >= 0) check(cyc - t_from == lat, $sformatf("%s: at +%0d, want +%0d", what, cyc - t_from, lat));
    xbar_ready = 1'b1;
    @(negedge clk);
    xbar_ready = 1'b0;
  endtask

  initial begin
    int t, t2;
    line_valid = 0; xin_valid = 0; line_msg = '0; xin_msg = '0; xbar_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    send_line(mk(MSG_CREATE, int'(ME), 0), t);
    repeat (4) @(negedge clk);
    check(created_seen == 0, "session created with SID 0");

    // add port 12 (1100): bit 0 is 1 -> right slot of the root
    send_line(mk(MSG_ADD, int'(ME), 0, 0, 0, nd(12, 0)), t);
    expect_head(mk(MSG_ATTACH, 12, 0, 1, 1, nd(10, 0)), t, 2, "attach for port 12");

    // queue not empty: a new packet from the line must wait
    send_line(mk(MSG_ADD, int'(ME), 0, 0, 0, nd(4, 0)), t);   // 0100: left slot
    repeat (2) @(negedge clk);
    check(req_valid, "attach for port 4 queued");
    line_msg = mk(MSG_DATA, int'(ME), 0, 0, 0, '0, 55); line_valid = 1'b1;
    repeat (5) begin
      @(negedge clk);
      check(!line_ready, "line held while the queue is not empty");
    end
    // a crossbar packet is still taken: port 12 reports its SID 4
    send_x(mk(MSG_SETCHILD, int'(ME), 0, 0, 1, nd(12, 4)), t2);
    check(line_valid && !line_ready, "line packet still waiting");
    expect_head(mk(MSG_ATTACH, 4, 0, 1, 0, nd(10, 0)), t, -1, "attach for port 4");
    // the queue drained: the data packet enters
    while (!line_ready) @(negedge clk);
    t = cyc + 1;
    @(negedge clk);
    line_valid = 1'b0;
    // left slot was reserved for port 4 with SID 0: two copies
    expect_head(mk(MSG_DATA, 4, 0, 0, 0, '0, 55), t, 2, "data copy to port 4");
    expect_head(mk(MSG_DATA, 12, 4, 0, 0, '0, 55), t, -1, "data copy to port 12");

    // ATTACH from the crossbar: join another tree below (0,3), level 1, right slot
    send_x(mk(MSG_ATTACH, int'(ME), 0, 1, 1, nd(0, 3)), t);
    expect_head(mk(MSG_SETCHILD, 0, 3, 0, 1, nd(10, 1)), t, 2, "setchild after attach");
    check(dut.u_mem.used[1] && dut.u_mem.mem[1].level == 1 && dut.u_mem.mem[1].parent == nd(0, 3),
          "entry at SID 1");
    repeat (3) @(negedge clk);
    check(!req_valid, "queue empty at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
