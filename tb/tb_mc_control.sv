// tb_mc_control: directed test of one multicast control (port 13) with its
// tree memory.
//
// Each step feeds one message, collects the messages the control emits and
// compares them, field by field and in order, with messages written out by
// hand from the add/remove/circulation rules; it also checks the entry left in
// the tree memory. Timing: the k-th output message (k = 0, 1, ...) must be
// taken 2 + k clock edges after the input message was accepted, and the
// control must accept again right after its last output. One step holds the
// output back to check that nothing is lost under back-pressure.
module tb_mc_control;
  import mc_pkg::*;

  localparam port_t ME = 4'd13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid, in_ready, out_valid, out_ready;
  msg_t   in_msg, out_msg;
  sid_t   mem_raddr, mem_waddr, free_sid, created_sid;
  entry_t mem_rdata, mem_wdata;
  logic   mem_we, free_any, created_valid;
  evt_t   evt;

  mc_control #(.MY_ID(ME)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_msg, .out_valid, .out_ready, .out_msg,
    .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata,
    .mem_free_any(free_any), .mem_free_sid(free_sid),
    .created_valid, .created_sid, .evt
  );

  mc_tree_mem u_mem (
    .clk, .rst_n, .raddr(mem_raddr), .rdata(mem_rdata), .we(mem_we), .waddr(mem_waddr),
    .wdata(mem_wdata), .free_any, .free_sid
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic node_t nd(int port, int sid);
    return '{vld: 1'b1, port: port_t'(port), sid: sid_t'(sid)};
  endfunction

  function automatic msg_t mk(msg_kind_e kind, int dest, int sid, int level = 0, bit dir = 0,
                               node_t a = '0, node_t b = '0, int data = 0);
    msg_t m;
    m = '0;
    m.kind = kind; m.dest = port_t'(dest); m.sid = sid_t'(sid); m.level = lvl_t'(level);
    m.dir = dir; m.a = a; m.b = b; m.data = DATA_W'(data);
    return m;
  endfunction

  int created_seen;
  always @(posedge clk) if (created_valid) created_seen = int'(created_sid);

  // Feed `m`; expect exactly the messages in `exp`, in order and on time.
  // `hold` keeps out_ready low for that many cycles after acceptance.
  task automatic step(string name, msg_t m, msg_t exp[$], int hold = 0);
    int t0, k, late;
    @(negedge clk);
    in_msg = m; in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    t0 = cyc + 1;                       // edge at which it is accepted
    @(negedge clk);
    in_valid = 1'b0;
    out_ready = (hold == 0);
    k = 0;
    for (int w = 0; w < 12 + hold; w++) begin
      if (cyc + 1 - t0 >= hold) out_ready = 1'b1;
      if (out_valid && out_ready) begin
        if (k < exp.size()) begin
          check(out_msg == exp[k], $sformatf("%s: output %0d is %p, want %p", name, k, out_msg, exp[k]));
          late = (hold == 0) ? 2 + k : hold + k;
          check(cyc + 1 - t0 == late, $sformatf("%s: output %0d at +%0d, want +%0d", name, k,
                                                 cyc + 1 - t0, late));
        end else begin
          check(1'b0, $sformatf("%s: extra output %p", name, out_msg));
        end
        k++;
      end
      @(negedge clk);
    end
    check(k == exp.size(), $sformatf("%s: %0d outputs, want %0d", name, k, exp.size()));
    check(in_ready, $sformatf("%s: control idle again", name));
  endtask

  function automatic entry_t ent(int sid);
    entry_t e;
    e = u_mem.mem[sid];
    e.vld = e.vld && u_mem.used[sid];
    return e;
  endfunction

  initial begin
    entry_t e, w;
    msg_t q[$];
    in_valid = 1'b0; in_msg = '0; out_ready = 1'b1; created_seen = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // CREATE: root entry at SID 0
    q = {};
    step("create", mk(MSG_CREATE, int'(ME), 0), q);
    check(created_seen == 0, "create reports SID 0");
    e = ent(0);
    check(e.vld && e.level == 0 && !e.parent.vld && !e.child[0].vld && !e.child[1].vld, "root entry");

    // ATTACH below port 10 (its SID 5), slot 1, level 2 -> SID 1
    q = {mk(MSG_SETCHILD, 10, 5, 0, 1, nd(13, 1))};
    step("attach", mk(MSG_ATTACH, int'(ME), 0, 2, 1, nd(10, 5)), q);
    e = ent(1);
    check(e.vld && e.level == 2 && e.parent == nd(10, 5) && !e.child[0].vld && !e.child[1].vld,
          "attached entry");

    // ADD port 12 (1100) at level 2: bit 2 is 0 -> left slot empty -> reserve and attach
    q = {mk(MSG_ATTACH, 12, 0, 3, 0, nd(13, 1))};
    step("add place", mk(MSG_ADD, int'(ME), 1, 0, 0, nd(12, 0)), q);
    e = ent(1);
    check(e.child[0].vld && e.child[0].port == 12 && !e.child[1].vld, "left slot reserved for 12");

    // SETCHILD from port 12 with its SID 7
    q = {};
    step("setchild", mk(MSG_SETCHILD, int'(ME), 1, 0, 0, nd(12, 7)), q);
    check(ent(1).child[0] == nd(12, 7), "left child is (12,7)");

    // ADD port 12 again: slot taken -> forwarded to (12,7)
    q = {mk(MSG_ADD, 12, 7, 0, 0, nd(12, 0))};
    step("add forward", mk(MSG_ADD, int'(ME), 1, 0, 0, nd(12, 0)), q);

    // ADD of this port itself is ignored
    q = {};
    step("add self", mk(MSG_ADD, int'(ME), 1, 0, 0, nd(13, 0)), q);

    // DATA with one child, then with two children (right child (14,3))
    q = {mk(MSG_DATA, 12, 7, 0, 0, '0, '0, 77)};
    step("data one child", mk(MSG_DATA, int'(ME), 1, 0, 0, '0, '0, 77), q);
    q = {};
    step("setchild right", mk(MSG_SETCHILD, int'(ME), 1, 0, 1, nd(14, 3)), q);
    q = {mk(MSG_DATA, 12, 7, 0, 0, '0, '0, 78), mk(MSG_DATA, 14, 3, 0, 0, '0, '0, 78)};
    step("data fork", mk(MSG_DATA, int'(ME), 1, 0, 0, '0, '0, 78), q);
    q = {mk(MSG_DATA, 12, 7, 0, 0, '0, '0, 79), mk(MSG_DATA, 14, 3, 0, 0, '0, '0, 79)};
    step("data fork held", mk(MSG_DATA, int'(ME), 1, 0, 0, '0, '0, 79), q, 4);

    // REMOVE port 12: routed by bit 2 of 1100 -> left child
    q = {mk(MSG_REMOVE, 12, 7, 0, 0, nd(12, 0))};
    step("remove forward", mk(MSG_REMOVE, int'(ME), 1, 0, 0, nd(12, 0)), q);
    // REMOVE port 15 (1111): bit 2 is 1 -> right child (14,3)
    q = {mk(MSG_REMOVE, 14, 3, 0, 0, nd(15, 0))};
    step("remove forward right", mk(MSG_REMOVE, int'(ME), 1, 0, 0, nd(15, 0)), q);

    // REPLACE: move to level 1 under (0,0), adopt sibling (8,2).
    // Old level 2 slot: bit 1 of 1101 = 1; slot taken at parent: bit 0 = 1.
    q = {mk(MSG_SETCHILD, 0, 0, 0, 1, nd(13, 1)),
         mk(MSG_SETPARENT, 8, 2, 0, 0, nd(13, 1)),
         mk(MSG_REPLACE, 14, 3, 2, 0, nd(13, 1), nd(12, 7))};
    step("replace", mk(MSG_REPLACE, int'(ME), 1, 1, 0, nd(0, 0), nd(8, 2)), q);
    e = ent(1);
    check(e.vld && e.level == 1 && e.parent == nd(0, 0) && e.child[0] == nd(8, 2) && !e.child[1].vld,
          "entry after moving up");

    // REMOVE this port (level 1, child (8,2) only): REPLACE to (8,2), entry freed
    q = {mk(MSG_REPLACE, 8, 2, 1, 0, nd(0, 0), '0)};
    step("leave inner", mk(MSG_REMOVE, int'(ME), 1, 0, 0, nd(13, 0)), q);
    check(!ent(1).vld && free_any && free_sid == 1, "SID 1 freed");

    // requests on a free SID and a root leave are ignored
    q = {};
    step("remove unknown sid", mk(MSG_REMOVE, int'(ME), 1, 0, 0, nd(13, 0)), q);
    step("root does not leave", mk(MSG_REMOVE, int'(ME), 0, 0, 0, nd(13, 0)), q);
    step("data unknown sid", mk(MSG_DATA, int'(ME), 9, 0, 0, '0, '0, 5), q);

    // ATTACH again reuses SID 1; leaving as a leaf clears the slot at the parent
    q = {mk(MSG_SETCHILD, 10, 5, 0, 1, nd(13, 1))};
    step("attach again", mk(MSG_ATTACH, int'(ME), 0, 2, 1, nd(10, 5)), q);
    q = {mk(MSG_SETCHILD, 10, 5, 0, 1, '0)};
    step("leave leaf", mk(MSG_REMOVE, int'(ME), 1, 0, 0, nd(13, 0)), q);
    check(!ent(1).vld, "leaf entry freed");

    // SETPARENT rewrites the parent only
    q = {};
    step("setparent", mk(MSG_SETPARENT, int'(ME), 0, 0, 0, nd(3, 4)), q);
    w = ent(0);
    check(w.vld && w.parent == nd(3, 4) && w.level == 0, "parent rewritten");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
