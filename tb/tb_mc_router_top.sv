// tb_mc_router_top: end-to-end test of the multicast router at its default
// size (16 ports, 256 SIDs per port).
//
// A behavioural crossbar scheduler closes the loop. A reference model in the
// testbench keeps every session's tree by port ID, predicts the SIDs each
// port allocates (lowest free first) and applies the add and remove rules
// independently of the RTL. After every request the testbench waits until
// the router is quiet and compares all tree memories (used SIDs, levels,
// parents, children with their SIDs) with the model; after every data packet
// it checks that each member port, and no other, sent it out exactly once.
//
// Phase 1 rebuilds the worked example: session at port 0, ports 4, 10, 2, 8,
// 13, 12 join (12 lands at level 3 under 13), then port 10 leaves and 13
// takes its place with children 8 and 12. Then a chain 0-8-12-14-15 puts
// port 15 at the deepest level, log2 N. Phase 2 runs random requests on
// several sessions, then data packets entered at all roots at once so that
// line and crossbar packets meet at the multiplexers. Each mechanism of the
// design is counted and must occur at least once.
module tb_mc_router_top;
  import mc_pkg::*;

  localparam int N  = N_PORTS;
  localparam int NS = 4;            // sessions in phase 2 (do_data assumes 4)
  localparam int NONE = -1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [N-1:0] line_in_valid;
  logic  [N-1:0] line_in_ready;
  msg_t  [N-1:0] line_in_msg;
  logic  [N-1:0] line_out_valid;
  msg_t  [N-1:0] line_out_msg;
  logic  [N-1:0] req_valid;
  port_t [N-1:0] req_dest;
  logic  [N-1:0] sel_valid;
  port_t [N-1:0] sel_in;
  logic  [N-1:0] created_valid;
  sid_t  [N-1:0] created_sid;
  logic  [N-1:0] collide;
  evt_t  [N-1:0] evt;

  mc_router_top dut (
    .clk, .rst_n,
    .line_in_valid, .line_in_ready, .line_in_msg,
    .line_out_valid, .line_out_msg,
    .sched_req_valid(req_valid), .sched_req_dest(req_dest),
    .sched_sel_valid(sel_valid), .sched_sel_in(sel_in),
    .created_valid, .created_sid, .collide, .evt
  );

  xbar_sched_model #(.N(N)) u_sched (
    .clk, .rst_n, .req_valid, .req_dest, .sel_valid, .sel_in
  );

  // ---------------------------------------------------------------- peeks
  entry_t          peek_mem [N][N_SID];
  logic [N_SID-1:0] peek_used [N];
  for (genvar g = 0; g < N; g++) begin : g_peek
    always_comb begin
      peek_used[g] = dut.g_port[g].u_module.u_mem.used;
      for (int s = 0; s < N_SID; s++) peek_mem[g][s] = dut.g_port[g].u_module.u_mem.mem[s];
    end
  end

  // ---------------------------------------------------------------- model
  int  root [NS];
  bit  member [NS][N];
  int  msid   [NS][N];
  int  mlevel [NS][N];
  int  mpar   [NS][N];
  int  mch    [NS][N][2];
  bit  m_used [N][N_SID];

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_collide, n_fork, n_add_fwd, n_add_place, n_attach, n_rm_fwd, n_leave_leaf,
      n_leave_repl, n_replace, n_set_parent, n_drop, n_create, n_contend, n_deliver;

  function automatic int bitof(int id, int i);
    return (id >> (PORT_W - 1 - i)) & 1;
  endfunction

  function automatic int alloc(int p);
    for (int s = 0; s < N_SID; s++)
      if (!m_used[p][s]) begin
        m_used[p][s] = 1'b1;
        return s;
      end
    return NONE;
  endfunction

  function automatic void m_clear(int k);
    for (int p = 0; p < N; p++) begin
      member[k][p] = 0; msid[k][p] = NONE; mlevel[k][p] = 0; mpar[k][p] = NONE;
      mch[k][p][0] = NONE; mch[k][p][1] = NONE;
    end
  endfunction

  function automatic void m_create(int k, int r);
    m_clear(k);
    root[k] = r;
    member[k][r] = 1;
    msid[k][r] = alloc(r);
  endfunction

  function automatic void m_add(int k, int x);
    int cur, lvl, d;
    if (member[k][x]) return;
    cur = root[k]; lvl = 0;
    forever begin
      d = bitof(x, lvl);
      if (mch[k][cur][d] == NONE) begin
        mch[k][cur][d] = x;
        member[k][x] = 1;
        mlevel[k][x] = lvl + 1;
        mpar[k][x]   = cur;
        msid[k][x]   = alloc(x);
        return;
      end
      cur = mch[k][cur][d];
      lvl++;
    end
  endfunction

  function automatic void m_remove(int k, int x);
    int q, dl, cur, newpar, newlvl, slot, sib, c, d;
    int oldch [2];
    if (!member[k][x] || x == root[k]) return;
    q  = mpar[k][x];
    dl = bitof(x, mlevel[k][x] - 1);
    member[k][x] = 0;
    m_used[x][msid[k][x]] = 1'b0;
    if (mch[k][x][0] == NONE && mch[k][x][1] == NONE) begin
      mch[k][q][dl] = NONE;
    end else begin
      c = (mch[k][x][1] != NONE) ? 1 : 0;
      cur = mch[k][x][c]; sib = mch[k][x][1-c];
      newpar = q; newlvl = mlevel[k][x]; slot = dl;
      forever begin
        oldch[0] = mch[k][cur][0]; oldch[1] = mch[k][cur][1];
        d = bitof(cur, newlvl);
        mlevel[k][cur] = newlvl;
        mpar[k][cur]   = newpar;
        mch[k][newpar][slot] = cur;
        mch[k][cur][1-d] = sib;
        if (sib != NONE) mpar[k][sib] = cur;
        mch[k][cur][d] = NONE;
        if (oldch[0] == NONE && oldch[1] == NONE) break;
        c = (oldch[1] != NONE) ? 1 : 0;
        newpar = cur; slot = d; newlvl++;
        sib = oldch[1-c];
        cur = oldch[c];
      end
    end
    mch[k][x][0] = NONE; mch[k][x][1] = NONE; mpar[k][x] = NONE; msid[k][x] = NONE;
  endfunction

  // ---------------------------------------------------------------- checks
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic node_t exp_node(int k, int p);
    node_t n;
    n = '0;
    if (p != NONE) n = '{vld: 1'b1, port: port_t'(p), sid: sid_t'(msid[k][p])};
    return n;
  endfunction

  task automatic compare_all(string tag);
    entry_t e;
    bit ok;
    for (int p = 0; p < N; p++) begin
      ok = 1;
      for (int s = 0; s < N_SID; s++) if (peek_used[p][s] != m_used[p][s]) ok = 0;
      check(ok, $sformatf("%s: used SIDs of port %0d", tag, p));
    end
    for (int k = 0; k < NS; k++) begin
      if (root[k] == NONE) continue;
      for (int p = 0; p < N; p++) begin
        if (!member[k][p]) continue;
        e = peek_mem[p][msid[k][p]];
        ok = e.vld && int'(e.level) == mlevel[k][p]
             && e.parent == exp_node(k, mpar[k][p])
             && e.child[0] == exp_node(k, mch[k][p][0])
             && e.child[1] == exp_node(k, mch[k][p][1]);
        check(ok, $sformatf("%s: session %0d entry of port %0d (lvl %0d par %0d ch %0d/%0d)",
                            tag, k, p, e.level, e.parent.port, e.child[0].port, e.child[1].port));
      end
    end
  endtask

  // ---------------------------------------------------------------- driving
  logic [N-1:0] busy;   // a send task owns the line input

  task automatic send(int p, msg_t m);
    @(negedge clk);
    line_in_msg[p]   = m;
    line_in_valid[p] = 1'b1;
    #1;
    while (!line_in_ready[p]) @(negedge clk);
    @(negedge clk);
    line_in_valid[p] = 1'b0;
  endtask

  int quiet;
  always @(posedge clk) begin
    if (req_valid == '0 && line_in_valid == '0) quiet <= quiet + 1;
    else quiet <= 0;
  end

  task automatic wait_quiet();
    repeat (2) @(posedge clk);
    while (quiet < 8) @(posedge clk);
  endtask

  function automatic msg_t req(msg_kind_e kind, int sid, int port, int data);
    msg_t m;
    m = '0;
    m.kind = kind;
    m.sid  = sid_t'(sid);
    m.a    = '{vld: 1'b1, port: port_t'(port), sid: '0};
    m.data = DATA_W'(data);
    return m;
  endfunction

  // deliveries per port of the packet tags in flight
  int deliv [N][NS];
  int tag_of [NS];
  int created_last [N];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int p = 0; p < N; p++) begin
      if (line_out_valid[p]) begin
        bit known;
        known = 0;
        n_deliver++;
        for (int k = 0; k < NS; k++)
          if (int'(line_out_msg[p].data) == tag_of[k]) begin
            deliv[p][k]++;
            known = 1;
          end
        if (!known) begin
          failures++;
          $display("FAIL @%0d: unexpected packet %0d at port %0d", cycle, line_out_msg[p].data, p);
        end
      end
      if (created_valid[p]) created_last[p] = int'(created_sid[p]);
      if (collide[p]) n_collide++;
      if (evt[p].data_fork)  n_fork++;
      if (evt[p].add_fwd)    n_add_fwd++;
      if (evt[p].add_place)  n_add_place++;
      if (evt[p].attach)     n_attach++;
      if (evt[p].remove_fwd) n_rm_fwd++;
      if (evt[p].leave_leaf) n_leave_leaf++;
      if (evt[p].leave_repl) n_leave_repl++;
      if (evt[p].replace)    n_replace++;
      if (evt[p].set_parent) n_set_parent++;
      if (evt[p].drop)       n_drop++;
      if (evt[p].create)     n_create++;
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (req_valid[i] && req_valid[j] && req_dest[i] == req_dest[j]) n_contend++;
  end

  task automatic do_create(int k, int r);
    created_last[r] = NONE;
    m_create(k, r);
    send(r, req(MSG_CREATE, 0, 0, 0));
    wait_quiet();
    check(created_last[r] == msid[k][r], $sformatf("session %0d created at port %0d with SID %0d",
                                                  k, r, created_last[r]));
  endtask

  task automatic do_add(int k, int x);
    m_add(k, x);
    send(root[k], req(MSG_ADD, msid[k][root[k]], x, 0));
    wait_quiet();
  endtask

  task automatic do_remove(int k, int x);
    m_remove(k, x);
    send(root[k], req(MSG_REMOVE, msid[k][root[k]], x, 0));
    wait_quiet();
  endtask

  int next_tag = 100;

  // Sends reps data packets into every listed session's root, all roots at once.
  task automatic do_data(bit [NS-1:0] which, int reps = 1);
    for (int k = 0; k < NS; k++) begin
      tag_of[k] = -1;
      if (which[k]) begin
        tag_of[k] = next_tag;
        next_tag++;
      end
      for (int p = 0; p < N; p++) deliv[p][k] = 0;
    end
    fork
      if (which[0]) repeat (reps) send(root[0], req(MSG_DATA, msid[0][root[0]], 0, tag_of[0]));
      if (which[1]) repeat (reps) send(root[1], req(MSG_DATA, msid[1][root[1]], 0, tag_of[1]));
      if (which[2]) repeat (reps) send(root[2], req(MSG_DATA, msid[2][root[2]], 0, tag_of[2]));
      if (which[3]) repeat (reps) send(root[3], req(MSG_DATA, msid[3][root[3]], 0, tag_of[3]));
    join
    wait_quiet();
    for (int k = 0; k < NS; k++) begin
      if (!which[k]) continue;
      for (int p = 0; p < N; p++) begin
        int want;
        want = (member[k][p] && p != root[k]) ? reps : 0;
        check(deliv[p][k] == want, $sformatf("session %0d data at port %0d: %0d copies, want %0d",
                                             k, p, deliv[p][k], want));
      end
    end
  endtask

  // ---------------------------------------------------------------- watchdog
  localparam longint WATCHDOG = 2_000_000;
  initial begin
    while (cycle < WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (req_valid=%b line_in_valid=%b)", req_valid, line_in_valid);
    for (int p = 0; p < N; p++) $display("  port %0d wants port %0d", p, req_dest[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    entry_t e;
    line_in_valid = '0;
    line_in_msg   = '0;
    quiet = 0;
    for (int k = 0; k < NS; k++) begin root[k] = NONE; tag_of[k] = -1; m_clear(k); end
    for (int p = 0; p < N; p++) for (int s = 0; s < N_SID; s++) m_used[p][s] = 0;
    {n_collide, n_fork, n_add_fwd, n_add_place, n_attach, n_rm_fwd, n_leave_leaf,
     n_leave_repl, n_replace, n_set_parent, n_drop, n_create, n_contend, n_deliver} = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // Phase 1: the worked example.
    do_create(0, 0);
    do_add(0, 4);  do_add(0, 10); do_add(0, 2);
    do_add(0, 8);  do_add(0, 13); do_add(0, 12);
    compare_all("example, after joins");
    e = peek_mem[12][msid[0][12]];
    check(e.vld && e.level == 3 && e.parent.port == 13, "port 12 at level 3 below port 13");
    e = peek_mem[13][msid[0][13]];
    check(e.child[0].vld && e.child[0].port == 12 && !e.child[1].vld, "port 12 is the left child of 13");
    do_data(4'b0001);
    do_remove(0, 10);
    compare_all("example, after port 10 left");
    e = peek_mem[0][msid[0][0]];
    check(e.child[1].vld && e.child[1].port == 13, "port 13 replaces port 10 below the root");
    e = peek_mem[13][msid[0][13]];
    check(e.level == 1 && e.child[0].port == 8 && e.child[1].port == 12 &&
          e.child[0].vld && e.child[1].vld, "port 13 has children 8 and 12");
    e = peek_mem[12][msid[0][12]];
    check(e.level == 2 && e.parent.port == 13, "port 12 moved up to level 2");
    do_data(4'b0001);

    // Deepest position: 8, 12, 14, 15 join a session rooted at 0 one below the other.
    for (int x = 1; x < N; x++) do_remove(0, x);
    compare_all("example emptied");
    do_add(0, 8); do_add(0, 12); do_add(0, 14); do_add(0, 15);
    compare_all("chain");
    e = peek_mem[15][msid[0][15]];
    check(e.vld && int'(e.level) == PORT_W && e.parent.port == 14, "port 15 at level log2 N");
    do_data(4'b0001);

    // Phase 2: random requests on NS sessions.
    // distinct roots, so that all roots can be fed at once
    for (int k = 1; k < NS; k++) do_create(k, (k * 5 + int'($urandom_range(4))) % N);
    for (int it = 0; it < 400; it++) begin
      int k, x, op;
      k  = int'($urandom_range(NS - 1));
      x  = int'($urandom_range(N - 1));
      op = int'($urandom_range(9));
      if (op < 5)      do_add(k, x);
      else if (op < 9) do_remove(k, x);
      else             do_data(NS'(1) << k);
      compare_all($sformatf("random step %0d", it));
    end
    // Fill every session and send data at all roots together.
    for (int k = 0; k < NS; k++) for (int x = 0; x < N; x++) if ($urandom_range(3) != 0) do_add(k, x);
    compare_all("filled");
    repeat (4) do_data('1, 6);
    // Drain every session down to its root.
    for (int k = 0; k < NS; k++) for (int x = 0; x < N; x++) do_remove(k, x);
    compare_all("drained");
    do_data('1);

    check(n_collide    > 0, $sformatf("line/crossbar collisions at the multiplexer: %0d", n_collide));
    check(n_fork       > 0, $sformatf("data copied to two children: %0d", n_fork));
    check(n_add_fwd    > 0, $sformatf("add forwarded: %0d", n_add_fwd));
    check(n_add_place  > 0, $sformatf("add placed: %0d", n_add_place));
    check(n_attach     > 0, $sformatf("attach: %0d", n_attach));
    check(n_rm_fwd     > 0, $sformatf("remove forwarded: %0d", n_rm_fwd));
    check(n_leave_leaf > 0, $sformatf("leaf left: %0d", n_leave_leaf));
    check(n_leave_repl > 0, $sformatf("inner port left: %0d", n_leave_repl));
    check(n_replace    > 0, $sformatf("ports moved up: %0d", n_replace));
    check(n_set_parent > 0, $sformatf("parent pointers rewritten: %0d", n_set_parent));
    check(n_drop       > 0, $sformatf("ignored requests: %0d", n_drop));
    check(n_create     > 0, $sformatf("sessions created: %0d", n_create));
    check(n_contend    > 0, $sformatf("crossbar contention cycles: %0d", n_contend));
    $display("mechanisms: collide=%0d fork=%0d add_fwd=%0d add_place=%0d attach=%0d rm_fwd=%0d leaf=%0d repl=%0d moved=%0d setpar=%0d drop=%0d create=%0d contend=%0d delivered=%0d cycles=%0d",
             n_collide, n_fork, n_add_fwd, n_add_place, n_attach, n_rm_fwd, n_leave_leaf,
             n_leave_repl, n_replace, n_set_parent, n_drop, n_create, n_contend, n_deliver, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
