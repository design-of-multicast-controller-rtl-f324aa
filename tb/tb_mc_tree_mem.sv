// tb_mc_tree_mem: test of the tree memory.
//
// Writes random entries at random SIDs and frees some, keeping a reference
// copy in the testbench. Checks that every read returns, one cycle after its
// address, the last word written there (invalid after reset or after a free),
// and that the free-SID output always names the lowest unused SID, including
// when every SID is taken.
module tb_mc_tree_mem;
  import mc_pkg::*;

  localparam int D = 32;   // small memory, so that it can be filled

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  sid_t   raddr, waddr, free_sid;
  entry_t rdata, wdata;
  logic   we, free_any;

  mc_tree_mem #(.DEPTH(D)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata, .free_any, .free_sid);

  int checks = 0, failures = 0;
  entry_t ref_mem [D];
  bit     ref_used [D];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic entry_t rnd_entry(bit v);
    entry_t e;
    e = entry_t'({$urandom, $urandom});
    e.vld = v;
    return e;
  endfunction

  task automatic check_free();
    int lo;
    lo = -1;
    for (int s = D - 1; s >= 0; s--) if (!ref_used[s]) lo = s;
    check(free_any == (lo >= 0), $sformatf("free_any=%0d, want %0d", free_any, lo >= 0));
    if (lo >= 0) check(int'(free_sid) == lo, $sformatf("free_sid=%0d, want %0d", free_sid, lo));
  endtask

  task automatic read_check(int s);
    entry_t want;
    @(negedge clk);
    we = 1'b0; raddr = sid_t'(s);
    @(negedge clk);
    want = ref_used[s] ? ref_mem[s] : '0;
    check(rdata.vld == ref_used[s], $sformatf("SID %0d valid %0d, want %0d", s, rdata.vld, ref_used[s]));
    if (ref_used[s]) check(rdata == want, $sformatf("SID %0d data", s));
  endtask

  task automatic write(int s, entry_t e);
    @(negedge clk);
    we = 1'b1; waddr = sid_t'(s); wdata = e;
    @(negedge clk);
    we = 1'b0;
    ref_mem[s] = e; ref_used[s] = e.vld;
  endtask

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int s = 0; s < D; s++) ref_used[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_free();
    for (int s = 0; s < D; s++) read_check(s);
    // fill in allocation order
    for (int s = 0; s < D; s++) begin
      check_free();
      write(int'(free_sid), rnd_entry(1));
    end
    check_free();
    for (int s = 0; s < D; s++) read_check(s);
    // random writes and frees
    for (int i = 0; i < 400; i++) begin
      int s;
      s = int'($urandom_range(D - 1));
      write(s, rnd_entry($urandom_range(2) != 0));
      check_free();
      read_check(int'($urandom_range(D - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
