// tb_smart_table: self-checking testbench for smart_table.
// A golden run records three output changes. Test runs then replay them
// on time, late within T_crit, too late, with a wrong value, early, and
// late by exactly the T_crit of 1023 cycles and by one cycle more, and check
// the verdict, the recovery time and the cycle at which a timeout is
// declared (expectedCycle + T_crit + 1).
module tb_smart_table;
  import ftu_pkg::*;
  logic clk = 0, rst = 1, start = 0, finish = 0;
  st_mode_t mode = ST_IDLE;
  logic [15:0] t_crit = 0, dut_out = 0;
  logic done, stop;
  st_verdict_t verdict;
  logic [8:0] entries;
  logic [31:0] rec, cycle;
  int checks = 0, failures = 0;
  int k;   // edges since the start edge

  smart_table dut (.clk, .rst, .mode, .start, .finish, .t_crit, .dut_out, .done, .verdict,
                   .entries, .recovery_time(rec), .cycle, .stop);
  always #5 clk = ~clk;

  localparam int GC [3] = '{10, 25, 40};
  localparam logic [15:0] GV [3] = '{16'h1111, 16'h2222, 16'h3333};

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // Drive a run: output i becomes val[i] after edge cyc[i]; stop after
  // `len` edges or when done. Returns the edge count at which done rose.
  task automatic run(st_mode_t m, int cyc [3], logic [15:0] val [3], int len, output int done_at);
    mode = m; dut_out = 16'h0;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    k = 0; done_at = -1;
    while (k < len) begin
      for (int i = 0; i < 3; i++) if (cyc[i] == k) dut_out = val[i];
      @(posedge clk); #1 k++;
      if (done && done_at < 0) done_at = k;
      if (done) break;
    end
    if (m == ST_GOLDEN) begin finish = 1; @(posedge clk); #1 finish = 0; end
  endtask

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d;
    repeat (2) @(posedge clk); #1 rst = 0;
    run(ST_GOLDEN, GC, GV, 60, d);
    check(entries, 3, "entries after golden run");
    check(done, 0, "golden run is not classified");

    t_crit = 10;
    run(ST_TEST, GC, GV, 200, d);
    check(verdict, V_NO_DAMAGE, "on time: verdict"); check(rec, 0, "on time: recovery");
    check(stop, 1, "stop after verdict");
    start = 1; #1 check(stop, 0, "stop released in the start cycle"); start = 0;

    run(ST_TEST, '{15, 30, 45}, GV, 200, d);
    check(verdict, V_NO_DAMAGE, "late 5: verdict"); check(rec, 5, "late 5: recovery");

    run(ST_TEST, '{10, 30, 50}, GV, 200, d);
    check(verdict, V_NO_DAMAGE, "late 10 = T_crit: verdict"); check(rec, 10, "late 10: recovery");

    run(ST_TEST, '{10, 36, 60}, GV, 200, d);
    check(verdict, V_TIMEOUT, "late 11: verdict");
    // expected cycle 25, T_crit 10: cycle 36 is the first at which it is missing
    // the counter has advanced once past the last cycle judged
    check(cycle - 1, 25 + 10 + 1, "timeout declared at expectedCycle+T_crit+1");
    check(d, 25 + 10 + 2, "done visible the edge after");

    run(ST_TEST, GC, '{16'h1111, 16'h2223, 16'h3333}, 200, d);
    check(verdict, V_OUTPUT_DAMAGE, "wrong value: verdict");
    check(d, 26, "wrong value classified at once");

    run(ST_TEST, '{3, 20, 39}, GV, 200, d);
    check(verdict, V_NO_DAMAGE, "early: verdict"); check(rec, 0, "early: recovery");

    t_crit = 1023;
    run(ST_TEST, '{10, 25, 40 + 1023}, GV, 2000, d);
    check(verdict, V_NO_DAMAGE, "late by 1023: verdict"); check(rec, 1023, "late by 1023: recovery");
    run(ST_TEST, '{10, 25, 40 + 1024}, GV, 2000, d);
    check(verdict, V_TIMEOUT, "late by 1024: verdict");

    // idle mode records and judges nothing
    run(ST_IDLE, GC, GV, 60, d);
    check(done, 0, "idle: no verdict"); check(entries, 3, "idle: table kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
