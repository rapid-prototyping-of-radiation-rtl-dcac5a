// tb_pb_stack: self-checking testbench for pb_stack. Pushes and pops random
// addresses against a reference list (checking top_addr and sp each cycle),
// fills all 31 levels, checks wrap-around of the pointer after 31 pushes,
// and checks that an upset of one copy of the triplicated pointer is masked
// while the same upset of the plain pointer is visible.
module tb_pb_stack;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [9:0] push_addr = 0, top3, top0;
  logic [4:0] sp3, sp0;
  logic [2:0][4:0] fl3 = '0, fl0 = '0;
  logic [9:0] model [$];
  int checks = 0, failures = 0;

  pb_stack #(.TMR(1'b1)) dut3 (.clk, .rst, .push, .pop, .push_addr, .top_addr(top3), .sp(sp3), .sp_flip(fl3));
  pb_stack #(.TMR(1'b0)) dut0 (.clk, .rst, .push, .pop, .push_addr, .top_addr(top0), .sp(sp0), .sp_flip(fl0));
  always #5 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic do_push(logic [9:0] a);
    push = 1; push_addr = a; @(posedge clk); #1 push = 0;
    model.push_back(a);
  endtask

  task automatic do_pop();
    logic [9:0] e;
    e = model.pop_back();
    check(top3, e, "top tmr"); check(top0, e, "top plain");
    pop = 1; @(posedge clk); #1 pop = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    check(sp3, 0, "reset sp");
    for (int i = 0; i < 400; i++) begin
      if (model.size() == 0 || (model.size() < 31 && $urandom_range(0, 1))) do_push(10'($urandom));
      else do_pop();
      check(sp3, model.size() % 31, "sp tmr"); check(sp0, model.size() % 31, "sp plain");
    end
    while (model.size() > 0) do_pop();
    for (int i = 0; i < 31; i++) do_push(10'(i + 100));
    check(sp3, 0, "sp wraps to 0 when all 31 levels are used");
    check(top3, 130, "top after 31 pushes");
    // a 32nd push overwrites the bottom entry
    do_push(10'd999);
    check(sp3, 1, "sp after 32nd push");
    check(top3, 999, "top after 32nd push");
    pop = 1; @(posedge clk); #1 pop = 0;
    check(top3, 130, "pop wraps back to level 31");
    // upsets on the pointer
    rst = 1; @(posedge clk); #1 rst = 0; model.delete();
    do_push(10'd7); do_push(10'd8);
    fl3[1][0] = 1; fl0[0][0] = 1; @(posedge clk); #1 fl3 = '0; fl0 = '0;
    check(sp3, 2, "tmr sp upset masked");
    check(sp0, 3, "plain sp upset visible");
    check(top3, 8, "tmr top after upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
