// tb_seu_injector: self-checking testbench for seu_injector. For random
// injection cycles and targets it checks that exactly one one-cycle request
// is issued, in the cycle the run counter equals inject_cycle (counted in
// clock edges after the start cycle), with the requested target, bit and
// copy, and that nothing is issued when the injector is not armed.
module tb_seu_injector;
  import pb_pkg::*;
  logic clk = 0, rst = 1, start = 0, arm = 0;
  logic [31:0] inject_cycle = 0;
  seu_target_t target = SEU_RF;
  logic [7:0] bit_idx = 0;
  logic [1:0] copy = 0;
  seu_t seu;
  logic injected;
  int checks = 0, failures = 0;

  seu_injector dut (.clk, .rst, .start, .arm, .inject_cycle, .target, .bit_idx, .copy, .seu, .injected);
  always #5 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 40; r++) begin
      int n, at;
      n = 0; at = -1;
      arm = (r % 5 != 4);
      inject_cycle = (r == 1) ? 0 : $urandom_range(0, 150);
      target = seu_target_t'($urandom_range(0, 4));
      bit_idx = 8'($urandom); copy = 2'($urandom_range(0, 2));
      start = 1; #1; check(seu.valid, 0, "no request in start cycle");
      @(posedge clk); #1 start = 0; #1;
      for (int c = 0; c < 200; c++) begin
        if (seu.valid) begin
          n++; at = c;
          check(seu.target, target, "target"); check(seu.bit_idx, bit_idx, "bit"); check(seu.copy, copy, "copy");
        end else if (c % 16 == 0) begin
          check(seu == '0, 1, "request all-zero when not firing");
        end
        @(posedge clk); #1;
      end
      check(n, arm ? 1 : 0, "number of requests");
      if (arm) check(at, inject_cycle, "request cycle");
      check(injected, arm, "injected flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
