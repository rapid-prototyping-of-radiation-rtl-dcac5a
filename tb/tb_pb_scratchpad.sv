// tb_pb_scratchpad: self-checking testbench for pb_scratchpad. Fills all 64
// bytes, then mixes random writes and reads against a reference array;
// reads are checked in the same cycle as the address (asynchronous read).
module tb_pb_scratchpad;
  logic clk = 0, we = 0;
  logic [5:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_m [64];
  int checks = 0, failures = 0;

  pb_scratchpad dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      we = 1; addr = 6'(i); wdata = 8'(i * 7 + 3); ref_m[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 64; i++) begin
      addr = 6'(i); #1; checks++;
      if (rdata !== ref_m[i]) begin failures++; $display("FAIL fill %0d: %h vs %h", i, rdata, ref_m[i]); end
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); addr = 6'($urandom); wdata = 8'($urandom); #1;
      checks++;
      if (rdata !== ref_m[addr]) begin failures++; if (failures < 10) $display("FAIL rnd addr %0d", addr); end
      @(posedge clk);
      if (we) ref_m[addr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
