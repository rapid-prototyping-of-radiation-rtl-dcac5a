// tb_pb_regfile: self-checking testbench for pb_regfile.
// Runs a plain (TMR=0) and a triplicated (TMR=1) register file with the same
// random writes against a reference array, reading both ports each cycle.
// Then injects single-copy upsets: the triplicated file must mask each and
// repair it, the plain file must show it.
module tb_pb_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] waddr = 0, rx = 0, ry = 0;
  logic [7:0] wdata = 0;
  logic [7:0] x0, y0, x3, y3;
  logic [2:0][127:0] fl0 = '0, fl3 = '0;
  logic [7:0] ref_rf [16];
  logic [7:0] ref3 [16];
  int checks = 0, failures = 0;

  pb_regfile #(.TMR(1'b0)) dut0 (.clk, .rst, .we, .waddr, .wdata, .raddr_x(rx), .raddr_y(ry), .rdata_x(x0), .rdata_y(y0), .flip(fl0));
  pb_regfile #(.TMR(1'b1)) dut3 (.clk, .rst, .we, .waddr, .wdata, .raddr_x(rx), .raddr_y(ry), .rdata_x(x3), .rdata_y(y3), .flip(fl3));

  always #5 clk = ~clk;

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (ref_rf[i]) ref_rf[i] = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 16; i++) begin
      rx = 4'(i); ry = 4'(15 - i); #1;
      check(x0, 8'h00, "reset x"); check(y3, 8'h00, "reset y tmr");
    end
    for (int i = 0; i < 500; i++) begin
      we = 1'($urandom); waddr = 4'($urandom); wdata = 8'($urandom);
      rx = 4'($urandom); ry = 4'($urandom);
      #1;
      check(x0, ref_rf[rx], "rx plain"); check(y0, ref_rf[ry], "ry plain");
      check(x3, ref_rf[rx], "rx tmr");   check(y3, ref_rf[ry], "ry tmr");
      @(posedge clk);
      if (we) ref_rf[waddr] = wdata;
      #1;
    end
    we = 0;
    foreach (ref3[i]) ref3[i] = ref_rf[i];
    for (int i = 0; i < 60; i++) begin
      int b, c;
      b = $urandom_range(0, 127); c = $urandom_range(0, 2);
      fl3[c][b] = 1'b1; fl0[0][b] = 1'b1;
      @(posedge clk); #1 fl3 = '0; fl0 = '0;
      ref_rf[b / 8] = ref_rf[b / 8] ^ (8'h01 << (b % 8));
      rx = 4'(b / 8); #1;
      check(x3, ref3[rx], "tmr masks upset");
      check(x0, ref_rf[rx], "plain shows upset");
      // a second upset in another copy of the same bit is also masked,
      // because the first copy was repaired at the previous edge
      fl3[(c + 1) % 3][b] = 1'b1; @(posedge clk); #1 fl3 = '0;
      check(x3, ref3[rx], "tmr masks second upset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
