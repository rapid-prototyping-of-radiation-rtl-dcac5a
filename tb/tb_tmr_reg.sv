// tb_tmr_reg: self-checking testbench for tmr_reg.
// Instantiates a triplicated and a single-copy register side by side and
// checks: reset value, loading, holding, that one flipped copy never shows
// on the voted output and is repaired on the next edge (so a later flip of
// a second copy is also masked), and that a flip of the single-copy
// register does show.
module tb_tmr_reg;
  localparam int W = 8;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] d = '0;
  logic [2:0][W-1:0] flip3 = '0, flip1 = '0;
  logic [W-1:0] q3, q1;
  int checks = 0, failures = 0;

  tmr_reg #(.WIDTH(W), .TMR(1'b1), .RESET_VALUE(8'hA5)) dut3 (.clk, .rst, .en, .d, .flip(flip3), .q(q3));
  tmr_reg #(.WIDTH(W), .TMR(1'b0), .RESET_VALUE(8'hA5)) dut1 (.clk, .rst, .en, .d, .flip(flip1), .q(q1));

  always #5 clk = ~clk;

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(q3, 8'hA5, "reset tmr"); check(q1, 8'hA5, "reset single");
    en = 1; d = 8'h3C; @(posedge clk); #1 en = 0;
    check(q3, 8'h3C, "load tmr"); check(q1, 8'h3C, "load single");
    repeat (3) @(posedge clk); #1;
    check(q3, 8'h3C, "hold tmr");
    for (int c = 0; c < 3; c++) begin
      for (int b = 0; b < W; b += 3) begin
        flip3 = '0; flip3[c][b] = 1'b1; @(posedge clk); #1 flip3 = '0;
        check(q3, 8'h3C, $sformatf("masked flip copy %0d bit %0d", c, b));
        // next copy flipped on the same bit one cycle later: still masked,
        // because the first copy has been refreshed by now
        flip3[(c+1)%3][b] = 1'b1; @(posedge clk); #1 flip3 = '0;
        check(q3, 8'h3C, $sformatf("second flip copy %0d bit %0d", (c+1)%3, b));
        @(posedge clk); #1;
        check(q3, 8'h3C, "after repair");
      end
    end
    // two copies of the same bit flipped at once defeat the voter
    flip3[0][1] = 1; flip3[2][1] = 1; @(posedge clk); #1 flip3 = '0;
    check(q3, 8'h3E, "double flip visible");
    // a flip coinciding with a load is applied on top of the new value
    flip1[0][7] = 1'b1; @(posedge clk); #1 flip1 = '0;
    check(q1, 8'hBC, "single copy flip visible");
    en = 1; d = 8'h00; @(posedge clk); #1 en = 0;
    check(q3, 8'h00, "reload clears"); check(q1, 8'h00, "reload single");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
