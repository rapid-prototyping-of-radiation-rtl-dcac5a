// tb_pb_program_store: self-checking testbench for pb_program_store. Loads
// all 1024 words with a pattern through the load port, then reads random
// addresses and checks the word arrives exactly one clock after its address.
module tb_pb_program_store;
  logic clk = 0, load_we = 0;
  logic [9:0] addr = 0, load_addr = 0;
  logic [17:0] load_data = 0, instr;
  int checks = 0, failures = 0;

  pb_program_store dut (.clk, .addr, .instr, .load_we, .load_addr, .load_data);
  always #5 clk = ~clk;

  function automatic logic [17:0] pat(int a);
    return 18'((a * 263) ^ (a << 7) ^ 18'h2A5A5);
  endfunction

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      load_we = 1; load_addr = 10'(i); load_data = pat(i);
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [9:0] a;
      a = 10'($urandom);
      addr = a; @(posedge clk); #1;
      addr = 10'($urandom);   // next address must not disturb this cycle's word
      checks++;
      if (instr !== pat(a)) begin failures++; if (failures < 10) $display("FAIL addr %0d: %h vs %h", a, instr, pat(a)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
