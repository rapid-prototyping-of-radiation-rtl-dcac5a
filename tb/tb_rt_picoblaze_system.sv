// tb_rt_picoblaze_system: end-to-end test of the fault-emulation system at
// its default configuration (hardening version P1).
//
// A small assembler in this testbench builds the eight benchmark programs
// (bubble sort, division, Fibonacci, greatest common divisor, matrix
// addition, matrix multiplication, multiplication, exponentiation) plus a
// hand-hardened Fibonacci in which every value is kept in three registers
// and voted before each output and each conditional branch (software
// triple redundancy). For every program:
//   1. the program is loaded and a golden run records its outputs in the
//      Smart Table; the outputs are checked against values computed here;
//   2. a fault campaign runs the program again and again, each time with one
//      upset at a random cycle in a random bit of one register set, with
//      T_crit = 1023, and counts the verdicts.
// Checks: golden outputs; that upsets in the triplicated sets (PC, flags,
// SP in P1) always give "no damage"; that a clean test run gives "no
// damage" with zero recovery time; and that every mechanism happened at
// least once over the whole test: output damage, timeout, a late but
// correct output (recovery time above zero), TMR-masked upsets, an
// interrupt. The verdict percentages per program are printed.
module tb_rt_picoblaze_system;
  import pb_pkg::*;
  import ftu_pkg::*;
  import pb_bench_pkg::*;

  localparam int RUNS_PER_SET = 12;

  logic clk = 0, rst = 1;
  logic load_we = 0;
  logic [9:0] load_addr = 0;
  logic [17:0] load_data = 0;
  logic run = 0;
  logic [7:0] in_port = 0;
  logic interrupt = 0, interrupt_ack;
  logic [7:0] port_id, out_port;
  logic write_strobe, read_strobe;
  logic [15:0] out_reg;
  st_mode_t st_mode = ST_IDLE;
  logic st_finish = 0;
  logic [15:0] t_crit = 16'd1023;
  logic st_done;
  st_verdict_t st_verdict;
  logic [8:0] st_entries;
  logic [31:0] st_rec, st_cycle;
  logic inj_arm = 0;
  logic [31:0] inj_cycle = 0;
  seu_target_t inj_target = SEU_RF;
  logic [7:0] inj_bit = 0;
  logic [1:0] inj_copy = 0;
  logic inj_done;

  rt_picoblaze_system dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .run, .in_port, .interrupt, .interrupt_ack,
    .port_id, .out_port, .write_strobe, .read_strobe, .out_reg,
    .st_mode, .st_finish, .t_crit, .st_done, .st_verdict, .st_entries,
    .st_recovery_time(st_rec), .st_cycle, .inj_arm, .inj_cycle, .inj_target, .inj_bit,
    .inj_copy, .inj_done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_no_damage = 0, n_output_damage = 0, n_timeout = 0, n_late_ok = 0, n_masked = 0, n_acks = 0;

  always @(posedge clk) if (interrupt_ack) n_acks++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  pb_bench_pkg::pb_program p;
  int last_out;             // cycle of the last output in the golden run

  task automatic load_program();
    run = 0;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      #1 load_we = 1; load_addr = 10'(i); load_data = p.prog[i];
      @(posedge clk);
    end
    #1 load_we = 0;
  endtask

  // one run; returns cycles used. Golden runs end when the program reaches
  // its halt loop.
  task automatic do_run(st_mode_t m, bit arm, output int cycles);
    st_mode = m; inj_arm = arm;
    @(posedge clk); #1 run = 1;
    cycles = 0;
    while (1) begin
      @(posedge clk); #1 cycles++;
      if (write_strobe) last_out = cycles;
      if (m == ST_GOLDEN && dut.address == 10'(p.halt_addr()) && cycles > 4) begin
        repeat (4) @(posedge clk);
        #1 st_finish = 1; @(posedge clk); #1 st_finish = 0;
        break;
      end
      if (m == ST_TEST && st_done) break;
      if (cycles > 200000) begin check(0, "run did not end"); break; end
    end
    #1 run = 0; inj_arm = 0;
    @(posedge clk); #1;
  endtask

  // outputs observed during golden runs
  logic [15:0] seen [$];
  always @(posedge clk) if (run && write_strobe && st_mode == ST_GOLDEN) seen.push_back({port_id, out_port});

  initial begin
    #400ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string benches [13] = '{"bub", "div", "fib", "gcd", "madd", "mmult", "mult", "pow", "fib_h", "gcd_h", "div_h", "madd_h", "bub_h"};
    repeat (3) @(posedge clk); #1 rst = 0;

    // interrupt path through the top: a tiny program with interrupts enabled
    p = new();
    p.a_begin();
    p.e(i_inten(1'b1)); p.lbl("halt"); p.jmp(OP_JUMP, 0, "halt");
    p.pc = 10'h3FF; p.outp(0, 8'h0F);
    p.a_end();
    load_program();
    #1 run = 1; repeat (10) @(posedge clk); #1 interrupt = 1; repeat (6) @(posedge clk); #1 interrupt = 0; run = 0;
    check(n_acks == 1, "interrupt acknowledged through the top");

    foreach (benches[bi]) begin
      int gcycles, cyc, nd, od, to, late;
      nd = 0; od = 0; to = 0; late = 0;
      p.build(benches[bi]);
      load_program();
      seen.delete();
      do_run(ST_GOLDEN, 0, gcycles);
      check(seen.size() == p.expv.size(), $sformatf("%s: %0d outputs, %0d expected", benches[bi], seen.size(), p.expv.size()));
      foreach (p.expv[i]) if (i < seen.size()) check(seen[i] == p.expv[i],
        $sformatf("%s output %0d: %h expected %h", benches[bi], i, seen[i], p.expv[i]));
      check(st_entries > 0, "golden run recorded outputs");

      // clean test run
      do_run(ST_TEST, 0, cyc);
      check(st_verdict == V_NO_DAMAGE && st_rec == 0, $sformatf("%s: clean run verdict %s", benches[bi], st_verdict.name()));

      for (int t = 0; t < 5; t++) begin
        for (int r = 0; r < RUNS_PER_SET; r++) begin
          int w;
          inj_target = seu_target_t'(t);
          w = (t == 0) ? 128 : (t == 1) ? 10 : (t == 2) ? 2 : (t == 3) ? 5 : PIPE_W;
          inj_bit = 8'($urandom_range(0, w - 1));
          inj_copy = 2'($urandom_range(0, 2));
          inj_cycle = $urandom_range(1, last_out - 1);
          do_run(ST_TEST, 1, cyc);
          check(inj_done, "upset was injected");
          unique case (st_verdict)
            V_NO_DAMAGE:     begin nd++; if (st_rec > 0) late++; end
            V_OUTPUT_DAMAGE: od++;
            V_TIMEOUT:       to++;
            default:         check(0, "run ended without verdict");
          endcase
          if (t inside {1, 2, 3}) begin
            // P1 triplicates PC, flags and SP: every such upset is masked
            check(st_verdict == V_NO_DAMAGE, $sformatf("%s: masked set %0d gave %s", benches[bi], t, st_verdict.name()));
            n_masked++;
          end
        end
      end
      n_no_damage += nd; n_output_damage += od; n_timeout += to; n_late_ok += late;
      $display("%-6s %3d words, golden %5d cycles, %2d outputs | %3d runs: unACE %5.1f%%  output damage %5.1f%%  timeout %5.1f%%  (late but correct: %0d)",
               benches[bi], p.n_words, gcycles, p.expv.size(), nd + od + to,
               100.0 * nd / (nd + od + to), 100.0 * od / (nd + od + to), 100.0 * to / (nd + od + to), late);
    end

    $display("mechanisms: no damage %0d, output damage %0d, timeout %0d, late but correct %0d, TMR-masked %0d, interrupts %0d",
             n_no_damage, n_output_damage, n_timeout, n_late_ok, n_masked, n_acks);
    check(n_no_damage > 0, "no-damage verdict seen");
    check(n_output_damage > 0, "output-damage verdict seen");
    check(n_timeout > 0, "timeout verdict seen");
    check(n_late_ok > 0, "late but correct output seen");
    check(n_masked > 0, "TMR-masked upsets seen");
    check(n_acks > 0, "interrupt seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
