// tb_campaign_versions: fault campaigns on the five hardening versions.
//
// Five copies of rt_picoblaze_system, built as P0, P1, P2, P3 and P4, get
// identical stimulus: the same program, the same golden run and the same
// sequence of test runs, each with one upset in the same register set, bit
// and cycle. The upset bit is drawn uniformly over all 169 attacked bits
// (register file 128, PC 10, flags 2, SP 5, pipeline 24), so each set is hit
// in proportion to its size; the TMR copy hit is also random. T_crit is
// 1023 cycles. Every benchmark kernel runs unhardened, and five of them
// also in software-hardened form (fib_h, gcd_h, div_h, madd_h, bub_h).
//
// Checks: golden outputs of every version match the values computed in the
// testbench; every version classifies each clean run as no damage; an upset
// in a set a version triplicates is always classified as no damage; the
// fully hardened P4 is never damaged; and the unhardened P0 is damaged at
// least once. It prints the unACE / output damage / timeout percentages per
// version, separately for the unhardened and the hardened kernels.
module tb_campaign_versions;
  import pb_pkg::*;
  import ftu_pkg::*;
  import pb_bench_pkg::*;

  localparam int NV = 5;
  localparam int RUNS = 40;          // test runs per program
  localparam int ATTACKED_BITS = 128 + PC_W + 2 + SP_W + PIPE_W;

  logic clk = 0, rst = 1;
  logic load_we = 0;
  logic [9:0] load_addr = 0;
  logic [17:0] load_data = 0;
  logic run = 0;
  st_mode_t st_mode = ST_IDLE;
  logic st_finish = 0;
  logic [15:0] t_crit = 16'd1023;
  logic inj_arm = 0;
  logic [31:0] inj_cycle = 0;
  seu_target_t inj_target = SEU_RF;
  logic [7:0] inj_bit = 0;
  logic [1:0] inj_copy = 0;

  logic [9:0]  address [NV];
  logic        wstb [NV], done [NV], injd [NV];
  logic [7:0]  pid [NV], pout [NV];
  st_verdict_t verdict [NV];

  always #5 clk = ~clk;

  for (genvar v = 0; v < NV; v++) begin : g_v
    logic [15:0] out_reg;
    logic [8:0]  entries;
    logic [31:0] rec, cyc;
    logic        iack, rstb;
    rt_picoblaze_system #(.HARDEN(harden_t'(v))) u_sys (
      .clk, .rst, .load_we, .load_addr, .load_data, .run, .in_port(8'h00), .interrupt(1'b0),
      .interrupt_ack(iack), .port_id(pid[v]), .out_port(pout[v]), .write_strobe(wstb[v]),
      .read_strobe(rstb), .out_reg, .st_mode, .st_finish, .t_crit, .st_done(done[v]),
      .st_verdict(verdict[v]), .st_entries(entries), .st_recovery_time(rec), .st_cycle(cyc),
      .inj_arm, .inj_cycle, .inj_target, .inj_bit, .inj_copy, .inj_done(injd[v])
    );
    assign address[v] = u_sys.address;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  pb_bench_pkg::pb_program p;
  logic [15:0] seen [NV][$];
  int last_out;
  // verdict counts [version][hardened program][verdict]
  int cnt [NV][2][4];

  always @(posedge clk)
    if (run && st_mode == ST_GOLDEN)
      for (int v = 0; v < NV; v++) if (wstb[v]) seen[v].push_back({pid[v], pout[v]});

  task automatic load_program();
    run = 0;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      #1 load_we = 1; load_addr = 10'(i); load_data = p.prog[i];
      @(posedge clk);
    end
    #1 load_we = 0;
  endtask

  task automatic do_run(st_mode_t m, bit arm, output int cycles);
    st_mode = m; inj_arm = arm;
    @(posedge clk); #1 run = 1;
    cycles = 0;
    while (1) begin
      bit all_done;
      @(posedge clk); #1 cycles++;
      if (m == ST_GOLDEN && wstb[0]) last_out = cycles;
      if (m == ST_GOLDEN && address[0] == 10'(p.halt_addr()) && cycles > 4) begin
        repeat (4) @(posedge clk);
        #1 st_finish = 1; @(posedge clk); #1 st_finish = 0;
        break;
      end
      all_done = 1;
      for (int v = 0; v < NV; v++) all_done &= done[v];
      if (m == ST_TEST && all_done) break;
      if (cycles > 200000) begin check(0, "run did not end"); break; end
    end
    #1 run = 0; inj_arm = 0;
    @(posedge clk); #1;
  endtask

  function automatic bit triplicated(int v, seu_target_t t);
    case (t)
      SEU_RF:                    return tmr_rf(harden_t'(v));
      SEU_PC, SEU_FLAGS, SEU_SP: return tmr_pc(harden_t'(v));
      default:                   return tmr_pipe(harden_t'(v));
    endcase
  endfunction

  initial begin
    #2s; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string benches [13] = '{"bub", "div", "fib", "gcd", "madd", "mmult", "mult", "pow", "fib_h", "gcd_h", "div_h", "madd_h", "bub_h"};
    foreach (cnt[v, h, k]) cnt[v][h][k] = 0;
    p = new();
    repeat (3) @(posedge clk); #1 rst = 0;
    foreach (benches[bi]) begin
      int gcycles, cyc, h;
      h = (benches[bi] inside {"fib_h", "gcd_h", "div_h", "madd_h", "bub_h"});
      p.build(benches[bi]);
      load_program();
      for (int v = 0; v < NV; v++) seen[v].delete();
      do_run(ST_GOLDEN, 0, gcycles);
      for (int v = 0; v < NV; v++) begin
        bit same;
        same = (seen[v].size() == p.expv.size());
        foreach (p.expv[i]) if (same && seen[v][i] != p.expv[i]) same = 0;
        check(same, $sformatf("%s: golden outputs of P%0d", benches[bi], v));
      end
      do_run(ST_TEST, 0, cyc);
      for (int v = 0; v < NV; v++) check(verdict[v] == V_NO_DAMAGE, $sformatf("%s: clean run P%0d", benches[bi], v));
      for (int r = 0; r < RUNS; r++) begin
        int b;
        b = $urandom_range(0, ATTACKED_BITS - 1);
        if (b < 128)                  begin inj_target = SEU_RF;    inj_bit = 8'(b); end
        else if (b < 128 + PC_W)      begin inj_target = SEU_PC;    inj_bit = 8'(b - 128); end
        else if (b < 128 + PC_W + 2)  begin inj_target = SEU_FLAGS; inj_bit = 8'(b - 128 - PC_W); end
        else if (b < 128 + PC_W + 2 + SP_W) begin inj_target = SEU_SP; inj_bit = 8'(b - 128 - PC_W - 2); end
        else                          begin inj_target = SEU_PIPE;  inj_bit = 8'(b - 128 - PC_W - 2 - SP_W); end
        inj_copy = 2'($urandom_range(0, 2));
        inj_cycle = $urandom_range(1, last_out - 1);
        do_run(ST_TEST, 1, cyc);
        for (int v = 0; v < NV; v++) begin
          check(injd[v] && verdict[v] != V_NONE, $sformatf("%s P%0d: run not classified", benches[bi], v));
          cnt[v][h][verdict[v]]++;
          if (triplicated(v, inj_target))
            check(verdict[v] == V_NO_DAMAGE, $sformatf("%s P%0d: upset in triplicated %s gave %s",
                                                       benches[bi], v, inj_target.name(), verdict[v].name()));
        end
      end
    end
    for (int h = 0; h < 2; h++)
      for (int v = 0; v < NV; v++) begin
        int n;
        n = cnt[v][h][1] + cnt[v][h][2] + cnt[v][h][3];
        $display("P%0d %s programs: %4d runs  unACE %5.1f%%  output damage (SDC) %5.1f%%  timeout (hang) %5.1f%%",
                 v, h ? "hardened  " : "unhardened", n, 100.0 * cnt[v][h][1] / n,
                 100.0 * cnt[v][h][2] / n, 100.0 * cnt[v][h][3] / n);
      end
    check(cnt[4][0][2] + cnt[4][0][3] + cnt[4][1][2] + cnt[4][1][3] == 0, "P4 never damaged");
    check(cnt[0][0][2] + cnt[0][0][3] > 0, "P0 damaged at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
