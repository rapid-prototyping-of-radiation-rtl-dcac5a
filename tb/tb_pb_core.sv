// tb_pb_core: self-checking testbench for pb_core in all five hardening
// versions (P0..P4), each with its own program store, running the same
// program side by side.
//
// The program is generated here: a block of random data instructions
// (every ALU operation, shifts, scratchpad, input and output), conditional
// jumps, calls and returns, a wait loop with interrupts enabled during which
// the testbench raises the interrupt, an interrupt routine that changes the
// flags and returns with RETURNI, and finally a loop that outputs all
// sixteen registers forever. A reference instruction-set model written in
// this testbench replays the program and predicts every OUTPUT (port, value)
// and the clock cycle it appears in (two cycles per instruction), given the
// instruction slots where each core acknowledged the interrupt.
//
// Phase 1: no upsets; all versions must match the model exactly.
// Phase 2: random single-bit upsets, every 37 cycles, into the register
// sets each version triplicates (P4: all sets); outputs must still match
// the model exactly. Phase 3: upsets into s0 of the unhardened P0 register
// file must change what the dump loop outputs.
module tb_pb_core;
  import pb_pkg::*;

  localparam int NV = 5;
  localparam int RUN_CYCLES = 4000;
  localparam int ISR = 10'h300, SUB0 = 10'h200, SUB1 = 10'h210, MAIN = 10'h010;

  logic clk = 0, rst = 1;
  logic load_we = 0;
  logic [9:0] load_addr = 0;
  logic [17:0] load_data = 0;
  logic interrupt = 0;
  seu_t seu [NV];
  int cyc = 0;
  int checks = 0, failures = 0;

  logic [17:0] prog [1024];
  int prog_len;

  // observed events per version
  int          ev_cyc  [NV][$];
  logic [15:0] ev_val  [NV][$];
  int          ack_cyc [NV][$];
  int          n_rd    [NV];

  always #5 clk = ~clk;

  for (genvar v = 0; v < NV; v++) begin : g_v
    logic [9:0]  address;
    logic [17:0] instruction;
    logic [7:0]  port_id, out_port, in_port;
    logic        write_strobe, read_strobe, interrupt_ack;

    pb_program_store u_ps (.clk, .addr(address), .instr(instruction), .load_we, .load_addr, .load_data);
    pb_core #(.HARDEN(harden_t'(v))) u_core (
      .clk, .rst, .address, .instruction, .port_id, .out_port, .write_strobe, .in_port,
      .read_strobe, .interrupt, .interrupt_ack, .seu(seu[v])
    );
    assign in_port = port_id ^ 8'hA5;

    always @(posedge clk) if (!rst) begin
      if (write_strobe) begin ev_cyc[v].push_back(cyc); ev_val[v].push_back({port_id, out_port}); end
      if (interrupt_ack) ack_cyc[v].push_back(cyc);
      if (read_strobe) n_rd[v]++;
    end
  end

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  // ---------------- program generation ----------------
  task automatic emit(inout int pc, input logic [17:0] w);
    prog[pc] = w; pc++;
  endtask

  task automatic gen_program();
    int pc;
    opcode_t kops [10] = '{OP_LOAD_K, OP_AND_K, OP_OR_K, OP_XOR_K, OP_TEST_K,
                           OP_COMPARE_K, OP_ADD_K, OP_ADDCY_K, OP_SUB_K, OP_SUBCY_K};
    logic [3:0] sh [10] = '{4'h0, 4'h2, 4'h4, 4'h6, 4'h7, 4'h8, 4'hA, 4'hC, 4'hE, 4'hF};
    foreach (prog[i]) prog[i] = i_k(OP_LOAD_K, 0, 0);   // unused words: LOAD s0,00
    pc = 0;
    emit(pc, i_flow(OP_JUMP, MAIN));
    pc = 10'h3FF; emit(pc, i_flow(OP_JUMP, ISR));
    // interrupt routine: changes flags and sE, outputs, returns enabled
    pc = ISR;
    emit(pc, i_k(OP_ADD_K, 14, 8'h01));
    emit(pc, i_k(OP_OUTPUT_P, 14, 8'hE0));
    emit(pc, i_k(OP_TEST_K, 14, 8'h00));           // leaves Z = 1, C = 0
    emit(pc, i_returni(1'b1));
    // subroutines
    pc = SUB0;
    emit(pc, i_k(OP_ADD_K, 13, 8'h29));
    emit(pc, i_flow_c(OP_RETURN_C, CC_C, 0));
    emit(pc, i_k(OP_OUTPUT_P, 13, 8'hD5));
    emit(pc, i_flow(OP_RETURN, 0));
    pc = SUB1;
    emit(pc, i_k(OP_XOR_K, 12, 8'h5C));
    emit(pc, i_flow(OP_CALL, SUB0));
    emit(pc, i_k(OP_OUTPUT_P, 12, 8'hC1));
    emit(pc, i_flow(OP_RETURN, 0));
    // main: random data instructions
    pc = MAIN;
    emit(pc, i_k(OP_LOAD_K, 0, 0));
    for (int a = 0; a < 64; a++) emit(pc, i_k(OP_STORE_K, 0, a));   // scratchpad has no reset
    for (int r = 0; r < 16; r++) emit(pc, i_k(OP_LOAD_K, r, $urandom));
    for (int i = 0; i < 300; i++) begin
      int kind = $urandom_range(0, 19);
      int x = $urandom_range(0, 13), y = $urandom_range(0, 15);
      unique case (kind)
        0, 1, 2:  emit(pc, i_k(kops[$urandom_range(0, 9)], x, $urandom));
        3, 4, 5:  emit(pc, i_r(opcode_t'(kops[$urandom_range(0, 9)] | 6'h01), x, y));
        6, 7:     emit(pc, i_shift(x, sh[$urandom_range(0, 9)]));
        8:        emit(pc, i_k(OP_STORE_K, x, $urandom_range(0, 63)));
        9:        emit(pc, i_r(OP_STORE_R, x, y));
        10:       emit(pc, i_k(OP_FETCH_K, x, $urandom_range(0, 63)));
        11:       emit(pc, i_r(OP_FETCH_R, x, y));
        12:       emit(pc, i_k(OP_INPUT_P, x, $urandom));
        13:       emit(pc, i_r(OP_INPUT_R, x, y));
        14, 15:   emit(pc, i_k(OP_OUTPUT_P, x, $urandom));
        16:       emit(pc, i_r(OP_OUTPUT_R, x, y));
        17:       begin emit(pc, i_flow_c(OP_JUMP_C, 2'($urandom), pc + 2)); emit(pc, i_k(OP_OUTPUT_P, x, 8'h77)); end
        18:       emit(pc, i_flow_c(OP_CALL_C, 2'($urandom), SUB0));
        default:  emit(pc, i_flow(OP_CALL, SUB1));
      endcase
    end
    // wait loop with interrupts enabled
    emit(pc, i_k(OP_LOAD_K, 13, 0));
    emit(pc, i_inten(1'b1));
    begin
      int loop = pc;
      emit(pc, i_k(OP_ADD_K, 13, 1));
      emit(pc, i_k(OP_OUTPUT_P, 13, 8'hD0));
      emit(pc, i_k(OP_COMPARE_K, 13, 8'h00));
      emit(pc, i_flow_c(OP_JUMP_C, CC_NZ, loop));
    end
    emit(pc, i_inten(1'b0));
    // dump loop
    begin
      int dump = pc;
      for (int r = 0; r < 16; r++) emit(pc, i_k(OP_OUTPUT_P, r, 8'hF0 + r));
      emit(pc, i_flow(OP_JUMP, dump));
    end
    prog_len = pc;
  endtask

  // ---------------- reference model ----------------
  // Replays the program for `slots` instruction slots; an interrupt replaces
  // the instruction of every slot listed in int_slots.
  task automatic iss(input int slots, input int int_slots [$], output int ecyc [$], output logic [15:0] eval [$]);
    logic [9:0] pc = 0;
    logic [7:0] r [16];
    logic [7:0] m [64];
    logic z = 0, c = 0, ie = 0, sz = 0, sc = 0;
    logic [9:0] stk [$];
    ecyc.delete(); eval.delete();
    foreach (r[i]) r[i] = 0;
    foreach (m[i]) m[i] = 0;
    for (int s = 0; s < slots; s++) begin
      logic [17:0] w;
      logic [5:0] op;
      logic [7:0] x, b, res;
      logic [3:0] xa;
      logic cond;
      int t;
      if (s inside {int_slots}) begin
        stk.push_back(pc); sz = z; sc = c; ie = 0; pc = 10'h3FF;
        continue;
      end
      w = prog[pc]; op = w[17:12]; xa = w[11:8]; x = r[xa];
      b = op[0] ? r[w[7:4]] : w[7:0];
      case (w[11:10]) 2'b00: cond = z; 2'b01: cond = !z; 2'b10: cond = c; default: cond = !c; endcase
      pc = pc + 1;
      case (op)
        6'h00, 6'h01: r[xa] = b;
        6'h0A, 6'h0B: begin r[xa] = x & b; c = 0; z = r[xa] == 0; end
        6'h0C, 6'h0D: begin r[xa] = x | b; c = 0; z = r[xa] == 0; end
        6'h0E, 6'h0F: begin r[xa] = x ^ b; c = 0; z = r[xa] == 0; end
        6'h12, 6'h13: begin res = x & b; c = ^res; z = res == 0; end
        6'h14, 6'h15: begin c = b > x; z = b == x; end
        6'h18, 6'h19: begin t = x + b;         r[xa] = t[7:0]; c = t > 255; z = r[xa] == 0; end
        6'h1A, 6'h1B: begin t = x + b + c;     r[xa] = t[7:0]; c = t > 255; z = r[xa] == 0; end
        6'h1C, 6'h1D: begin t = x - b;         r[xa] = t[7:0]; c = t < 0;   z = r[xa] == 0; end
        6'h1E, 6'h1F: begin t = x - b - c;     r[xa] = t[7:0]; c = t < 0;   z = r[xa] == 0; end
        6'h20: begin
          logic cin; cin = c;
          case (w[3:0])
            4'h0: begin c = x[7]; res = {x[6:0], cin}; end
            4'h2: begin c = x[7]; res = {x[6:0], x[7]}; end
            4'h4: begin c = x[7]; res = {x[6:0], x[0]}; end
            4'h6: begin c = x[7]; res = {x[6:0], 1'b0}; end
            4'h7: begin c = x[7]; res = {x[6:0], 1'b1}; end
            4'h8: begin c = x[0]; res = {cin, x[7:1]}; end
            4'hA: begin c = x[0]; res = {x[7], x[7:1]}; end
            4'hC: begin c = x[0]; res = {x[0], x[7:1]}; end
            4'hE: begin c = x[0]; res = {1'b0, x[7:1]}; end
            default: begin c = x[0]; res = {1'b1, x[7:1]}; end
          endcase
          r[xa] = res; z = res == 0;
        end
        6'h04, 6'h05: r[xa] = b ^ 8'hA5;
        6'h06, 6'h07: r[xa] = m[b[5:0]];
        6'h2E, 6'h2F: m[b[5:0]] = x;
        6'h2C, 6'h2D: begin ecyc.push_back(2 * s + 2); eval.push_back({b, x}); end
        6'h34: pc = w[9:0];
        6'h35: if (cond) pc = w[9:0];
        6'h30: begin stk.push_back(pc); pc = w[9:0]; end
        6'h31: if (cond) begin stk.push_back(pc); pc = w[9:0]; end
        6'h2A: pc = stk.pop_back();
        6'h2B: if (cond) pc = stk.pop_back();
        6'h38: begin pc = stk.pop_back(); z = sz; c = sc; ie = w[0]; end
        6'h3C: ie = w[0];
        default: ;
      endcase
    end
  endtask

  task automatic compare(int v, string phase);
    int slots [$];
    int ecyc [$];
    logic [15:0] eval [$];
    int n;
    foreach (ack_cyc[v][i]) slots.push_back((ack_cyc[v][i] - 2) / 2);
    iss((RUN_CYCLES - 4) / 2, slots, ecyc, eval);
    n = ecyc.size() < ev_cyc[v].size() ? ecyc.size() : ev_cyc[v].size();
    checks++;
    if (n < 200 || ev_cyc[v].size() < ecyc.size() - 1) begin
      failures++; $display("FAIL %s P%0d: %0d outputs seen, %0d expected", phase, v, ev_cyc[v].size(), ecyc.size());
    end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (ev_val[v][i] !== eval[i] || ev_cyc[v][i] != ecyc[i]) begin
        failures++;
        if (failures < 12) $display("FAIL %s P%0d output %0d: got %h @%0d exp %h @%0d",
                                    phase, v, i, ev_val[v][i], ev_cyc[v][i], eval[i], ecyc[i]);
        break;
      end
    end
  endtask

  task automatic reset_all();
    rst = 1; interrupt = 0;
    repeat (3) @(posedge clk);
    cyc = 0;
    for (int v = 0; v < NV; v++) begin
      ev_cyc[v].delete(); ev_val[v].delete(); ack_cyc[v].delete(); n_rd[v] = 0;
    end
    #1 rst = 0;
  endtask

  // raise the interrupt twelve times during the wait loop, each time until
  // every version has acknowledged it
  task automatic drive_interrupts();
    int base;
    base = 0;
    for (int k = 0; k < 12; k++) begin
      int n0 [NV];
      for (int v = 0; v < NV; v++) n0[v] = ack_cyc[v].size();
      while (cyc < 1500 + 41 * k) @(posedge clk);
      #1 interrupt = 1;
      base = cyc;
      for (int w = 0; w < 8; w++) @(posedge clk);
      #1 interrupt = 0;
      for (int v = 0; v < NV; v++) begin
        checks++;
        if (ack_cyc[v].size() != n0[v] + 1 || ack_cyc[v][n0[v]] > base + 4) begin
          failures++; $display("FAIL P%0d interrupt %0d: acks %0d", v, k, ack_cyc[v].size() - n0[v]);
        end
      end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < NV; v++) seu[v] = '0;
    gen_program();
    for (int i = 0; i < 1024; i++) begin
      @(posedge clk); #1 load_we = 1; load_addr = 10'(i); load_data = prog[i];
    end
    @(posedge clk); #1 load_we = 0;

    // phase 1: clean runs
    reset_all();
    fork
      drive_interrupts();
      while (cyc < RUN_CYCLES) @(posedge clk);
    join
    for (int v = 0; v < NV; v++) begin
      compare(v, "clean");
      checks++;
      if (n_rd[v] == 0) begin failures++; $display("FAIL P%0d: no INPUT executed", v); end
    end

    // phase 2: upsets into the triplicated sets of each hardened version
    reset_all();
    fork
      drive_interrupts();
      while (cyc < RUN_CYCLES) begin
        @(posedge clk); #1;
        for (int v = 1; v < NV; v++) seu[v] = '0;
        if (cyc % 37 == 5) begin
          for (int v = 1; v < NV; v++) begin
            seu_target_t t;
            int w;
            unique case (v)
              1: t = seu_target_t'($urandom_range(1, 3));        // PC, flags, SP
              2: t = SEU_PIPE;
              3: t = seu_target_t'($urandom_range(1, 4));        // PC, flags, SP, pipe
              default: t = seu_target_t'($urandom_range(0, 4));  // everything
            endcase
            w = (t == SEU_RF) ? 128 : (t == SEU_PC) ? 10 : (t == SEU_FLAGS) ? 2 : (t == SEU_SP) ? 5 : PIPE_W;
            seu[v] = '{valid: 1'b1, target: t, bit_idx: 8'($urandom_range(0, w - 1)), copy: 2'($urandom_range(0, 2))};
          end
        end
      end
    join
    for (int v = 1; v < NV; v++) seu[v] = '0;
    for (int v = 1; v < NV; v++) compare(v, "upsets");

    // phase 3: the same kind of upset is visible without hardening
    reset_all();
    begin
      int t0, diff0 = 0, diff4 = 0;
      logic [7:0] before0, before4;
      bit seen;
      seen = 0;
      while (!seen) begin
        @(posedge clk);
        foreach (ev_val[0][i]) if (ev_val[0][i][15:8] == 8'hF0) seen = 1;
      end
      repeat (50) @(posedge clk);
      t0 = cyc;
      foreach (ev_val[0][i]) if (ev_val[0][i][15:8] == 8'hF0) before0 = ev_val[0][i][7:0];
      #1 seu[0] = '{valid: 1'b1, target: SEU_RF, bit_idx: 8'd3, copy: 2'd0};
      seu[4] = '{valid: 1'b1, target: SEU_RF, bit_idx: 8'd3, copy: 2'd1};
      @(posedge clk); #1 seu[0] = '0; seu[4] = '0;
      repeat (200) @(posedge clk);
      foreach (ev_val[0][i]) if (ev_cyc[0][i] > t0 && ev_val[0][i][15:8] == 8'hF0) begin
        checks++;
        if (ev_val[0][i][7:0] != (before0 ^ 8'h08)) begin failures++; $display("FAIL P0 s0 upset not visible"); end
        diff0++;
      end
      foreach (ev_val[4][i]) if (ev_val[4][i][15:8] == 8'hF0) begin
        if (ev_cyc[4][i] <= t0) before4 = ev_val[4][i][7:0];
        else begin
          checks++;
          if (ev_val[4][i][7:0] != before4) begin failures++; $display("FAIL P4 s0 upset visible"); end
          diff4++;
        end
      end
      checks++;
      if (diff0 == 0 || diff4 == 0) begin failures++; $display("FAIL phase 3 saw no dump outputs"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
