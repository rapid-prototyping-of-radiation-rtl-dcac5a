// pb_core: technology-independent 8-bit processor compatible with
// PicoBlaze-3, with selectable hardware hardening.
//
// Architecture: 16 byte-wide registers, Z and C flags, a 10-bit program
// counter addressing a 1K x 18-bit program store, a 31-level call stack
// with a 5-bit stack pointer, a 64-byte scratchpad RAM, 256 input and 256
// output ports and one interrupt input that vectors to address 0x3FF. The
// instruction set and its encoding are those of PicoBlaze-3.
//
// Timing: every instruction takes two clock cycles. In the fetch cycle
// (t_state = 0) the instruction word from the program store is captured in
// the instruction register. In the execute cycle (t_state = 1) the
// instruction is carried out: the register file, flags, scratchpad and
// stack are written at the end of the cycle, and port_id/out_port with
// write_strobe (OUTPUT) or port_id with read_strobe (INPUT, in_port sampled
// at the end of the cycle) are valid during it. The program store is read
// synchronously, so address shows the next PC during the execute cycle and
// the current PC during the fetch cycle. After reset one idle execute cycle
// precedes the first fetch of address 0. An interrupt seen while interrupts
// are enabled replaces the execution of the instruction in the execute
// cycle: its address is pushed, Z and C are saved, interrupts are disabled,
// interrupt_ack is high for that cycle and execution goes to 0x3FF;
// RETURNI restores Z and C and returns to the interrupted instruction.
//
// Hardening: the HARDEN parameter selects which register sets are
// triplicated (tmr_reg / majority voting): P0 none, P1 PC + flags + SP,
// P2 pipeline registers, P3 PC + flags + SP + pipeline, P4 all of these and
// the register file. The pipeline set is the instruction register, the
// t_state bit, the start-up bit, the interrupt enable, the saved Z/C and the
// sampled interrupt request (24 bits). The program store, scratchpad and
// stack storage are never triplicated. The seu input flips one bit of one
// copy of one register set for one clock edge, for fault-injection
// experiments; tie it to '0 in normal use.
//
// The hardening versions and the register sets are those of the design
// description; instruction timing within the two cycles, the contents of
// the pipeline set, the interrupt details and the reset of the register
// file are this implementation's choices.
module pb_core
  import pb_pkg::*;
#(
  parameter harden_t HARDEN = P1
) (
  input  logic            clk,
  input  logic            rst,
  output logic [PC_W-1:0] address,
  input  logic [IW-1:0]   instruction,
  output logic [7:0]      port_id,
  output logic [7:0]      out_port,
  output logic            write_strobe,
  input  logic [7:0]      in_port,
  output logic            read_strobe,
  input  logic            interrupt,
  output logic            interrupt_ack,
  input  seu_t            seu
);
  localparam bit T_PC   = tmr_pc(HARDEN);
  localparam bit T_PIPE = tmr_pipe(HARDEN);
  localparam bit T_RF   = tmr_rf(HARDEN);

  typedef struct packed {
    logic [IW-1:0] ir;        // instruction register
    logic          t_state;   // 0 = fetch, 1 = execute
    logic          run;       // cleared by reset until the first fetch
    logic          int_en;    // interrupt enable
    logic          saved_z;   // Z preserved on interrupt
    logic          saved_c;   // C preserved on interrupt
    logic          int_req;   // interrupt input, registered
  } pipe_t;

  // ---------------- SEU injection masks ----------------
  function automatic logic [2:0][127:0] seu_mask(seu_t s, seu_target_t t, bit tmr);
    logic [2:0][127:0] m;
    m = '0;
    if (s.valid && s.target == t) begin
      if (!tmr)              m[0][s.bit_idx[6:0]] = 1'b1;
      else if (s.copy != 2'd3) m[s.copy][s.bit_idx[6:0]] = 1'b1;
    end
    return m;
  endfunction

  logic [2:0][127:0] m_rf, m_pc, m_fl, m_sp, m_pipe;
  logic [2:0][NREGS*8-1:0] rf_flip;
  logic [2:0][PC_W-1:0]    pc_flip;
  logic [2:0][1:0]         fl_flip;
  logic [2:0][SP_W-1:0]    sp_flip;
  logic [2:0][PIPE_W-1:0]  pipe_flip;

  always_comb begin
    m_rf   = seu_mask(seu, SEU_RF,    T_RF);
    m_pc   = seu_mask(seu, SEU_PC,    T_PC);
    m_fl   = seu_mask(seu, SEU_FLAGS, T_PC);
    m_sp   = seu_mask(seu, SEU_SP,    T_PC);
    m_pipe = seu_mask(seu, SEU_PIPE,  T_PIPE);
    for (int c = 0; c < 3; c++) begin
      rf_flip[c]   = m_rf[c][NREGS*8-1:0];
      pc_flip[c]   = m_pc[c][PC_W-1:0];
      fl_flip[c]   = m_fl[c][1:0];
      sp_flip[c]   = m_sp[c][SP_W-1:0];
      pipe_flip[c] = m_pipe[c][PIPE_W-1:0];
    end
  end

  // ---------------- state ----------------
  pipe_t           pipe_q, pipe_d;
  logic [PC_W-1:0] pc_q, pc_d;
  logic            pc_en;
  logic [1:0]      flags_q, flags_d;   // {C, Z}
  logic            flags_en;
  logic            z_q, c_q;

  tmr_reg #(.WIDTH(PIPE_W), .TMR(T_PIPE), .RESET_VALUE(PIPE_W'({{IW{1'b0}}, 1'b1, 5'b0})))
    u_pipe (.clk, .rst, .en(1'b1), .d(pipe_d), .flip(pipe_flip), .q(pipe_q));
  tmr_reg #(.WIDTH(PC_W), .TMR(T_PC))
    u_pc (.clk, .rst, .en(pc_en), .d(pc_d), .flip(pc_flip), .q(pc_q));
  tmr_reg #(.WIDTH(2), .TMR(T_PC))
    u_flags (.clk, .rst, .en(flags_en), .d(flags_d), .flip(fl_flip), .q(flags_q));

  assign z_q = flags_q[0];
  assign c_q = flags_q[1];

  // ---------------- decode ----------------
  opcode_t      opc;
  logic [3:0]   sx_addr, sy_addr;
  logic [7:0]   kk, sx, sy, operand;
  logic [1:0]   cc;
  logic         cond_true;
  logic         exec, take_int;

  assign opc       = opcode_t'(pipe_q.ir[17:12]);
  assign sx_addr   = pipe_q.ir[11:8];
  assign sy_addr   = pipe_q.ir[7:4];
  assign kk        = pipe_q.ir[7:0];
  assign cc        = pipe_q.ir[11:10];
  assign operand   = pipe_q.ir[12] ? sy : kk;
  assign exec      = pipe_q.t_state && pipe_q.run;
  assign take_int  = exec && pipe_q.int_en && pipe_q.int_req;

  always_comb begin
    unique case (cc)
      CC_Z:    cond_true = z_q;
      CC_NZ:   cond_true = !z_q;
      CC_C:    cond_true = c_q;
      default: cond_true = !c_q;
    endcase
  end

  // ---------------- datapath blocks ----------------
  alu_op_t    alu_op;
  logic [7:0] alu_res;
  logic       alu_c, alu_z;

  pb_alu u_alu (
    .op(alu_op), .shift_code(pipe_q.ir[3:0]), .a(sx), .b(operand), .carry_in(c_q),
    .result(alu_res), .carry_out(alu_c), .zero_out(alu_z)
  );

  logic       rf_we;
  logic [7:0] rf_wdata;

  pb_regfile #(.TMR(T_RF), .NREGS(NREGS), .WIDTH(8)) u_rf (
    .clk, .rst, .we(rf_we), .waddr(sx_addr), .wdata(rf_wdata),
    .raddr_x(sx_addr), .raddr_y(sy_addr), .rdata_x(sx), .rdata_y(sy), .flip(rf_flip)
  );

  logic       spad_we;
  logic [7:0] spad_rdata;

  pb_scratchpad #(.DEPTH(SPAD_DEPTH), .WIDTH(8)) u_spad (
    .clk, .we(spad_we), .addr(operand[5:0]), .wdata(sx), .rdata(spad_rdata)
  );

  logic            push, pop;
  logic [PC_W-1:0] push_addr, top_addr;
  logic [SP_W-1:0] sp;

  pb_stack #(.TMR(T_PC), .AW(PC_W), .DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst, .push, .pop, .push_addr, .top_addr, .sp, .sp_flip
  );

  // ---------------- control ----------------
  always_comb begin
    pipe_d        = pipe_q;
    pipe_d.int_req = interrupt;
    pc_d          = pc_q + 1'b1;
    pc_en         = 1'b0;
    flags_d       = {alu_c, alu_z};
    flags_en      = 1'b0;
    alu_op        = ALU_LOAD;
    rf_we         = 1'b0;
    rf_wdata      = alu_res;
    spad_we       = 1'b0;
    push          = 1'b0;
    pop           = 1'b0;
    push_addr     = pc_q + 1'b1;
    port_id       = operand;
    out_port      = sx;
    write_strobe  = 1'b0;
    read_strobe   = 1'b0;
    interrupt_ack = 1'b0;

    if (!pipe_q.t_state) begin
      // fetch: capture the instruction read from the program store
      pipe_d.ir      = instruction;
      pipe_d.t_state = 1'b1;
    end else begin
      pipe_d.t_state = 1'b0;
      pipe_d.run     = 1'b1;
      if (take_int) begin
        pc_en          = 1'b1;
        pc_d           = INT_VECTOR;
        push           = 1'b1;
        push_addr      = pc_q;
        pipe_d.saved_z = z_q;
        pipe_d.saved_c = c_q;
        pipe_d.int_en  = 1'b0;
        interrupt_ack  = 1'b1;
      end else if (exec) begin
        pc_en = 1'b1;
        unique case (opc)
          OP_LOAD_K, OP_LOAD_R:       begin alu_op = ALU_LOAD;  rf_we = 1'b1; end
          OP_AND_K, OP_AND_R:         begin alu_op = ALU_AND;   rf_we = 1'b1; flags_en = 1'b1; end
          OP_OR_K, OP_OR_R:           begin alu_op = ALU_OR;    rf_we = 1'b1; flags_en = 1'b1; end
          OP_XOR_K, OP_XOR_R:         begin alu_op = ALU_XOR;   rf_we = 1'b1; flags_en = 1'b1; end
          OP_TEST_K, OP_TEST_R:       begin alu_op = ALU_TEST;               flags_en = 1'b1; end
          OP_COMPARE_K, OP_COMPARE_R: begin alu_op = ALU_COMPARE;            flags_en = 1'b1; end
          OP_ADD_K, OP_ADD_R:         begin alu_op = ALU_ADD;   rf_we = 1'b1; flags_en = 1'b1; end
          OP_ADDCY_K, OP_ADDCY_R:     begin alu_op = ALU_ADDCY; rf_we = 1'b1; flags_en = 1'b1; end
          OP_SUB_K, OP_SUB_R:         begin alu_op = ALU_SUB;   rf_we = 1'b1; flags_en = 1'b1; end
          OP_SUBCY_K, OP_SUBCY_R:     begin alu_op = ALU_SUBCY; rf_we = 1'b1; flags_en = 1'b1; end
          OP_SHIFT:                   begin alu_op = ALU_SHIFT; rf_we = 1'b1; flags_en = 1'b1; end
          OP_INPUT_P, OP_INPUT_R:     begin rf_we = 1'b1; rf_wdata = in_port; read_strobe = 1'b1; end
          OP_OUTPUT_P, OP_OUTPUT_R:   write_strobe = 1'b1;
          OP_FETCH_K, OP_FETCH_R:     begin rf_we = 1'b1; rf_wdata = spad_rdata; end
          OP_STORE_K, OP_STORE_R:     spad_we = 1'b1;
          OP_JUMP:                    pc_d = pipe_q.ir[PC_W-1:0];
          OP_JUMP_C:                  if (cond_true) pc_d = pipe_q.ir[PC_W-1:0];
          OP_CALL:                    begin push = 1'b1; pc_d = pipe_q.ir[PC_W-1:0]; end
          OP_CALL_C:                  if (cond_true) begin push = 1'b1; pc_d = pipe_q.ir[PC_W-1:0]; end
          OP_RETURN:                  begin pop = 1'b1; pc_d = top_addr; end
          OP_RETURN_C:                if (cond_true) begin pop = 1'b1; pc_d = top_addr; end
          OP_RETURNI: begin
            pop           = 1'b1;
            pc_d          = top_addr;
            flags_en      = 1'b1;
            flags_d       = {pipe_q.saved_c, pipe_q.saved_z};
            pipe_d.int_en = pipe_q.ir[0];
          end
          OP_INTEN:                   pipe_d.int_en = pipe_q.ir[0];
          default: ;                  // undefined opcodes execute as no-operation
        endcase
      end
    end
  end

  assign address = pipe_q.t_state ? (pc_en ? pc_d : pc_q) : pc_q;

  // A push and a pop never happen in the same cycle.
  a_push_pop: assert property (@(posedge clk) disable iff (rst) !(push && pop));
endmodule
