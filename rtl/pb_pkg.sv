// pb_pkg: types, constants and helpers shared by the radiation-tolerant
// PicoBlaze-3 compatible processor and its fault-emulation harness.
//
// It holds the 18-bit instruction encoding of PicoBlaze-3 (the public KCPSM3
// definition, which the processor is built to match cycle for cycle), the
// hardening versions P0..P4 (which register sets are triplicated), the
// register sets an SEU can be aimed at, the bitwise 2-of-3 majority function
// used by every voter, and small functions that assemble instruction words,
// used by testbenches to build programs.
package pb_pkg;

  localparam int unsigned PC_W   = 10;   // 1K program store
  localparam int unsigned IW     = 18;   // instruction width
  localparam int unsigned SP_W   = 5;    // stack pointer
  localparam int unsigned STACK_DEPTH = 31;
  localparam int unsigned NREGS  = 16;
  localparam int unsigned SPAD_DEPTH = 64;
  localparam int unsigned PIPE_W = 24;   // pipeline register set, see pb_core
  localparam logic [PC_W-1:0] INT_VECTOR = 10'h3FF;

  // Hardening versions. P1..P4 triplicate the register sets named.
  typedef enum logic [2:0] {
    P0 = 3'd0,   // no hardware redundancy
    P1 = 3'd1,   // PC, flags, SP
    P2 = 3'd2,   // pipeline registers
    P3 = 3'd3,   // PC, flags, SP, pipeline
    P4 = 3'd4    // register file, PC, flags, SP, pipeline
  } harden_t;

  function automatic bit tmr_pc   (harden_t h); return h == P1 || h == P3 || h == P4; endfunction
  function automatic bit tmr_pipe (harden_t h); return h == P2 || h == P3 || h == P4; endfunction
  function automatic bit tmr_rf   (harden_t h); return h == P4;                       endfunction

  // Register sets that fault campaigns attack.
  typedef enum logic [2:0] {
    SEU_RF    = 3'd0,   // 128 bits
    SEU_PC    = 3'd1,   // 10 bits
    SEU_FLAGS = 3'd2,   // 2 bits: bit 0 = Z, bit 1 = C
    SEU_SP    = 3'd3,   // 5 bits
    SEU_PIPE  = 3'd4    // PIPE_W bits
  } seu_target_t;

  typedef struct packed {
    logic        valid;
    seu_target_t target;
    logic [7:0]  bit_idx;
    logic [1:0]  copy;     // 0..2; only copy 0 exists in an unhardened set
  } seu_t;

  // Bitwise 2-of-3 majority.
  function automatic logic [127:0] vote3(input logic [127:0] a, input logic [127:0] b, input logic [127:0] c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // Primary opcodes, instruction bits 17:12.
  typedef enum logic [5:0] {
    OP_LOAD_K    = 6'h00, OP_LOAD_R    = 6'h01,
    OP_INPUT_P   = 6'h04, OP_INPUT_R   = 6'h05,
    OP_FETCH_K   = 6'h06, OP_FETCH_R   = 6'h07,
    OP_AND_K     = 6'h0A, OP_AND_R     = 6'h0B,
    OP_OR_K      = 6'h0C, OP_OR_R      = 6'h0D,
    OP_XOR_K     = 6'h0E, OP_XOR_R     = 6'h0F,
    OP_TEST_K    = 6'h12, OP_TEST_R    = 6'h13,
    OP_COMPARE_K = 6'h14, OP_COMPARE_R = 6'h15,
    OP_ADD_K     = 6'h18, OP_ADD_R     = 6'h19,
    OP_ADDCY_K   = 6'h1A, OP_ADDCY_R   = 6'h1B,
    OP_SUB_K     = 6'h1C, OP_SUB_R     = 6'h1D,
    OP_SUBCY_K   = 6'h1E, OP_SUBCY_R   = 6'h1F,
    OP_SHIFT     = 6'h20,
    OP_RETURN    = 6'h2A, OP_RETURN_C  = 6'h2B,
    OP_OUTPUT_P  = 6'h2C, OP_OUTPUT_R  = 6'h2D,
    OP_STORE_K   = 6'h2E, OP_STORE_R   = 6'h2F,
    OP_CALL      = 6'h30, OP_CALL_C    = 6'h31,
    OP_JUMP      = 6'h34, OP_JUMP_C    = 6'h35,
    OP_RETURNI   = 6'h38,
    OP_INTEN     = 6'h3C
  } opcode_t;

  // Shift/rotate selector, instruction bits 3:0 of OP_SHIFT.
  localparam logic [3:0] SH_SLA = 4'h0, SH_RL  = 4'h2, SH_SLX = 4'h4, SH_SL0 = 4'h6,
                         SH_SL1 = 4'h7, SH_SRA = 4'h8, SH_SRX = 4'hA, SH_RR  = 4'hC,
                         SH_SR0 = 4'hE, SH_SR1 = 4'hF;

  // Condition field, instruction bits 11:10 of conditional flow control.
  localparam logic [1:0] CC_Z = 2'b00, CC_NZ = 2'b01, CC_C = 2'b10, CC_NC = 2'b11;

  typedef enum logic [3:0] {
    ALU_LOAD, ALU_AND, ALU_OR, ALU_XOR, ALU_TEST, ALU_COMPARE,
    ALU_ADD, ALU_ADDCY, ALU_SUB, ALU_SUBCY, ALU_SHIFT
  } alu_op_t;

  // ---- instruction assembly helpers ---------------------------------
  function automatic logic [IW-1:0] i_k(opcode_t op, int unsigned x, int unsigned k);
    return {op, 4'(x), 8'(k)};
  endfunction
  function automatic logic [IW-1:0] i_r(opcode_t op, int unsigned x, int unsigned y);
    return {op, 4'(x), 4'(y), 4'h0};
  endfunction
  function automatic logic [IW-1:0] i_shift(int unsigned x, logic [3:0] code);
    return {OP_SHIFT, 4'(x), 4'h0, code};
  endfunction
  // Unconditional flow control: op is OP_JUMP / OP_CALL / OP_RETURN.
  function automatic logic [IW-1:0] i_flow(opcode_t op, int unsigned addr);
    return {op, 2'b00, 10'(addr)};
  endfunction
  // Conditional flow control: op is OP_JUMP_C / OP_CALL_C / OP_RETURN_C.
  function automatic logic [IW-1:0] i_flow_c(opcode_t op, logic [1:0] cc, int unsigned addr);
    return {op, cc, 10'(addr)};
  endfunction
  function automatic logic [IW-1:0] i_returni(bit enable);
    return {OP_RETURNI, 11'h0, enable};
  endfunction
  function automatic logic [IW-1:0] i_inten(bit enable);
    return {OP_INTEN, 11'h0, enable};
  endfunction

endpackage
