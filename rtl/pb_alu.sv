// pb_alu: byte-wide arithmetic/logic unit of the PicoBlaze-3 compatible core.
//
// Purely combinational. a is register sX, b is the second operand (register
// sY or the constant kk of the instruction), carry_in is the C flag. It
// returns the 8-bit result and the new carry and zero flags; the core decides
// from the opcode whether they are written (TEST and COMPARE write only the
// flags, LOAD writes no flag).
//
// Flag rules follow PicoBlaze-3: logical operations clear C; TEST sets C to
// the odd parity of (a AND b); ADD/ADDCY set C on carry out, SUB/SUBCY and
// COMPARE on borrow; COMPARE sets Z when a equals b; shifts move the bit
// shifted out into C. Z is always "result is zero" (for COMPARE, "a == b").
module pb_alu
  import pb_pkg::*;
(
  input  alu_op_t    op,
  input  logic [3:0] shift_code,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       carry_in,
  output logic [7:0] result,
  output logic       carry_out,
  output logic       zero_out
);
  logic [8:0] sum;

  always_comb begin
    sum       = '0;
    result    = a;
    carry_out = 1'b0;
    unique case (op)
      ALU_LOAD:    begin result = b; carry_out = carry_in; end
      ALU_AND:     result = a & b;
      ALU_OR:      result = a | b;
      ALU_XOR:     result = a ^ b;
      ALU_TEST:    begin result = a & b; carry_out = ^(a & b); end
      ALU_ADD:     begin sum = {1'b0, a} + {1'b0, b};             result = sum[7:0]; carry_out = sum[8]; end
      ALU_ADDCY:   begin sum = {1'b0, a} + {1'b0, b} + 9'(carry_in); result = sum[7:0]; carry_out = sum[8]; end
      ALU_SUB,
      ALU_COMPARE: begin sum = {1'b0, a} - {1'b0, b};             result = sum[7:0]; carry_out = sum[8]; end
      ALU_SUBCY:   begin sum = {1'b0, a} - {1'b0, b} - 9'(carry_in); result = sum[7:0]; carry_out = sum[8]; end
      ALU_SHIFT: begin
        if (shift_code[3]) begin             // right shifts and rotate
          carry_out = a[0];
          unique case (shift_code[2:0])
            3'b000:  result = {carry_in, a[7:1]};   // SRA
            3'b010:  result = {a[7],     a[7:1]};   // SRX
            3'b100:  result = {a[0],     a[7:1]};   // RR
            3'b110:  result = {1'b0,     a[7:1]};   // SR0
            3'b111:  result = {1'b1,     a[7:1]};   // SR1
            default: result = {1'b0,     a[7:1]};
          endcase
        end else begin                        // left shifts and rotate
          carry_out = a[7];
          unique case (shift_code[2:0])
            3'b000:  result = {a[6:0], carry_in};   // SLA
            3'b010:  result = {a[6:0], a[7]};       // RL
            3'b100:  result = {a[6:0], a[0]};       // SLX
            3'b110:  result = {a[6:0], 1'b0};       // SL0
            3'b111:  result = {a[6:0], 1'b1};       // SL1
            default: result = {a[6:0], 1'b0};
          endcase
        end
      end
      default: result = a;
    endcase
    zero_out = (result == 8'h00);
  end
endmodule
