// tb_pb_alu: self-checking testbench for pb_alu. Drives random operands and
// every operation and compares result, carry and zero with a reference
// model written here from the PicoBlaze-3 instruction definitions.
module tb_pb_alu;
  import pb_pkg::*;
  alu_op_t op;
  logic [3:0] sc;
  logic [7:0] a, b, res;
  logic ci, co, zo;
  int checks = 0, failures = 0;

  pb_alu dut (.op, .shift_code(sc), .a, .b, .carry_in(ci), .result(res), .carry_out(co), .zero_out(zo));

  localparam logic [3:0] SCODES [10] = '{4'h0, 4'h2, 4'h4, 4'h6, 4'h7, 4'h8, 4'hA, 4'hC, 4'hE, 4'hF};

  task automatic model(output logic [7:0] r, output logic c);
    int s;
    c = 1'b0;
    case (op)
      ALU_LOAD:    begin r = b; c = ci; end
      ALU_AND:     r = a & b;
      ALU_OR:      r = a | b;
      ALU_XOR:     r = a ^ b;
      ALU_TEST:    begin r = a & b; c = ^r; end
      ALU_ADD:     begin s = int'(a) + int'(b); r = s[7:0]; c = s > 255; end
      ALU_ADDCY:   begin s = int'(a) + int'(b) + int'(ci); r = s[7:0]; c = s > 255; end
      ALU_SUB, ALU_COMPARE: begin s = int'(a) - int'(b); r = s[7:0]; c = s < 0; end
      ALU_SUBCY:   begin s = int'(a) - int'(b) - int'(ci); r = s[7:0]; c = s < 0; end
      default: begin
        case (sc)
          4'h0: begin r = (a << 1) | 8'(ci); c = a[7]; end
          4'h2: begin r = (a << 1) | 8'(a[7]); c = a[7]; end
          4'h4: begin r = (a << 1) | 8'(a[0]); c = a[7]; end
          4'h6: begin r = a << 1; c = a[7]; end
          4'h7: begin r = (a << 1) | 8'h01; c = a[7]; end
          4'h8: begin r = (a >> 1) | (8'(ci) << 7); c = a[0]; end
          4'hA: begin r = (a >> 1) | (a & 8'h80); c = a[0]; end
          4'hC: begin r = (a >> 1) | (8'(a[0]) << 7); c = a[0]; end
          4'hE: begin r = a >> 1; c = a[0]; end
          default: begin r = (a >> 1) | 8'h80; c = a[0]; end
        endcase
      end
    endcase
  endtask

  initial begin
    logic [7:0] er; logic ec;
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_t'(i % 11);
      sc = SCODES[$urandom_range(0, 9)];
      a  = 8'($urandom); b = 8'($urandom); ci = 1'($urandom);
      if (i % 50 == 0) b = a;          // exercise zero and equality
      #1;
      model(er, ec);
      checks++;
      if (res !== er || co !== ec || zo !== (er == 8'h00)) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s sc=%h a=%h b=%h ci=%b: got %h/%b/%b exp %h/%b/%b",
                   op.name(), sc, a, b, ci, res, co, zo, er, ec, er == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
