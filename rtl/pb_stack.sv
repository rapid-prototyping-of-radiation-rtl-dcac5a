// pb_stack: the call/return stack of the processor.
//
// DEPTH (31) program addresses and a 5-bit stack pointer. push writes
// push_addr at the location sp points to and increments sp; pop decrements
// sp, and top_addr always shows the entry below sp, so a RETURN reads the
// address combinationally in the cycle it pops. The pointer wraps around
// DEPTH without overflow detection, as in PicoBlaze-3. The stack pointer is
// a tmr_reg, triplicated when TMR=1 (versions P1, P3, P4); the storage is
// not. sp_flip injects upsets into the pointer copies.
module pb_stack #(
  parameter bit          TMR   = 1'b0,
  parameter int unsigned AW    = 10,
  parameter int unsigned DEPTH = 31
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               push,
  input  logic                               pop,
  input  logic [AW-1:0]                      push_addr,
  output logic [AW-1:0]                      top_addr,
  output logic [$clog2(DEPTH+1)-1:0]         sp,
  input  logic [2:0][$clog2(DEPTH+1)-1:0]    sp_flip
);
  localparam int unsigned SPW = $clog2(DEPTH + 1);

  logic [AW-1:0]  mem [DEPTH];
  logic [SPW-1:0] sp_inc, sp_dec, sp_d;

  assign sp_inc = (sp >= SPW'(DEPTH - 1)) ? '0 : sp + 1'b1;
  assign sp_dec = (sp == '0 || sp >= SPW'(DEPTH)) ? SPW'(DEPTH - 1) : sp - 1'b1;
  assign sp_d   = push ? sp_inc : sp_dec;

  tmr_reg #(.WIDTH(SPW), .TMR(TMR)) u_sp (
    .clk, .rst, .en(push | pop), .d(sp_d), .flip(sp_flip), .q(sp)
  );

  always_ff @(posedge clk) begin
    if (push && sp < SPW'(DEPTH)) mem[sp] <= push_addr;
  end

  assign top_addr = mem[sp_dec];
endmodule
