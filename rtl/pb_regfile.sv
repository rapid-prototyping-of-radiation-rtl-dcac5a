// pb_regfile: the 16 x 8-bit general-purpose register file (s0..sF).
//
// Two asynchronous read ports (sX, sY) and one synchronous write port. The
// file is built from flip-flops so that every one of its 128 bits can be
// upset by fault injection. With TMR=1 (hardening version P4) there are three
// copies; reads return the bitwise majority of the copies, writes go to all
// three, and every copy reloads the voted contents on each clock so a single
// upset is repaired within one cycle. flip[c] XORs a 128-bit mask (bit
// 8*r+i is bit i of register r) into copy c for fault injection.
// Reset clears all registers (the original leaves them undefined; clearing
// them here is this design's choice).
module pb_regfile #(
  parameter bit          TMR   = 1'b0,
  parameter int unsigned NREGS = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            we,
  input  logic [$clog2(NREGS)-1:0]        waddr,
  input  logic [WIDTH-1:0]                wdata,
  input  logic [$clog2(NREGS)-1:0]        raddr_x,
  input  logic [$clog2(NREGS)-1:0]        raddr_y,
  output logic [WIDTH-1:0]                rdata_x,
  output logic [WIDTH-1:0]                rdata_y,
  input  logic [2:0][NREGS*WIDTH-1:0]     flip
);
  localparam int unsigned NCOPY = TMR ? 3 : 1;
  localparam int unsigned BITS  = NREGS * WIDTH;

  logic [BITS-1:0] copy_q [NCOPY];
  logic [BITS-1:0] voted;
  logic [BITS-1:0] next_val;

  if (TMR) begin : g_vote
    assign voted = (copy_q[0] & copy_q[1]) | (copy_q[0] & copy_q[2]) | (copy_q[1] & copy_q[2]);
  end else begin : g_single
    assign voted = copy_q[0];
  end

  always_comb begin
    next_val = voted;
    if (we) next_val[waddr*WIDTH +: WIDTH] = wdata;
  end

  for (genvar c = 0; c < NCOPY; c++) begin : g_copy
    always_ff @(posedge clk) begin
      if (rst) copy_q[c] <= '0;
      else     copy_q[c] <= next_val ^ flip[c];
    end
  end

  assign rdata_x = voted[raddr_x*WIDTH +: WIDTH];
  assign rdata_y = voted[raddr_y*WIDTH +: WIDTH];
endmodule
