// seu_injector: schedules one single event upset per run.
//
// start clears the run's cycle counter. When arm is high, the injector
// issues, in the cycle the counter equals inject_cycle, a one-cycle SEU
// request (seu is all-zero in every other cycle) that flips bit bit_idx of TMR copy `copy` of register set
// `target` in the processor; injected then stays high until the next start.
// One upset per execution at a chosen clock cycle is the experiment of the
// design description; choosing the cycle and bit (at random, for a
// campaign) is left to whoever drives the inputs. Flipping through a
// dedicated mask instead of the FPGA configuration memory is this design's
// choice.
module seu_injector
  import pb_pkg::*;
#(
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          arm,
  input  logic [CW-1:0] inject_cycle,
  input  seu_target_t   target,
  input  logic [7:0]    bit_idx,
  input  logic [1:0]    copy,
  output seu_t          seu,
  output logic          injected
);
  logic [CW-1:0] cnt;
  logic          fire;

  assign fire = arm && !injected && !start && (cnt == inject_cycle);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      injected <= 1'b0;
    end else if (start) begin
      cnt      <= '0;
      injected <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (fire) injected <= 1'b1;
    end
  end

  // The request is all-zero except in the cycle it fires.
  always_comb begin
    seu = '0;
    if (fire) begin
      seu.valid   = 1'b1;
      seu.target  = target;
      seu.bit_idx = bit_idx;
      seu.copy    = copy;
    end
  end
endmodule
