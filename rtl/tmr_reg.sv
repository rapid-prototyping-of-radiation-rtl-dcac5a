// tmr_reg: a register that is either stored once or triplicated with a
// majority voter, selected by the TMR parameter.
//
// With TMR=1 three copies hold the value and q is their bitwise 2-of-3
// majority. Every copy loads d when en is high and otherwise reloads the
// voted value, so an upset in one copy is outvoted at once and repaired at
// the next clock edge. With TMR=0 there is one copy and q is that copy.
// flip[c] XORs a mask into copy c for one cycle: it stands for a radiation
// induced bit-flip (single event upset) and is used only by fault
// injection; tie it to zero otherwise. Synchronous, active-high reset.
//
// Triplicating register subsets follows the hardened processor versions;
// the voter structure and the per-cycle refresh are this design's choice.
module tmr_reg #(
  parameter int unsigned        WIDTH       = 8,
  parameter bit                 TMR         = 1'b1,
  parameter logic [WIDTH-1:0]   RESET_VALUE = '0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [WIDTH-1:0]      d,
  input  logic [2:0][WIDTH-1:0] flip,
  output logic [WIDTH-1:0]      q
);
  localparam int unsigned NCOPY = TMR ? 3 : 1;

  logic [WIDTH-1:0] copy_q [NCOPY];

  if (TMR) begin : g_tmr
    assign q = (copy_q[0] & copy_q[1]) | (copy_q[0] & copy_q[2]) | (copy_q[1] & copy_q[2]);
  end else begin : g_single
    assign q = copy_q[0];
  end

  for (genvar c = 0; c < NCOPY; c++) begin : g_copy
    always_ff @(posedge clk) begin
      if (rst)      copy_q[c] <= RESET_VALUE;
      else if (en)  copy_q[c] <= d ^ flip[c];
      else          copy_q[c] <= q ^ flip[c];
    end
  end
endmodule
