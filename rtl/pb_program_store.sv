// pb_program_store: the 1K x 18-bit on-chip program store.
//
// The core reads it through a synchronous port: the instruction at addr
// appears on instr one clock later, as from a block RAM with registered
// output. A separate write port (load_we/load_addr/load_data) loads a program
// before or between runs. Like the scratchpad it is not triplicated.
module pb_program_store #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned IW    = 18
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [IW-1:0]            instr,
  input  logic                     load_we,
  input  logic [$clog2(DEPTH)-1:0] load_addr,
  input  logic [IW-1:0]            load_data
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    instr <= mem[addr];
  end
endmodule
