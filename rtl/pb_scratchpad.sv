// pb_scratchpad: the 64-byte scratchpad data RAM of the processor, used by
// STORE (synchronous write) and FETCH (asynchronous read, data valid in the
// same cycle as the address). It is never triplicated: the memory system is
// treated as outside the sphere of replication, assumed to be protected by
// its own mechanism. No reset: contents are undefined until written.
module pb_scratchpad #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
