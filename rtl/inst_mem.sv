// inst_mem: instruction memory standing in for the instruction cache.
//
// DEPTH words of 32 bits.  The fetch port reads combinationally (one
// instruction per cycle, never a miss).  A synchronous write port loads the
// program before the processor is released from reset.  The cache itself is
// only named by the architecture; treating it as an always-hitting memory is
// this design's simplification.
module inst_mem #(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
