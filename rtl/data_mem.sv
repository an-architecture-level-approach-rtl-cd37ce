// data_mem: data memory standing in for the data cache.
//
// DEPTH words of 32 bits, word addressed.  Loads read combinationally in the
// MEM stage; stores are written on the rising clock edge.  A second,
// read-only debug port lets a test bench inspect results.  The cache itself
// is only named by the architecture; an always-hitting memory is this
// design's simplification.
module data_mem #(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [31:0]   dbg_rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata     = mem[addr];
  assign dbg_rdata = mem[dbg_addr];
endmodule
