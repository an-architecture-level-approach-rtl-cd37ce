// regfile: 32 x XLEN register file with two read ports and one write port.
//
// Register 0 always reads zero.  Writes happen on the rising clock edge; a
// read of the register being written in the same cycle returns the new value
// (write-through), so WB and ID can share a cycle as in the classic MIPS
// pipeline.  Two read ports and one write port match the CI operand count
// (two inputs, one result per instruction).  All registers reset to zero.
module regfile #(
  parameter int XLEN = ep_pkg::WORD_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [4:0]      ra1,
  input  logic [4:0]      ra2,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [4:0]      wa,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == 5'd0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
