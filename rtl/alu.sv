// alu: integer ALU of the base processor.
//
// Purely combinational: y = a <op> b for the MIPS-like operation set of
// ep_pkg::alu_op_t.  Shifts take their amount from `shamt`; LUI places b[15:0]
// in the upper half.  zero flags y == 0 for BEQ/BNE.  The operation set is this
// design's choice of a small MIPS subset.
module alu
  import ep_pkg::*;
#(
  parameter int XLEN = ep_pkg::WORD_W
) (
  input  alu_op_t         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [4:0]      shamt,
  output logic [XLEN-1:0] y,
  output logic            zero
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLT: y = XLEN'($signed(a) < $signed(b));
      ALU_SLL: y = b << shamt;
      ALU_SRL: y = b >> shamt;
      ALU_LUI: y = {b[15:0], 16'h0000};
      default: y = '0;
    endcase
  end
  assign zero = (y == '0);
endmodule
