// ep_pkg: types and constants shared by the extensible processor.
//
// The base processor is a five-stage, in-order, MIPS-like pipeline
// (IF, ID, EX, MEM, WB) whose EX stage holds an ALU and a Custom Functional
// Unit (CFU) side by side.  Two instructions extend the base instruction set:
//
//   CI   opcode 0x1C  rs, rt = input operands, rd = destination,
//                     shamt[0] = which CFU output port is written back,
//                     funct    = CI number (the "CI op-code" kept in the LUT)
//   CHK  opcode 0x1D  rs = register holding the expected value of the last
//                     executed CI's selected output (test-time check)
//
// The 32-bit MIPS formats and opcode values follow the base processor; the
// CI and CHK encodings are this design's own choice.
package ep_pkg;

  localparam int WORD_W = 32;

  // primary opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_CI    = 6'h1C;
  localparam logic [5:0] OP_CHK   = 6'h1D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes
  localparam logic [5:0] F_SLL = 6'h00;
  localparam logic [5:0] F_SRL = 6'h02;
  localparam logic [5:0] F_ADD = 6'h20;
  localparam logic [5:0] F_SUB = 6'h22;
  localparam logic [5:0] F_AND = 6'h24;
  localparam logic [5:0] F_OR  = 6'h25;
  localparam logic [5:0] F_XOR = 6'h26;
  localparam logic [5:0] F_NOR = 6'h27;
  localparam logic [5:0] F_SLT = 6'h2A;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLL, ALU_SRL, ALU_LUI
  } alu_op_t;

  // operand forwarding source
  typedef enum logic [1:0] {
    FWD_NONE, FWD_EXMEM, FWD_MEMWB
  } fwd_sel_t;

  // decoded control of one instruction
  typedef struct packed {
    logic        reg_write;
    logic        mem_read;
    logic        mem_write;
    logic        alu_src_imm;
    alu_op_t     alu_op;
    logic        is_branch;
    logic        branch_ne;
    logic        is_jump;
    logic        is_ci;
    logic        is_chk;
    logic        uses_rs;
    logic        uses_rt;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  dest;
    logic [4:0]  shamt;
    logic [31:0] imm;       // sign/zero-extended immediate, or jump index
    logic [5:0]  ci_num;    // CI op-code (funct field of a CI)
    logic        ci_osel;   // CFU output port written back by a CI
  } ctrl_t;

endpackage
