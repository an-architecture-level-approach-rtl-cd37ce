// decoder: ID-stage instruction decoder.
//
// Combinational.  Turns a 32-bit instruction into the control bundle
// ep_pkg::ctrl_t: register-file and memory controls, ALU operation, branch and
// jump flags, and the two extensions: a custom instruction (CI, opcode 0x1C,
// funct = CI op-code, shamt[0] = output port) and the test-time check
// instruction (CHK, opcode 0x1D, rs = expected value).  Unknown opcodes decode
// as a no-op.  The MIPS-like subset and the CI/CHK encodings are this
// design's choice.
module decoder
  import ep_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [5:0]  opcode, funct;
  logic [31:0] sext, zext;

  assign opcode = instr[31:26];
  assign funct  = instr[5:0];
  assign sext   = {{16{instr[15]}}, instr[15:0]};
  assign zext   = {16'h0000, instr[15:0]};

  always_comb begin
    ctrl         = '0;
    ctrl.alu_op  = ALU_ADD;
    ctrl.rs      = instr[25:21];
    ctrl.rt      = instr[20:16];
    ctrl.shamt   = instr[10:6];
    ctrl.imm     = sext;
    ctrl.ci_num  = funct;
    ctrl.ci_osel = instr[6];
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_write = 1'b1;
        ctrl.dest      = instr[15:11];
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
        unique case (funct)
          F_ADD:   ctrl.alu_op = ALU_ADD;
          F_SUB:   ctrl.alu_op = ALU_SUB;
          F_AND:   ctrl.alu_op = ALU_AND;
          F_OR:    ctrl.alu_op = ALU_OR;
          F_XOR:   ctrl.alu_op = ALU_XOR;
          F_NOR:   ctrl.alu_op = ALU_NOR;
          F_SLT:   ctrl.alu_op = ALU_SLT;
          F_SLL:   begin ctrl.alu_op = ALU_SLL; ctrl.uses_rs = 1'b0; end
          F_SRL:   begin ctrl.alu_op = ALU_SRL; ctrl.uses_rs = 1'b0; end
          default: ctrl.reg_write = 1'b0;
        endcase
      end
      OP_ADDI, OP_SLTI, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.reg_write   = 1'b1;
        ctrl.dest        = instr[20:16];
        ctrl.uses_rs     = (opcode != OP_LUI);
        ctrl.alu_src_imm = 1'b1;
        unique case (opcode)
          OP_SLTI: ctrl.alu_op = ALU_SLT;
          OP_ANDI: begin ctrl.alu_op = ALU_AND; ctrl.imm = zext; end
          OP_ORI:  begin ctrl.alu_op = ALU_OR;  ctrl.imm = zext; end
          OP_XORI: begin ctrl.alu_op = ALU_XOR; ctrl.imm = zext; end
          OP_LUI:  ctrl.alu_op = ALU_LUI;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.reg_write   = 1'b1;
        ctrl.mem_read    = 1'b1;
        ctrl.dest        = instr[20:16];
        ctrl.uses_rs     = 1'b1;
        ctrl.alu_src_imm = 1'b1;
      end
      OP_SW: begin
        ctrl.mem_write   = 1'b1;
        ctrl.uses_rs     = 1'b1;
        ctrl.uses_rt     = 1'b1;
        ctrl.alu_src_imm = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.is_branch = 1'b1;
        ctrl.branch_ne = (opcode == OP_BNE);
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
      end
      OP_J: begin
        ctrl.is_jump = 1'b1;
        ctrl.imm     = {6'b0, instr[25:0]};
      end
      OP_CI: begin
        ctrl.is_ci     = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dest      = instr[15:11];
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
      end
      OP_CHK: begin
        ctrl.is_chk  = 1'b1;
        ctrl.uses_rs = 1'b1;
      end
      default: ;
    endcase
    if (ctrl.dest == 5'd0) ctrl.reg_write = 1'b0;
  end
endmodule
