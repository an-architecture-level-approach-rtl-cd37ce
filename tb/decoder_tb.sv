// decoder_tb: decodes one instruction of every supported kind with random
// register fields and checks the control bundle field by field against the
// expected values for that instruction kind.
module decoder_tb;
  import ep_pkg::*;
  import ep_tb_pkg::*;
  logic [31:0] instr;
  ctrl_t       c;
  int checks = 0, failures = 0;

  decoder dut (.instr, .ctrl(c));

  task automatic expect_eq(input int unsigned got, input int unsigned exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h (instr %h)", w, got, exp, instr); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [4:0] rs, rt, rd, sh;
    logic [15:0] imm;
    for (int n = 0; n < 300; n++) begin
      rs = 5'($urandom); rt = 5'($urandom_range(1, 31)); rd = 5'($urandom_range(1, 31));
      sh = 5'($urandom); imm = 16'($urandom);
      // R-type add
      instr = asm_r(F_SUB, rd, rs, rt); #1;
      expect_eq(32'(c.reg_write), 32'(1), "sub we"); expect_eq(32'(c.dest), 32'(rd), "sub dest");
      expect_eq(32'(c.alu_op), 32'(ALU_SUB), "sub op"); expect_eq(32'(c.rs), 32'(rs), "sub rs");
      expect_eq(32'(c.rt), 32'(rt), "sub rt"); expect_eq(32'(c.alu_src_imm), 32'(0), "sub src");
      instr = asm_r(F_SLL, rd, 5'd0, rt, sh); #1;
      expect_eq(32'(c.alu_op), 32'(ALU_SLL), "sll op"); expect_eq(32'(c.shamt), 32'(sh), "sll sh");
      expect_eq(32'(c.uses_rs), 32'(0), "sll rs");
      // immediates
      instr = asm_i(OP_ADDI, rt, rs, imm); #1;
      expect_eq(32'(c.imm), 32'({{16{imm[15]}}, imm}), "addi imm"); expect_eq(32'(c.dest), 32'(rt), "addi dest");
      expect_eq(32'(c.alu_src_imm), 32'(1), "addi src"); expect_eq(32'(c.uses_rt), 32'(0), "addi rt");
      instr = asm_i(OP_ORI, rt, rs, imm); #1;
      expect_eq(32'(c.imm), 32'({16'h0, imm}), "ori imm"); expect_eq(32'(c.alu_op), 32'(ALU_OR), "ori op");
      instr = asm_i(OP_LUI, rt, 5'd0, imm); #1;
      expect_eq(32'(c.alu_op), 32'(ALU_LUI), "lui op"); expect_eq(32'(c.uses_rs), 32'(0), "lui rs");
      // memory
      instr = asm_i(OP_LW, rt, rs, imm); #1;
      expect_eq(32'(c.mem_read), 32'(1), "lw rd"); expect_eq(32'(c.reg_write), 32'(1), "lw we");
      expect_eq(32'(c.dest), 32'(rt), "lw dest");
      instr = asm_i(OP_SW, rt, rs, imm); #1;
      expect_eq(32'(c.mem_write), 32'(1), "sw wr"); expect_eq(32'(c.reg_write), 32'(0), "sw we");
      expect_eq(32'(c.uses_rt), 32'(1), "sw rt");
      // control flow
      instr = asm_i(OP_BNE, rt, rs, imm); #1;
      expect_eq(32'(c.is_branch), 32'(1), "bne br"); expect_eq(32'(c.branch_ne), 32'(1), "bne ne");
      expect_eq(32'(c.reg_write), 32'(0), "bne we");
      instr = asm_j(26'($urandom)); #1;
      expect_eq(32'(c.is_jump), 32'(1), "j"); expect_eq(32'(c.imm), 32'({6'd0, instr[25:0]}), "j idx");
      // extensions
      instr = asm_ci(n % 64, rd, rs, rt, n % 2); #1;
      expect_eq(32'(c.is_ci), 32'(1), "ci"); expect_eq(32'(c.ci_num), 32'({26'd0, 6'(n % 64)}), "ci num");
      expect_eq(32'(c.ci_osel), 32'({31'd0, 1'(n % 2)}), "ci osel"); expect_eq(32'(c.dest), 32'(rd), "ci dest");
      expect_eq(32'(c.reg_write), 32'(1), "ci we"); expect_eq(32'(c.uses_rs & c.uses_rt), 32'(1), "ci uses");
      instr = asm_chk(rs); #1;
      expect_eq(32'(c.is_chk), 32'(1), "chk"); expect_eq(32'(c.rs), 32'(rs), "chk rs");
      expect_eq(32'({c.reg_write, c.mem_write, c.is_ci}), 32'(0), "chk side effects");
      // destination r0 is never written
      instr = asm_r(F_ADD, 5'd0, rs, rt); #1;
      expect_eq(32'(c.reg_write), 32'(0), "r0 dest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
