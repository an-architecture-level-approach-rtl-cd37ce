// alu_tb: random self-check of the ALU against an independent model of
// every operation, plus the zero flag.
module alu_tb;
  import ep_pkg::*;
  alu_op_t     op;
  logic [31:0] a, b, y, e;
  logic [4:0]  sh;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .shamt(sh), .y, .zero);

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_t'($urandom_range(0, 9));
      a = $urandom; b = (n % 7 == 0) ? a : $urandom; sh = 5'($urandom);
      #1;
      case (op)
        ALU_ADD: e = a + b;
        ALU_SUB: e = a - b;
        ALU_AND: e = a & b;
        ALU_OR:  e = a | b;
        ALU_XOR: e = a ^ b;
        ALU_NOR: e = ~a & ~b;
        ALU_SLT: e = (a[31] != b[31]) ? {31'd0, a[31]} : {31'd0, a < b};
        ALU_SLL: e = b * (32'd1 << sh);
        ALU_SRL: e = b / (32'd1 << sh);
        default: e = b << 16;
      endcase
      checks++;
      if (y !== e || zero !== (e == 0)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
