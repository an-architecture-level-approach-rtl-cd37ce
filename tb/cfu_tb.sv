// cfu_tb: every CI number, both output ports, random and corner operands,
// against the reference model of ep_tb_pkg; CI numbers at or above NUM_CI
// must produce zero.
module cfu_tb;
  import ep_tb_pkg::*;
  logic [5:0] ci_num;
  logic [31:0] a, b;
  logic [1:0][31:0] out;
  int checks = 0, failures = 0;
  localparam logic [31:0] CORNER [6] = '{32'h0, 32'hFFFF_FFFF, 32'h7FFF, 32'hFFFF_8000,
                                         32'h8000_0000, 32'h0000_001F};

  cfu dut (.ci_num, .a, .b, .out);

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      ci_num = 6'(n % 8);
      a = (n % 11 == 0) ? CORNER[n % 6] : $urandom;
      b = (n % 13 == 0) ? CORNER[(n / 13) % 6] : $urandom;
      #1;
      for (int o = 0; o < 2; o++) begin
        checks++;
        if (out[o] !== ref_ci(n % 8, o, a, b)) begin
          failures++;
          $display("FAIL ci=%0d o=%0d a=%h b=%h got %h exp %h", n % 8, o, a, b, out[o],
                   ref_ci(n % 8, o, a, b));
        end
      end
    end
    ci_num = 6'd40; a = $urandom; b = $urandom; #1;
    checks++; if (out !== '0) begin failures++; $display("FAIL: CI 40 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
