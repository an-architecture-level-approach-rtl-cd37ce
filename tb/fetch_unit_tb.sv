// fetch_unit_tb: checks reset to 0, +4 per enabled cycle, hold when
// disabled, and that a redirect loads the target even while disabled.
module fetch_unit_tb;
  logic clk = 0, rst_n = 0, en = 0, redirect = 0;
  logic [31:0] target = 0, pc, pc_plus4, exp;
  int checks = 0, failures = 0;

  fetch_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); checks++; if (pc !== 0) failures++;
    rst_n = 1; exp = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0); redirect = ($urandom_range(0, 7) == 0);
      target = {$urandom} & ~32'h3;
      #1; checks++;
      if (pc_plus4 !== exp + 4) begin failures++; $display("FAIL pc+4"); end
      @(posedge clk);
      if (redirect) exp = target; else if (en) exp = exp + 4;
      #1; checks++;
      if (pc !== exp) begin failures++; $display("FAIL pc=%h exp=%h", pc, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
