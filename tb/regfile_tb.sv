// regfile_tb: writes random values, reads them back on both ports against a
// shadow copy, and checks r0 = 0 and the same-cycle write-through.
module regfile_tb;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0;
  logic [31:0] rd1, rd2, wd = 0;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", w, got, exp); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); wa = 5'($urandom); wd = $urandom;
      ra1 = (n % 5 == 0) ? wa : 5'($urandom); ra2 = 5'($urandom);
      #1;
      chk(rd1, (ra1 == 0) ? 0 : (we && wa == ra1) ? wd : shadow[ra1], "rd1");
      chk(rd2, (ra2 == 0) ? 0 : (we && wa == ra2) ? wd : shadow[ra2], "rd2");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
