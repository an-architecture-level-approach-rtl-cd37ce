// output_selector_tb: random CFU output words; checks that the selected port
// is passed for a CI and zero otherwise.
module output_selector_tb;
  logic is_ci;
  logic [0:0] osel;
  logic [1:0][31:0] cfu_out;
  logic [31:0] y, e;
  int checks = 0, failures = 0;

  output_selector dut (.*);

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      is_ci = ($urandom_range(0, 4) != 0); osel = 1'($urandom);
      cfu_out[0] = $urandom; cfu_out[1] = $urandom;
      #1;
      e = !is_ci ? 32'd0 : osel ? cfu_out[1] : cfu_out[0];
      checks++;
      if (y !== e) begin failures++; $display("FAIL y=%h exp=%h", y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
