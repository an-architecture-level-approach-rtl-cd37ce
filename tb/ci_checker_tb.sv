// ci_checker_tb: random sequences of CI captures and CHK comparisons against
// a model that remembers the last captured CI; checks the pass/fail pulses in
// the CHK cycle and the registered LUT-update request one cycle later.
module ci_checker_tb;
  logic clk = 0, rst_n = 0;
  logic cap_valid = 0, chk_valid = 0;
  logic [5:0] cap_ci = 0, upd_ci;
  logic [31:0] cap_value = 0, expected = 0;
  logic upd_valid, chk_pass, chk_fail;
  bit m_valid = 0, m_fail_d = 0;
  logic [31:0] m_value;
  logic [5:0] m_ci, m_upd_ci;
  int checks = 0, failures = 0, n_fail = 0;

  ci_checker dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // registered update from the previous cycle
      chk(upd_valid == m_fail_d, "upd_valid");
      if (m_fail_d) chk(upd_ci == m_upd_ci, "upd_ci");
      cap_valid = ($urandom_range(0, 2) == 0); cap_ci = 6'($urandom); cap_value = $urandom;
      chk_valid = !cap_valid && ($urandom_range(0, 1) == 0);
      expected = ($urandom_range(0, 1) == 0) ? m_value : $urandom;
      #1;
      chk(chk_fail == (chk_valid && m_valid && expected != m_value), "chk_fail");
      chk(chk_pass == (chk_valid && m_valid && expected == m_value), "chk_pass");
      m_fail_d = chk_valid && m_valid && expected != m_value;
      if (m_fail_d) begin m_upd_ci = m_ci; n_fail++; end
      if (cap_valid) begin m_valid = 1; m_value = cap_value; m_ci = cap_ci; end
    end
    chk(n_fail > 0, "no mismatch exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
