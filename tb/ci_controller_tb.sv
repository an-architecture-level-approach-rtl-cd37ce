// ci_controller_tb: fills the LUT through random update requests, checks the
// fetch-time look-up for CI and non-CI instructions against a shadow LUT,
// and checks that a listed CI in EX gets exactly one stall cycle followed by
// one extra cycle, while an unlisted CI gets none.
module ci_controller_tb;
  import ep_pkg::*;
  import ep_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] if_instr = 0;
  logic if_slow, ex_valid = 0, ex_is_ci = 0, ex_slow = 0, stall_cmd, extra_cycle;
  logic upd_valid = 0;
  logic [5:0] upd_ci = 0;
  logic [7:0] lut, shadow = 0;
  int checks = 0, failures = 0, n_stall = 0;

  ci_controller dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ci;
    @(negedge clk); chk(lut == 0, "LUT not cleared"); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      // occasional LUT update
      upd_valid = ($urandom_range(0, 9) == 0); upd_ci = 6'($urandom_range(0, 9));
      @(negedge clk);
      if (upd_valid && upd_ci < 8) shadow[upd_ci[2:0]] = 1'b1;
      upd_valid = 0;
      chk(lut == shadow, "LUT contents");
      // look-up of a CI and of a non-CI with the same funct field
      ci = $urandom_range(0, 9);
      if_instr = asm_ci(ci, 5'd3, 5'd1, 5'd2, 0); #1;
      chk(if_slow == (ci < 8 && shadow[ci]), $sformatf("look-up CI %0d", ci));
      if_instr = asm_r(6'(ci), 5'd3, 5'd1, 5'd2); #1;
      chk(!if_slow, "non-CI flagged");
      // the CI reaches EX
      ex_valid = 1; ex_is_ci = 1; ex_slow = (ci < 8 && shadow[ci]); #1;
      chk(stall_cmd == ex_slow, "stall command");
      if (stall_cmd) begin
        n_stall++;
        @(negedge clk);
        chk(extra_cycle && !stall_cmd, "one extra cycle");
      end
      @(negedge clk);
      chk(!extra_cycle, "extra cycle ended");
      ex_valid = 0; ex_is_ci = 0; ex_slow = 0;
    end
    chk(n_stall > 0, "no stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
