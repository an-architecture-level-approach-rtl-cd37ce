// bitcount_workload_tb: a bit-counting workload on the extensible processor,
// run on two simulated chip samples.
//
// The program counts the set bits of N random words twice: first with a
// software loop of base instructions (AND, ADD, SRL, BNE per bit), then with
// one custom instruction per word (CI 1, output port 1 = popcount).  Before
// that, a short test routine checks CI 1 with CHK.  On the "fast" sample the
// CI meets timing; on the "slow" sample its popcount output misses the clock
// edge when given one cycle (the bench corrupts the captured value), so the
// test routine puts CI 1 into the LUT.  The bench checks
//   - every count against $countones, in both versions and both samples;
//   - the LUT after the test routine (empty, or holding CI 1);
//   - that the software loop takes the same time on both samples;
//   - that the CI loop on the slow sample takes exactly N cycles more than on
//     the fast one (one extra cycle per CI executed);
//   - that the CI loop still beats the software loop on the slow sample.
// The cycles saved per word, (software - CI) / N, are printed for both
// samples: the loss is one cycle per word.
module bitcount_workload_tb;
  import ep_pkg::*;
  import ep_tb_pkg::*;

  localparam int N = 16;
  localparam logic [15:0] IN_BASE = 16'h0100, SW_BASE = 16'h0200, CI_BASE = 16'h0300;

  logic        clk = 1'b0, rst_n = 1'b0, prog_we = 1'b0;
  logic [9:0]  prog_addr = '0, dbg_addr = '0;
  logic [31:0] prog_wdata = '0, dbg_rdata, pc_o;
  logic [7:0]  lut_o;

  ext_proc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  logic [31:0] words [N];
  int lbl_sw, lbl_ci, lbl_end;

  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask
  task automatic li(input logic [4:0] r, input logic [31:0] v);
    emit(asm_i(OP_LUI, r, 5'd0, v[31:16])); emit(asm_i(OP_ORI, r, r, v[15:0]));
  endtask

  task automatic build_program();
    int inner, outer;
    logic [31:0] ta;
    prog.delete();
    // test routine for CI 1, output port 1
    ta = 32'hF0F0_1234;
    li(5'd1, ta); li(5'd3, ref_ci(1, 1, ta, 32'd0));
    emit(asm_ci(1, 5'd4, 5'd1, 5'd0, 1));
    emit(asm_chk(5'd3));
    // input data
    for (int i = 0; i < N; i++) begin
      li(5'd2, words[i]);
      emit(asm_i(OP_SW, 5'd2, 5'd0, IN_BASE + 16'(4 * i)));
    end
    // software version
    emit(asm_i(OP_ADDI, 5'd10, 5'd0, IN_BASE));
    emit(asm_i(OP_ADDI, 5'd11, 5'd0, SW_BASE));
    emit(asm_i(OP_ADDI, 5'd9, 5'd0, 16'(N)));
    lbl_sw = prog.size();
    outer = prog.size();
    emit(asm_i(OP_LW, 5'd2, 5'd10, 16'd0));
    emit(asm_r(F_ADD, 5'd3, 5'd0, 5'd0));
    emit(asm_i(OP_BEQ, 5'd2, 5'd0, 16'd4));              // zero word: skip the loop
    inner = prog.size();
    emit(asm_i(OP_ANDI, 5'd4, 5'd2, 16'd1));
    emit(asm_r(F_ADD, 5'd3, 5'd3, 5'd4));
    emit(asm_r(F_SRL, 5'd2, 5'd0, 5'd2, 5'd1));
    emit(asm_i(OP_BNE, 5'd2, 5'd0, 16'(inner - (prog.size() + 1))));
    emit(asm_i(OP_SW, 5'd3, 5'd11, 16'd0));
    emit(asm_i(OP_ADDI, 5'd10, 5'd10, 16'd4));
    emit(asm_i(OP_ADDI, 5'd11, 5'd11, 16'd4));
    emit(asm_i(OP_ADDI, 5'd9, 5'd9, 16'hFFFF));
    emit(asm_i(OP_BNE, 5'd9, 5'd0, 16'(outer - (prog.size() + 1))));
    // custom-instruction version
    emit(asm_i(OP_ADDI, 5'd10, 5'd0, IN_BASE));
    emit(asm_i(OP_ADDI, 5'd11, 5'd0, CI_BASE));
    emit(asm_i(OP_ADDI, 5'd9, 5'd0, 16'(N)));
    lbl_ci = prog.size();
    outer = prog.size();
    emit(asm_i(OP_LW, 5'd2, 5'd10, 16'd0));
    emit(asm_ci(1, 5'd3, 5'd2, 5'd0, 1));
    emit(asm_i(OP_SW, 5'd3, 5'd11, 16'd0));
    emit(asm_i(OP_ADDI, 5'd10, 5'd10, 16'd4));
    emit(asm_i(OP_ADDI, 5'd11, 5'd11, 16'd4));
    emit(asm_i(OP_ADDI, 5'd9, 5'd9, 16'hFFFF));
    emit(asm_i(OP_BNE, 5'd9, 5'd0, 16'(outer - (prog.size() + 1))));
    lbl_end = prog.size();
    emit(asm_i(OP_BEQ, 5'd0, 5'd0, 16'hFFFF));
  endtask

  // timing-violation model: CI 1 port 1 is slow on the "slow" sample
  bit slow_ci1;
  always @(negedge clk) begin
    if (rst_n && slow_ci1 && dut.idex.valid && dut.idex.ctrl.is_ci &&
        dut.idex.ctrl.ci_num == 6'd1 && dut.idex.ctrl.ci_osel &&
        !dut.ci_stall && !dut.u_cictl.extra_cycle)
      force dut.ci_result = dut.cfu_out[1] ^ 32'h0000_0004;
    else
      release dut.ci_result;
  end

  function automatic bit in_ex(int idx);
    return dut.idex.valid && dut.idex.pc == 32'(4 * idx);
  endfunction

  int t_sw [2], t_ci [2], t0, t1, t2;

  initial begin
    for (int i = 0; i < N; i++) words[i] = (i == 3) ? 32'd0 : $urandom;
    build_program();
    for (int s = 0; s < 2; s++) begin
      slow_ci1 = (s == 1);
      rst_n = 1'b0;
      @(negedge clk);
      for (int i = 0; i < prog.size(); i++) begin
        prog_we = 1'b1; prog_addr = 10'(i); prog_wdata = prog[i];
        @(negedge clk);
      end
      prog_we = 1'b0;
      rst_n = 1'b1;
      while (!in_ex(lbl_sw)) @(negedge clk);
      t0 = cycle;
      check(lut_o == (s == 1 ? 8'b0000_0010 : 8'b0), $sformatf("sample %0d LUT %b", s, lut_o));
      while (!in_ex(lbl_ci)) @(negedge clk);
      t1 = cycle;
      while (!in_ex(lbl_end)) @(negedge clk);
      t2 = cycle;
      repeat (6) @(negedge clk);
      t_sw[s] = t1 - t0;
      t_ci[s] = t2 - t1;
      for (int i = 0; i < N; i++) begin
        dbg_addr = 10'((32'(SW_BASE) >> 2) + 32'(i)); #1;
        check(dbg_rdata == $countones(words[i]), $sformatf("sample %0d sw count %0d", s, i));
        dbg_addr = 10'((32'(CI_BASE) >> 2) + 32'(i)); #1;
        check(dbg_rdata == $countones(words[i]), $sformatf("sample %0d CI count %0d", s, i));
      end
      $display("sample %s: software loop %0d cycles, CI loop %0d cycles, saved per word %0.2f",
               (s != 0) ? "slow" : "fast", t_sw[s], t_ci[s], real'(t_sw[s] - t_ci[s]) / N);
    end
    check(t_sw[0] == t_sw[1], "software loop time differs between samples");
    check(t_ci[1] == t_ci[0] + N, $sformatf("slow CI loop %0d, expected %0d", t_ci[1], t_ci[0] + N));
    check(t_ci[1] < t_sw[1], "CI loop not faster than software on the slow sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
