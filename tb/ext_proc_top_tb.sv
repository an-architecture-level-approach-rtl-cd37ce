// ext_proc_top_tb: end-to-end test of the extensible processor at its default
// parameters.
//
// For 1000 simulated chip samples plus a reference sample, each with its own
// random set of custom-instruction outputs that miss the clock period (every
// output has a fixed violation probability of 0 to 30 %; sample 0 has none,
// the last has every CI slow on one port), the bench
//   1. loads a program: a test phase (for every CI and every output port:
//      load a test vector and the expected value, run the CI, run CHK) and a
//      run-time phase (a loop over input data that chains all eight CIs,
//      with loads, stores, forwarding, load-use hazards and a branch);
//   2. emulates the timing violation: whenever a CI whose selected output is
//      slow on this sample completes in a single cycle, the captured CI
//      result is corrupted (forced), as a too-slow path would leave it;
//   3. checks that the LUT ends up holding exactly the slow CIs, that every
//      listed CI takes exactly two EX cycles and every other CI one, that the
//      run-time phase takes the sample-0 cycle count plus one cycle per
//      two-cycle CI executed, and that the stored results match a reference
//      model.
// It prints the minimum, mean and maximum run-time cycles over the samples.
// Each mechanism (single-cycle CI, CI stall, frozen operands taken from the
// write-back stage, CHK pass, CHK fail / LUT update, load-use stall, branch
// redirect, both forwarding paths) is counted and must occur.
module ext_proc_top_tb;
  import ep_pkg::*;
  import ep_tb_pkg::*;

  localparam int NUM_CI   = 8;
  localparam int NUM_OUT  = 2;
  localparam int SAMPLES  = 1001;
  localparam int ITERS    = 6;
  localparam int WATCHDOG = 5000000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        prog_we = 1'b0;
  logic [9:0]  prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic [9:0]  dbg_addr = '0;
  logic [31:0] dbg_rdata;
  logic [31:0] pc_o;
  logic [NUM_CI-1:0] lut_o;

  ext_proc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ program
  logic [31:0] prog [$];
  int          rt_start, end_addr;
  logic [31:0] data_in [ITERS];
  logic [31:0] exp_out [2*ITERS];
  localparam int OSEL_PAT [8] = '{1, 1, 1, 0, 0, 0, 1, 0};
  localparam logic [15:0] DATA_BASE = 16'h0100;
  localparam logic [15:0] OUT_BASE  = 16'h0200;

  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask

  task automatic li(input logic [4:0] r, input logic [31:0] v);
    emit(asm_i(OP_LUI, r, 5'd0, v[31:16]));
    emit(asm_i(OP_ORI, r, r, v[15:0]));
  endtask

  task automatic build_program();
    logic [31:0] a, b, r6, r7;
    prog.delete();
    // test phase: every CI, every output port
    for (int ci = 0; ci < NUM_CI; ci++)
      for (int o = 0; o < NUM_OUT; o++) begin
        a = $urandom; b = $urandom;
        li(5'd1, a); li(5'd2, b); li(5'd3, ref_ci(ci, o, a, b));
        emit(asm_ci(ci, 5'd4, 5'd1, 5'd2, o));
        emit(asm_chk(5'd3));
      end
    // store the input data
    for (int i = 0; i < ITERS; i++) begin
      data_in[i] = $urandom;
      li(5'd5, data_in[i]);
      emit(asm_i(OP_SW, 5'd5, 5'd0, DATA_BASE + 16'(4 * i)));
    end
    emit(asm_i(OP_ADDI, 5'd10, 5'd0, DATA_BASE));
    emit(asm_i(OP_ADDI, 5'd11, 5'd0, OUT_BASE));
    emit(asm_i(OP_ADDI, 5'd9, 5'd0, 16'(ITERS)));
    emit(asm_i(OP_ADDI, 5'd7, 5'd0, 16'h1234));
    rt_start = prog.size();
    // run-time loop
    emit(asm_i(OP_LW, 5'd5, 5'd10, 16'd0));
    emit(asm_ci(0, 5'd6, 5'd5, 5'd7, OSEL_PAT[0]));   // load-use on r5
    emit(asm_ci(1, 5'd7, 5'd6, 5'd5, OSEL_PAT[1]));
    for (int k = 2; k < 8; k++)
      if (k % 2 == 0) emit(asm_ci(k, 5'd6, 5'd7, 5'd6, OSEL_PAT[k]));
      else            emit(asm_ci(k, 5'd7, 5'd6, 5'd7, OSEL_PAT[k]));
    emit(asm_i(OP_SW, 5'd6, 5'd11, 16'd0));
    emit(asm_i(OP_SW, 5'd7, 5'd11, 16'd4));
    emit(asm_i(OP_ADDI, 5'd10, 5'd10, 16'd4));
    emit(asm_i(OP_ADDI, 5'd11, 5'd11, 16'd8));
    emit(asm_i(OP_ADDI, 5'd9, 5'd9, 16'hFFFF));
    emit(asm_i(OP_BNE, 5'd9, 5'd0, 16'(rt_start - (prog.size() + 1))));
    end_addr = prog.size();
    emit(asm_i(OP_BEQ, 5'd0, 5'd0, 16'hFFFF));        // park
    // reference results
    r7 = 32'h1234;
    for (int i = 0; i < ITERS; i++) begin
      r6 = ref_ci(0, OSEL_PAT[0], data_in[i], r7);
      r7 = ref_ci(1, OSEL_PAT[1], r6, data_in[i]);
      for (int k = 2; k < 8; k++)
        if (k % 2 == 0) r6 = ref_ci(k, OSEL_PAT[k], r7, r6);
        else            r7 = ref_ci(k, OSEL_PAT[k], r6, r7);
      exp_out[2*i] = r6;
      exp_out[2*i+1] = r7;
    end
  endtask

  // ------------------------------------------------- timing-violation model
  bit          slow [NUM_CI][NUM_OUT];
  logic        inj_en;
  logic [31:0] inj_val;
  int          osel_ex, ci_ex;

  always @(negedge clk) begin
    ci_ex   = int'(dut.idex.ctrl.ci_num);
    osel_ex = int'(dut.idex.ctrl.ci_osel);
    inj_en  = rst_n && dut.idex.valid && dut.idex.ctrl.is_ci && !dut.ci_stall &&
              !dut.u_cictl.extra_cycle && ci_ex < NUM_CI && slow[ci_ex][osel_ex];
    inj_val = dut.cfu_out[osel_ex] ^ 32'h0001_0100;
    if (inj_en) force dut.ci_result = inj_val;
    else        release dut.ci_result;
  end

  // ------------------------------------------------------ mechanism counts
  int n_ci_single, n_ci_stall, n_freeze_wb, n_chk_pass, n_chk_fail;
  int n_load_use, n_redirect, n_fwd_exmem, n_fwd_memwb;
  bit rt_phase;
  logic [NUM_CI-1:0] exp_lut;
  int ex_cycles;

  always @(posedge clk) if (rst_n) begin
    if (dut.idex.valid && dut.idex.ctrl.is_ci && !dut.ci_stall) n_ci_single += dut.u_cictl.extra_cycle ? 0 : 1;
    if (dut.ci_stall) n_ci_stall++;
    if (dut.cfu_freeze && (dut.fwd_a == FWD_MEMWB || dut.fwd_b == FWD_MEMWB)) n_freeze_wb++;
    if (dut.chk_pass) n_chk_pass++;
    if (dut.chk_fail) n_chk_fail++;
    if (dut.load_use && !dut.ci_stall && !dut.redirect) n_load_use++;
    if (dut.redirect) n_redirect++;
    if (dut.idex.valid && (dut.fwd_a == FWD_EXMEM || dut.fwd_b == FWD_EXMEM)) n_fwd_exmem++;
    if (dut.idex.valid && (dut.fwd_a == FWD_MEMWB || dut.fwd_b == FWD_MEMWB)) n_fwd_memwb++;
    // run-time CI latency: a CI in the LUT takes two EX cycles, others one
    if (rt_phase && dut.idex.valid && dut.idex.ctrl.is_ci) begin
      if (!dut.u_cictl.extra_cycle) begin
        check(dut.ci_stall == exp_lut[dut.idex.ctrl.ci_num[2:0]],
              $sformatf("CI %0d stall=%0b expected %0b", dut.idex.ctrl.ci_num, dut.ci_stall,
                        exp_lut[dut.idex.ctrl.ci_num[2:0]]));
      end else begin
        check(!dut.ci_stall, "extra cycle longer than one clock");
      end
    end
  end

  // ------------------------------------------------------------ main
  int base_cycles;
  int t_start, t_end, n_slow_ci;
  int p_slow [NUM_CI][NUM_OUT];   // per mille chance that an output misses the clock
  int t_min, t_max, n_all_fast;
  longint t_sum;

  initial begin
    // each CI output gets its own violation probability (0 to 30 %), standing
    // for the spread of its delay distribution around the clock period
    for (int ci = 0; ci < NUM_CI; ci++)
      for (int o = 0; o < NUM_OUT; o++) p_slow[ci][o] = $urandom_range(0, 300);
    t_min = 1 << 30; t_max = 0; t_sum = 0; n_all_fast = 0;
    for (int s = 0; s < SAMPLES; s++) begin
      // chip sample: which CI outputs miss the clock period
      exp_lut = '0;
      n_slow_ci = 0;
      for (int ci = 0; ci < NUM_CI; ci++)
        for (int o = 0; o < NUM_OUT; o++) begin
          slow[ci][o] = (s != 0) && ($urandom_range(0, 999) < p_slow[ci][o]);
          if (slow[ci][o]) exp_lut[ci] = 1'b1;
        end
      if (s == SAMPLES - 1) begin  // one sample with every CI slow on one port
        for (int ci = 0; ci < NUM_CI; ci++) begin
          slow[ci][ci % 2] = 1'b1; slow[ci][1 - ci % 2] = 1'b0;
        end
        exp_lut = '1;
      end
      for (int ci = 0; ci < NUM_CI; ci++) n_slow_ci += exp_lut[ci];

      build_program();
      rst_n = 1'b0;
      rt_phase = 1'b0;
      @(negedge clk);
      for (int i = 0; i < prog.size(); i++) begin
        prog_we = 1'b1; prog_addr = 10'(i); prog_wdata = prog[i];
        @(negedge clk);
      end
      prog_we = 1'b0;
      rst_n = 1'b1;

      // the phases are timed by the instruction in EX (fetch runs ahead of a branch)
      t_start = 0; t_end = 0;
      while (!(dut.idex.valid && dut.idex.pc == 32'(4 * rt_start))) @(negedge clk);
      t_start = cycle;
      check(lut_o == exp_lut, $sformatf("sample %0d: LUT %b expected %b", s, lut_o, exp_lut));
      rt_phase = 1'b1;
      while (!(dut.idex.valid && dut.idex.pc == 32'(4 * end_addr))) @(negedge clk);
      t_end = cycle;
      repeat (8) @(negedge clk);
      rt_phase = 1'b0;

      if (s == 0) base_cycles = t_end - t_start;
      else check(t_end - t_start == base_cycles + ITERS * n_slow_ci,
                 $sformatf("sample %0d: run-time %0d cycles, expected %0d", s,
                           t_end - t_start, base_cycles + ITERS * n_slow_ci));
      for (int i = 0; i < 2 * ITERS; i++) begin
        dbg_addr = 10'((32'(OUT_BASE) >> 2) + 32'(i));
        #1;
        check(dbg_rdata == exp_out[i], $sformatf("sample %0d: out[%0d]=%h expected %h",
                                                 s, i, dbg_rdata, exp_out[i]));
      end
      if (s < 4 || s == SAMPLES - 1)
        $display("sample %0d: LUT=%b run-time cycles=%0d", s, lut_o, t_end - t_start);
      if (s != 0) begin
        t_min = (t_end - t_start < t_min) ? t_end - t_start : t_min;
        t_max = (t_end - t_start > t_max) ? t_end - t_start : t_max;
        t_sum += longint'(t_end) - longint'(t_start);
        if (n_slow_ci == 0) n_all_fast++;
      end
    end

    $display("%0d chip samples: all CIs single-cycle on %0d; run-time loop min %0d / mean %0.1f / max %0d cycles (all single-cycle: %0d)",
             SAMPLES - 1, n_all_fast, t_min, real'(t_sum) / (SAMPLES - 1), t_max, base_cycles);
    $display("mechanisms: ci_single=%0d ci_stall=%0d freeze_from_wb=%0d chk_pass=%0d chk_fail=%0d load_use=%0d redirect=%0d fwd_exmem=%0d fwd_memwb=%0d",
             n_ci_single, n_ci_stall, n_freeze_wb, n_chk_pass, n_chk_fail, n_load_use,
             n_redirect, n_fwd_exmem, n_fwd_memwb);
    check(n_ci_single > 0, "no single-cycle CI");
    check(n_ci_stall > 0, "no CI stall");
    check(n_freeze_wb > 0, "no frozen operand taken from write-back");
    check(n_chk_pass > 0, "no passing CHK");
    check(n_chk_fail > 0, "no failing CHK (LUT update)");
    check(n_load_use > 0, "no load-use stall");
    check(n_redirect > 0, "no branch redirect");
    check(n_fwd_exmem > 0, "no EX/MEM forwarding");
    check(n_fwd_memwb > 0, "no MEM/WB forwarding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
