// ext_proc_top: five-stage pipelined extensible processor with
// process-variation tolerant custom-instruction execution.
//
// A MIPS-like in-order pipeline (IF, ID, EX, MEM, WB) whose EX stage holds an
// ALU and a Custom Functional Unit (CFU).  Process variation can make some
// custom instructions (CIs) of a manufactured chip miss the clock period.
// Such CIs are found once, at test time, and then given two cycles:
//
//   test time  A program loads a test vector into registers, executes a CI
//              and then a CHK instruction naming a register with the expected
//              result.  The checker compares the CI's output (as captured by
//              the pipeline) with it; on a mismatch the CI's op-code is added
//              to the LUT of the CI controller.
//   run time   The CI controller looks up every fetched instruction in the
//              LUT.  A listed CI raises the stall command when it reaches EX:
//              the pipeline holds for one cycle, a bubble goes to MEM, and the
//              CFU inputs (the ID/EX operand registers, loaded with the
//              forwarded values) are frozen, so the CI has two full cycles.
//
// Ports: program load port into the instruction memory (use while rst_n is
// low), a debug read port of the data memory, the PC and the LUT contents.
// Branches and jumps resolve in EX (two-cycle penalty), loads need one stall
// cycle before a dependent instruction, and there are no branch delay slots;
// these are this design's choices, the CI controller / output selector /
// checker arrangement follows the architecture.
module ext_proc_top
  import ep_pkg::*;
#(
  parameter int XLEN       = ep_pkg::WORD_W,
  parameter int NUM_CI     = 8,
  parameter int NUM_OUT    = 2,
  parameter int IMEM_DEPTH = 1024,
  parameter int DMEM_DEPTH = 1024,
  localparam int IAW       = $clog2(IMEM_DEPTH),
  localparam int DAW       = $clog2(DMEM_DEPTH),
  localparam int SW        = (NUM_OUT > 1) ? $clog2(NUM_OUT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_we,
  input  logic [IAW-1:0]    prog_addr,
  input  logic [31:0]       prog_wdata,
  input  logic [DAW-1:0]    dbg_addr,
  output logic [31:0]       dbg_rdata,
  output logic [31:0]       pc_o,
  output logic [NUM_CI-1:0] lut_o
);
  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic        slow;
  } ifid_t;

  typedef struct packed {
    logic            valid;
    logic [31:0]     pc;
    ctrl_t           ctrl;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
    logic            slow;
    logic            frozen;
  } idex_t;

  typedef struct packed {
    logic            valid;
    logic            reg_write;
    logic            mem_read;
    logic            mem_write;
    logic [4:0]      dest;
    logic [XLEN-1:0] result;
    logic [XLEN-1:0] store_data;
  } exmem_t;

  typedef struct packed {
    logic            valid;
    logic            reg_write;
    logic [4:0]      dest;
    logic [XLEN-1:0] wdata;
  } memwb_t;

  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  // ------------------------------------------------------- control wires
  logic pc_en, ifid_en, ifid_flush, idex_en, idex_flush, exmem_bubble;
  logic cfu_freeze, load_use;
  logic ci_stall, extra_cycle, redirect;
  logic upd_valid;
  logic [5:0] upd_ci;
  logic chk_pass, chk_fail;

  // ------------------------------------------------------------------ IF
  logic [31:0] pc, pc_plus4, if_instr, redirect_target;
  logic        if_slow;

  fetch_unit u_fetch (
    .clk, .rst_n, .en(pc_en), .redirect, .target(redirect_target),
    .pc, .pc_plus4
  );

  inst_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata),
    .addr(pc[IAW+1:2]), .rdata(if_instr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ifid <= '0;
    else if (ifid_flush) ifid <= '0;
    else if (ifid_en)    ifid <= '{valid: 1'b1, pc: pc, instr: if_instr, slow: if_slow};
  end

  // ------------------------------------------------------------------ ID
  ctrl_t           id_ctrl;
  logic [XLEN-1:0] id_a, id_b;

  decoder u_dec (.instr(ifid.instr), .ctrl(id_ctrl));

  regfile #(.XLEN(XLEN)) u_rf (
    .clk, .rst_n,
    .ra1(id_ctrl.rs), .ra2(id_ctrl.rt), .rd1(id_a), .rd2(id_b),
    .we(memwb.valid && memwb.reg_write), .wa(memwb.dest), .wd(memwb.wdata)
  );

  // ------------------------------------------------------------------ EX
  fwd_sel_t        fwd_a, fwd_b;
  logic [XLEN-1:0] ex_a, ex_b, alu_b, alu_y, ci_result, ex_result;
  logic            alu_zero;
  logic [NUM_OUT-1:0][XLEN-1:0] cfu_out;
  logic            ex_valid;
  ctrl_t           ex_ctrl;
  logic [31:0]     ex_pc4;

  assign ex_valid = idex.valid;
  assign ex_ctrl  = idex.ctrl;
  assign ex_pc4   = idex.pc + 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          idex <= '0;
    else if (idex_flush) idex <= '0;
    else if (idex_en)    idex <= '{valid: ifid.valid, pc: ifid.pc, ctrl: id_ctrl,
                                   a: id_a, b: id_b, slow: ifid.slow, frozen: 1'b0};
    else if (cfu_freeze) begin
      // hold the CFU inputs stable for the extra cycle
      idex.a      <= ex_a;
      idex.b      <= ex_b;
      idex.frozen <= 1'b1;
    end
  end

  forwarding_unit u_fwd (
    .freeze(idex.frozen), .ex_rs(ex_ctrl.rs), .ex_rt(ex_ctrl.rt),
    .exmem_reg_write(exmem.valid && exmem.reg_write), .exmem_dest(exmem.dest),
    .memwb_reg_write(memwb.valid && memwb.reg_write), .memwb_dest(memwb.dest),
    .fwd_a, .fwd_b
  );

  always_comb begin
    unique case (fwd_a)
      FWD_EXMEM: ex_a = exmem.result;
      FWD_MEMWB: ex_a = memwb.wdata;
      default:   ex_a = idex.a;
    endcase
    unique case (fwd_b)
      FWD_EXMEM: ex_b = exmem.result;
      FWD_MEMWB: ex_b = memwb.wdata;
      default:   ex_b = idex.b;
    endcase
  end

  assign alu_b = ex_ctrl.alu_src_imm ? ex_ctrl.imm : ex_b;

  alu #(.XLEN(XLEN)) u_alu (
    .op(ex_ctrl.alu_op), .a(ex_a), .b(alu_b), .shamt(ex_ctrl.shamt),
    .y(alu_y), .zero(alu_zero)
  );

  cfu #(.XLEN(XLEN), .NUM_CI(NUM_CI), .NUM_OUT(NUM_OUT)) u_cfu (
    .ci_num(ex_ctrl.ci_num), .a(ex_a), .b(ex_b), .out(cfu_out)
  );

  output_selector #(.XLEN(XLEN), .NUM_OUT(NUM_OUT)) u_osel (
    .is_ci(ex_ctrl.is_ci), .osel(SW'(ex_ctrl.ci_osel)), .cfu_out, .y(ci_result)
  );

  assign ex_result = ex_ctrl.is_ci ? ci_result : alu_y;

  // branch / jump resolution
  logic br_eq;
  assign br_eq    = (ex_a == ex_b);
  assign redirect = ex_valid && (ex_ctrl.is_jump ||
                    (ex_ctrl.is_branch && (br_eq != ex_ctrl.branch_ne)));
  assign redirect_target = ex_ctrl.is_jump
                         ? {ex_pc4[31:28], ex_ctrl.imm[25:0], 2'b00}
                         : ex_pc4 + {ex_ctrl.imm[29:0], 2'b00};

  // CI controller (LUT, stall command) and test-time checker
  ci_controller #(.NUM_CI(NUM_CI)) u_cictl (
    .clk, .rst_n, .if_instr, .if_slow,
    .ex_valid, .ex_is_ci(ex_ctrl.is_ci), .ex_slow(idex.slow),
    .stall_cmd(ci_stall), .extra_cycle,
    .upd_valid, .upd_ci, .lut(lut_o)
  );

  ci_checker #(.XLEN(XLEN)) u_chk (
    .clk, .rst_n,
    .cap_valid(ex_valid && ex_ctrl.is_ci && !ci_stall), .cap_ci(ex_ctrl.ci_num),
    .cap_value(ci_result),
    .chk_valid(ex_valid && ex_ctrl.is_chk), .expected(ex_a),
    .upd_valid, .upd_ci, .chk_pass, .chk_fail
  );

  pipeline_controller u_pctl (
    .ci_stall, .redirect,
    .id_valid(ifid.valid), .id_uses_rs(id_ctrl.uses_rs), .id_uses_rt(id_ctrl.uses_rt),
    .id_rs(id_ctrl.rs), .id_rt(id_ctrl.rt),
    .ex_valid, .ex_mem_read(ex_ctrl.mem_read), .ex_dest(ex_ctrl.dest),
    .pc_en, .ifid_en, .ifid_flush, .idex_en, .idex_flush, .exmem_bubble,
    .cfu_freeze, .load_use
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            exmem <= '0;
    else if (exmem_bubble) exmem <= '0;
    else exmem <= '{valid: ex_valid, reg_write: ex_valid && ex_ctrl.reg_write,
                    mem_read: ex_ctrl.mem_read, mem_write: ex_valid && ex_ctrl.mem_write,
                    dest: ex_ctrl.dest, result: ex_result, store_data: ex_b};
  end

  // ----------------------------------------------------------------- MEM
  logic [31:0] mem_rdata;

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(exmem.result[DAW+1:2]), .we(exmem.valid && exmem.mem_write),
    .wdata(exmem.store_data), .rdata(mem_rdata), .dbg_addr, .dbg_rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) memwb <= '0;
    else memwb <= '{valid: exmem.valid, reg_write: exmem.reg_write, dest: exmem.dest,
                    wdata: exmem.mem_read ? mem_rdata : exmem.result};
  end

  // ------------------------------------------------------------------ WB
  // write-back happens through the register file's write port above

  assign pc_o = pc;

  // A CI stall never coincides with a redirect (a CI is not a branch).
  assert property (@(posedge clk) disable iff (!rst_n) !(ci_stall && redirect));
endmodule
