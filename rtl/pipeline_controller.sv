// pipeline_controller: stall, flush and freeze control of the five-stage
// pipeline.
//
// Combinational.  Three events, in priority order:
//   1. ci_stall: the CI controller's stall command for a custom instruction
//      (CI) found in its LUT.  PC, IF/ID and ID/EX hold for one cycle, a
//      bubble enters EX/MEM, and `cfu_freeze` makes ID/EX capture the CFU's
//      (forwarded) operands so they stay unchanged in the extra cycle.
//   2. redirect: a taken branch or a jump in EX; IF/ID and ID/EX are flushed.
//   3. load-use: the instruction in ID needs the result of a load in EX;
//      PC and IF/ID hold and a bubble enters ID/EX.
// The stall-and-freeze behaviour follows the architecture; redirect and
// load-use handling are the usual MIPS choices of this design.
module pipeline_controller (
  input  logic       ci_stall,
  input  logic       redirect,
  input  logic       id_valid,
  input  logic       id_uses_rs,
  input  logic       id_uses_rt,
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  input  logic       ex_valid,
  input  logic       ex_mem_read,
  input  logic [4:0] ex_dest,
  output logic       pc_en,
  output logic       ifid_en,
  output logic       ifid_flush,
  output logic       idex_en,
  output logic       idex_flush,
  output logic       exmem_bubble,
  output logic       cfu_freeze,
  output logic       load_use
);
  assign load_use = id_valid && ex_valid && ex_mem_read && ex_dest != 5'd0 &&
                    ((id_uses_rs && id_rs == ex_dest) ||
                     (id_uses_rt && id_rt == ex_dest));

  always_comb begin
    pc_en        = 1'b1;
    ifid_en      = 1'b1;
    ifid_flush   = 1'b0;
    idex_en      = 1'b1;
    idex_flush   = 1'b0;
    exmem_bubble = 1'b0;
    cfu_freeze   = 1'b0;
    if (ci_stall) begin
      pc_en        = 1'b0;
      ifid_en      = 1'b0;
      idex_en      = 1'b0;
      exmem_bubble = 1'b1;
      cfu_freeze   = 1'b1;
    end else if (redirect) begin
      ifid_flush   = 1'b1;
      idex_flush   = 1'b1;
    end else if (load_use) begin
      pc_en        = 1'b0;
      ifid_en      = 1'b0;
      idex_flush   = 1'b1;
    end
  end
endmodule
