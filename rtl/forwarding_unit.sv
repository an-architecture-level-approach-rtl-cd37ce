// forwarding_unit: operand bypass selection for the EX stage.
//
// Combinational.  For each EX source register (rs, rt) it picks the newest
// producer: the instruction in EX/MEM, else the one in MEM/WB, else the value
// read in ID.  Register 0 is never forwarded.  While a slow custom
// instruction spends its extra cycle in EX (`freeze`), forwarding is switched
// off: the operands were already captured into the ID/EX registers, which
// are the CFU's held inputs.  Classic MIPS forwarding; the freeze input
// follows the architecture's rule that the CFU inputs stay fixed during the
// extra cycle.
module forwarding_unit
  import ep_pkg::*;
(
  input  logic       freeze,
  input  logic [4:0] ex_rs,
  input  logic [4:0] ex_rt,
  input  logic       exmem_reg_write,
  input  logic [4:0] exmem_dest,
  input  logic       memwb_reg_write,
  input  logic [4:0] memwb_dest,
  output fwd_sel_t   fwd_a,
  output fwd_sel_t   fwd_b
);
  function automatic fwd_sel_t pick(input logic [4:0] src);
    if (freeze || src == 5'd0)                       return FWD_NONE;
    else if (exmem_reg_write && exmem_dest == src)   return FWD_EXMEM;
    else if (memwb_reg_write && memwb_dest == src)   return FWD_MEMWB;
    else                                             return FWD_NONE;
  endfunction

  assign fwd_a = pick(ex_rs);
  assign fwd_b = pick(ex_rt);
endmodule
