// ep_tb_pkg: test bench helpers for the extensible processor.
//
// Instruction encoders (a tiny assembler for the MIPS-like base set plus the
// CI and CHK extensions) and a reference model of the eight example custom
// instructions, written independently of the CFU RTL.
package ep_tb_pkg;
  import ep_pkg::*;

  function automatic logic [31:0] asm_r(logic [5:0] f, logic [4:0] rd, logic [4:0] rs,
                                        logic [4:0] rt, logic [4:0] sh = 5'd0);
    return {OP_RTYPE, rs, rt, rd, sh, f};
  endfunction

  function automatic logic [31:0] asm_i(logic [5:0] op, logic [4:0] rt, logic [4:0] rs,
                                        logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] asm_j(logic [25:0] idx);
    return {OP_J, idx};
  endfunction

  function automatic logic [31:0] asm_ci(int ci, logic [4:0] rd, logic [4:0] rs,
                                         logic [4:0] rt, int osel);
    return {OP_CI, rs, rt, rd, 4'b0000, 1'(osel), 6'(ci)};
  endfunction

  function automatic logic [31:0] asm_chk(logic [4:0] rs);
    return {OP_CHK, rs, 21'd0};
  endfunction

  // reference model of the example CIs
  function automatic logic [31:0] ref_ci(int ci, int osel, logic [31:0] a, logic [31:0] b);
    int unsigned pa, pb;
    int          s;
    bit          o1;
    logic [31:0] rot, bs;
    pa = $countones(a);
    pb = $countones(b);
    rot = (b[4:0] == 0) ? a : ((a << b[4:0]) | (a >> (32 - b[4:0])));
    bs  = {a[7:0], a[15:8], a[23:16], a[31:24]};
    s   = int'($signed(a[15:0])) + int'($signed(b[15:0]));
    o1  = (osel != 0);
    case (ci % 8)
      0: return o1 ? a + b : ((a + b) ^ {3'b000, a[31:3]});
      1: return o1 ? pa : pa + pb;
      2: return o1 ? rot : rot + b;
      3: if (o1) return ($signed(a) < $signed(b)) ? 1 : 0;
         else      return ($signed(a) > $signed(b)) ? a - b : b - a;
      4: if (o1) return (s > 32767 || s < -32768) ? 1 : 0;
         else      return (s > 32767) ? 32'd32767 : (s < -32768) ? 32'hFFFF_8000 : 32'(s);
      5: return o1 ? a ^ b : ({a[30:0], 1'b0} ^ b ^ {1'b0, b[31:1]});
      6: return o1 ? bs : bs ^ b;
      default: return o1 ? a - {2'b00, b[31:2]} : a + b * 10;
    endcase
  endfunction
endpackage
