// pipeline_controller_tb: drives every combination of CI stall, redirect and
// random hazard inputs and checks the hold/flush/bubble/freeze outputs
// against the priority CI stall > redirect > load-use.
module pipeline_controller_tb;
  logic ci_stall, redirect, id_valid, id_uses_rs, id_uses_rt, ex_valid, ex_mem_read;
  logic [4:0] id_rs, id_rt, ex_dest;
  logic pc_en, ifid_en, ifid_flush, idex_en, idex_flush, exmem_bubble, cfu_freeze, load_use;
  logic lu;
  logic [7:0] got, exp;
  int checks = 0, failures = 0;

  pipeline_controller dut (.*);

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      {ci_stall, redirect} = 2'($urandom);
      {id_valid, id_uses_rs, id_uses_rt, ex_valid, ex_mem_read} = 5'($urandom);
      id_rs = 5'($urandom_range(0, 2)); id_rt = 5'($urandom_range(0, 2));
      ex_dest = 5'($urandom_range(0, 2));
      #1;
      lu = id_valid & ex_valid & ex_mem_read & (ex_dest != 0) &
           ((id_uses_rs & (id_rs == ex_dest)) | (id_uses_rt & (id_rt == ex_dest)));
      // {pc_en, ifid_en, ifid_flush, idex_en, idex_flush, exmem_bubble, cfu_freeze, load_use}
      if (ci_stall)      exp = {7'b0000011, lu};
      else if (redirect) exp = {7'b1111100, lu};
      else if (lu)       exp = {7'b0001100, lu};
      else               exp = {7'b1101000, lu};
      got = {pc_en, ifid_en, ifid_flush, idex_en, idex_flush, exmem_bubble, cfu_freeze, load_use};
      checks++;
      if (got !== exp) begin failures++; $display("FAIL got %b exp %b", got, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
