// forwarding_unit_tb: random producer/consumer register numbers; checks the
// priority EX/MEM over MEM/WB over none, that r0 is never forwarded and that
// freeze turns forwarding off.
module forwarding_unit_tb;
  import ep_pkg::*;
  logic freeze, exmem_reg_write, memwb_reg_write;
  logic [4:0] ex_rs, ex_rt, exmem_dest, memwb_dest;
  fwd_sel_t fwd_a, fwd_b;
  int checks = 0, failures = 0;

  forwarding_unit dut (.*);

  function automatic fwd_sel_t model(logic [4:0] r);
    if (freeze || r == 0) return FWD_NONE;
    if (exmem_reg_write && exmem_dest == r) return FWD_EXMEM;
    if (memwb_reg_write && memwb_dest == r) return FWD_MEMWB;
    return FWD_NONE;
  endfunction

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      freeze = ($urandom_range(0, 7) == 0);
      exmem_reg_write = 1'($urandom_range(0, 1)); memwb_reg_write = 1'($urandom_range(0, 1));
      ex_rs = 5'($urandom_range(0, 3)); ex_rt = 5'($urandom_range(0, 3));
      exmem_dest = 5'($urandom_range(0, 3)); memwb_dest = 5'($urandom_range(0, 3));
      #1; checks += 2;
      if (fwd_a !== model(ex_rs)) begin failures++; $display("FAIL a"); end
      if (fwd_b !== model(ex_rt)) begin failures++; $display("FAIL b"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
