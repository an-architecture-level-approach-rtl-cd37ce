// data_mem_tb: random stores and loads against a shadow copy, checked on
// both the load port and the debug port; a store is visible after its edge.
module data_mem_tb;
  localparam int DEPTH = 1024;
  logic clk = 0, we = 0;
  logic [9:0] addr = 0, dbg_addr = 0;
  logic [31:0] wdata = 0, rdata, dbg_rdata;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  data_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = 10'(i); wdata = $urandom; shadow[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); addr = 10'($urandom); wdata = $urandom;
      dbg_addr = 10'($urandom);
      #1; checks += 2;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL load @%0d", addr); end
      if (dbg_rdata !== shadow[dbg_addr]) begin failures++; $display("FAIL dbg @%0d", dbg_addr); end
      @(posedge clk); if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
