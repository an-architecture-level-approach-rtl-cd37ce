// inst_mem_tb: loads random words through the write port and reads every
// word back through the fetch port.
module inst_mem_tb;
  localparam int DEPTH = 1024;
  logic clk = 0, we = 0;
  logic [9:0] waddr = 0, addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  inst_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      addr = 10'(i); #1; checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL @%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
