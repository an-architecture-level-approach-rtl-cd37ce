// ci_controller: look-up table (LUT) of two-cycle custom instructions and the
// stall command.
//
// The LUT holds one bit per CI op-code (NUM_CI entries); it is cleared by
// reset and filled at test time by the checker (`upd_valid`, `upd_ci`).
// Every fetched instruction is looked up: `if_slow` is high when it is a CI
// whose op-code is in the LUT, and this flag travels down the pipeline with
// the instruction.  When such a CI is in EX for its first cycle, `stall_cmd`
// asks the pipeline controller for one extra cycle; `extra_cycle` is high
// during that second cycle, after which the CI completes.  The LUT and the
// fetch-time look-up follow the architecture; one bit per op-code is this
// design's choice of LUT organisation.
module ci_controller
  import ep_pkg::*;
#(
  parameter int NUM_CI = 8,
  localparam int IW    = (NUM_CI > 1) ? $clog2(NUM_CI) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       if_instr,
  output logic              if_slow,
  input  logic              ex_valid,
  input  logic              ex_is_ci,
  input  logic              ex_slow,
  output logic              stall_cmd,
  output logic              extra_cycle,
  input  logic              upd_valid,
  input  logic [5:0]        upd_ci,
  output logic [NUM_CI-1:0] lut
);
  logic [IW-1:0] if_idx;
  assign if_idx  = if_instr[IW-1:0];
  assign if_slow = (if_instr[31:26] == OP_CI) &&
                   (int'(if_instr[5:0]) < NUM_CI) && lut[if_idx];

  assign stall_cmd = ex_valid && ex_is_ci && ex_slow && !extra_cycle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lut         <= '0;
      extra_cycle <= 1'b0;
    end else begin
      extra_cycle <= stall_cmd;
      if (upd_valid && int'(upd_ci) < NUM_CI) lut[upd_ci[IW-1:0]] <= 1'b1;
    end
  end

  // The extra cycle lasts exactly one clock.
  assert property (@(posedge clk) disable iff (!rst_n) extra_cycle |-> !stall_cmd);
endmodule
