// ci_checker: test-time checker of custom-instruction (CI) outputs.
//
// When a CI leaves EX (`cap_valid`), the checker stores its selected output
// (A) and its op-code.  When a CHK instruction is in EX (`chk_valid`), it
// compares A with the expected value read from a register (B, `expected`).
// On a mismatch it pulses `upd_valid` for one cycle with the stored op-code,
// telling the CI controller to add that CI to its LUT of two-cycle CIs.
// A CHK with no CI executed since reset does nothing.  Timing: capture and
// compare are both in the EX cycle; the LUT update is registered and visible
// to the controller's look-up from the next cycle.  Comparing a stored
// output is this design's way of relating CHK to the CI before it.
module ci_checker #(
  parameter int XLEN = ep_pkg::WORD_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cap_valid,
  input  logic [5:0]      cap_ci,
  input  logic [XLEN-1:0] cap_value,
  input  logic            chk_valid,
  input  logic [XLEN-1:0] expected,
  output logic            upd_valid,
  output logic [5:0]      upd_ci,
  output logic            chk_pass,
  output logic            chk_fail
);
  logic            a_valid;
  logic [XLEN-1:0] a_value;
  logic [5:0]      a_ci;

  assign chk_fail = chk_valid && a_valid && (a_value != expected);
  assign chk_pass = chk_valid && a_valid && (a_value == expected);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid   <= 1'b0;
      a_value   <= '0;
      a_ci      <= '0;
      upd_valid <= 1'b0;
      upd_ci    <= '0;
    end else begin
      if (cap_valid) begin
        a_valid <= 1'b1;
        a_value <= cap_value;
        a_ci    <= cap_ci;
      end
      upd_valid <= chk_fail;
      if (chk_fail) upd_ci <= a_ci;
    end
  end
endmodule
