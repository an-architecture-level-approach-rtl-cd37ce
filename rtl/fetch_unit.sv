// fetch_unit: program counter of the IF stage.
//
// The PC resets to 0 and advances by 4 each cycle that `en` is high.  A
// redirect from EX (taken branch or jump) loads `target` instead and takes
// priority over a hold, since a redirect never coincides with a stall.  The
// stall input comes from the pipeline controller: a load-use hazard or the
// one extra cycle a slow custom instruction (CI) is given.  Branch handling in
// EX is this design's choice.
module fetch_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        redirect,
  input  logic [31:0] target,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= '0;
    else if (redirect) pc <= target;
    else if (en)       pc <= pc_plus4;
  end
endmodule
