// output_selector: chooses which CFU output port of a custom instruction
// (CI) is passed on.
//
// Combinational.  A CI may drive several CFU output ports, but the register
// file has one write port, so each CI instruction names one port (`osel`).
// The selected word is what EX hands to write-back and what the checker
// compares at test time, so each output of a CI is tested by its own CI/CHK
// pair.  An out-of-range port index selects port 0.  The block's place in
// the architecture is given; the one-port-per-instruction encoding is this
// design's choice.
module output_selector #(
  parameter int XLEN    = ep_pkg::WORD_W,
  parameter int NUM_OUT = 2,
  localparam int SW     = (NUM_OUT > 1) ? $clog2(NUM_OUT) : 1
) (
  input  logic                          is_ci,
  input  logic [SW-1:0]                 osel,
  input  logic [NUM_OUT-1:0][XLEN-1:0]  cfu_out,
  output logic [XLEN-1:0]               y
);
  always_comb begin
    y = '0;
    if (is_ci) y = (int'(osel) < NUM_OUT) ? cfu_out[osel] : cfu_out[0];
  end
endmodule
