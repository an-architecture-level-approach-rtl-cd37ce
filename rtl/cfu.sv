// cfu: Custom Functional Unit executing the custom instructions (CIs).
//
// Sits in the EX stage beside the ALU.  Each CI takes the two register
// operands a and b and produces NUM_OUT result words; `ci_num` selects the CI.
// The unit is combinational.  The CIs of an extensible processor come from
// the application's hot spots; the eight here are this design's own examples
// of multi-operation CIs of the kinds found in packet, hashing, bit-counting
// and ADPCM-style code.  CI numbers 8 and up repeat the table modulo 8;
// numbers from NUM_CI up produce zero.
//
//   CI  out[0]                          out[1]
//   0   (a + b) ^ (a >> 3)              a + b
//   1   popcount(a) + popcount(b)       popcount(a)
//   2   rotl(a, b[4:0]) + b             rotl(a, b[4:0])
//   3   |a - b| (signed)                a < b (signed)
//   4   sat16(a[15:0] + b[15:0])        1 if the 16-bit sum saturated
//   5   (a << 1) ^ b ^ (b >> 1)         a ^ b
//   6   byteswap(a) ^ b                 byteswap(a)
//   7   a + 10 * b  (shift-add)         a - (b >> 2)
//
// Whether a CI finishes within one clock period is a property of the
// manufactured chip, not of this logic: a CI listed in the CI controller's
// LUT is simply given a second cycle with its inputs held stable.
module cfu #(
  parameter int XLEN    = ep_pkg::WORD_W,
  parameter int NUM_CI  = 8,
  parameter int NUM_OUT = 2
) (
  input  logic [5:0]                    ci_num,
  input  logic [XLEN-1:0]               a,
  input  logic [XLEN-1:0]               b,
  output logic [NUM_OUT-1:0][XLEN-1:0]  out
);
  function automatic logic [XLEN-1:0] popcnt(input logic [XLEN-1:0] v);
    logic [XLEN-1:0] c;
    c = '0;
    for (int i = 0; i < XLEN; i++) c = c + XLEN'(v[i]);
    return c;
  endfunction

  logic [XLEN-1:0]   rot, diff, bswap;
  logic signed [16:0] s16;
  logic [XLEN-1:0]   sat;
  logic              satd;
  logic [2:0]        sel;

  assign sel  = ci_num[2:0];
  assign rot  = (a << b[4:0]) | (a >> (5'd0 - b[4:0]));
  assign diff = ($signed(a) < $signed(b)) ? (b - a) : (a - b);

  always_comb begin
    for (int i = 0; i < XLEN / 8; i++) bswap[8*i +: 8] = a[XLEN-8-8*i +: 8];
  end

  always_comb begin
    s16  = 17'($signed(a[15:0])) + 17'($signed(b[15:0]));
    satd = 1'b0;
    sat  = XLEN'($signed(s16));
    if (s16 > 17'sd32767)       begin sat = XLEN'(32'sd32767);  satd = 1'b1; end
    else if (s16 < -17'sd32768) begin sat = XLEN'(-32'sd32768); satd = 1'b1; end
  end

  logic [XLEN-1:0] r0, r1;
  always_comb begin
    unique case (sel)
      3'd0: begin r0 = (a + b) ^ (a >> 3);         r1 = a + b;                          end
      3'd1: begin r0 = popcnt(a) + popcnt(b);      r1 = popcnt(a);                      end
      3'd2: begin r0 = rot + b;                    r1 = rot;                            end
      3'd3: begin r0 = diff;                       r1 = XLEN'($signed(a) < $signed(b)); end
      3'd4: begin r0 = sat;                        r1 = XLEN'(satd);                    end
      3'd5: begin r0 = (a << 1) ^ b ^ (b >> 1);    r1 = a ^ b;                          end
      3'd6: begin r0 = bswap ^ b;                  r1 = bswap;                          end
      default: begin r0 = a + (b << 1) + (b << 3); r1 = a - (b >> 2);                   end
    endcase
  end

  always_comb begin
    out = '0;
    if (int'(ci_num) < NUM_CI) begin
      out[0] = r0;
      if (NUM_OUT > 1) out[NUM_OUT > 1 ? 1 : 0] = r1;
    end
  end

  initial assert (NUM_CI <= 64) else $error("cfu: CI op-code is 6 bits");
endmodule
