// fp_multiply: Q9.7 x Q9.7 multiplier.
//
// The 16x16 signed product is a 32-bit Q18.14 value; shifting it right by 7
// bits (arithmetic shift, i.e. rounding toward minus infinity) gives Q9.7,
// which is then saturated to the 16-bit range and flagged in `ovf`.
// Combinational; on an FPGA the product maps onto one DSP multiplier.
//
// The 32-bit product, the shift by 7 and the saturation are as specified;
// truncation toward minus infinity (no rounding) is this design's choice.
module fp_multiply
  import ether_pkg::*;
(
  input  q97_t a,
  input  q97_t b,
  output q97_t y,
  output logic ovf
);
  logic signed [31:0] prod;
  logic signed [24:0] shifted;
  always_comb begin
    prod    = 32'(a) * 32'(b);
    shifted = 25'(prod >>> FRAC_BITS);
    ovf     = (shifted > 25'sd32767) || (shifted < -25'sd32768);
    y       = sat16(34'(shifted));
  end
endmodule
