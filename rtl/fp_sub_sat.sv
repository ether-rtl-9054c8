// fp_sub_sat: saturating Q9.7 subtractor.
//
// y = a - b, computed on 17 bits and clamped to the Q9.7 range, with `ovf`
// set when clamping happened. Purely combinational. Used for the innovation
// (measurement minus prediction) and the covariance update.
//
// Saturating Q9.7 subtraction is as specified; the overflow flag is an
// addition of this design.
module fp_sub_sat
  import ether_pkg::*;
(
  input  q97_t a,
  input  q97_t b,
  output q97_t y,
  output logic ovf
);
  logic signed [16:0] d;
  always_comb begin
    d   = 17'(a) - 17'(b);
    ovf = (d > 17'sd32767) || (d < -17'sd32768);
    y   = sat16(34'(d));
  end
endmodule
