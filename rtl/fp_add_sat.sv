// fp_add_sat: saturating Q9.7 adder.
//
// y = a + b, computed on 17 bits; if the true sum leaves the 16-bit signed
// range the result is clamped to +255.99 or -256.0 and `ovf` is raised.
// Purely combinational. Saturation instead of wrap-around is what the filter
// datapath calls for; the `ovf` flag is an addition of this design.
module fp_add_sat
  import ether_pkg::*;
(
  input  q97_t a,
  input  q97_t b,
  output q97_t y,
  output logic ovf
);
  logic signed [16:0] s;
  always_comb begin
    s   = 17'(a) + 17'(b);
    ovf = (s > 17'sd32767) || (s < -17'sd32768);
    y   = sat16(34'(s));
  end
endmodule
