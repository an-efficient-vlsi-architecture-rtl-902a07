// bicubic_coeff_gen: interpolation coefficient generator. For the fractional
// distance a (0 <= a < 1, FRAC fraction bits) of the wanted sample past pixel
// l it produces the weights of pixels l-1, l, l+1, l+2:
//   t1 = -a (1-a)^2,  t2 = 1 - 2a^2 + a^3,  t3 = a (1 + a - a^2),  t4 = a^2 (a-1)
// a cubic kernel whose four weights sum to one (a = 0 gives 0,1,0,0 and
// a = 1/2 gives -1/8, 5/8, 5/8, -1/8). Weights are signed, FRAC fraction
// bits; every product is truncated back to FRAC bits. These polynomials are
// those of the described interpolator; the fixed-point format is this
// design's choice. Combinational.
module bicubic_coeff_gen
  import srd_pkg::*;
#(
  parameter int unsigned FRAC = COEF_FRAC
) (
  input  logic [FRAC-1:0] phase,
  output coef_t           t [4]
);

  localparam int ONE = 1 << FRAC;

  logic signed [31:0] a, a2, a3, om, om2;

  always_comb begin
    a   = 32'(phase);
    a2  = (a * a) >>> FRAC;
    a3  = (a2 * a) >>> FRAC;
    om  = ONE - a;
    om2 = (om * om) >>> FRAC;
    t[0] = COEF_W'(-((a * om2) >>> FRAC));
    t[1] = COEF_W'(ONE - 2 * a2 + a3);
    t[2] = COEF_W'((a * (ONE + a - a2)) >>> FRAC);
    t[3] = COEF_W'(-((a2 * om) >>> FRAC));
  end

endmodule
