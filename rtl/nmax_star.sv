// nmax_star: simplified n-input max* operator.
//
// Approximates max*(x1..xN) = log(sum exp(xi)) by
//   z = y1 + f_c(y1 - y2),  f_c = 3/8 if y1 - y2 < 2.0, else 0,
// where y1 and y2 are the first and second maxima. The n-MVG tree delivers
// y1, y2 and the correction flag c0; the correction constant 3/8 is
// binary 0...0.011, i.e. the p-bit word {0, .., 0, c0, c0}, and one adder
// forms z. All values are p-bit two's complement with 3 fractional bits;
// the sum wraps modulo 2^p, as wrapped (modulo-normalised) metrics expect.
// Purely combinational.
//
// The formula, the constant and the adder follow the published algorithm;
// wrap-around on overflow is this design's choice.
module nmax_star
  import maxstar_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [P-1:0] x [N],
  output logic [P-1:0] z,
  output logic [P-1:0] y1,
  output logic [P-1:0] y2,
  output logic         c0
);

  nmvg #(.N(N), .P(P)) u_nmvg (.x(x), .y1(y1), .y2(y2), .c0(c0));

  // correction word 0...0.011 = {0, .., 0, c0, c0}
  assign z = y1 + (c0 ? P'(CORR_LSB) : '0);

endmodule
