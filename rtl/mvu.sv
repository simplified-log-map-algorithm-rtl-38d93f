// mvu: maximum-value unit with embedded max* correction bit.
//
// Compares two p-bit metrics A and B. The difference d = A - B is formed
// modulo 2^p and its MSB is the sign s, so metrics that wrap around (modulo
// normalisation of state metrics) still compare correctly as long as their
// true spread is below 2^(p-1). y1 = s ? B : A is the larger value (A on a
// tie). c0 is the correction flag of the simplified max*: with delta = |d|,
// c0 = NOR(delta[p-2 : 4]), i.e. 1 exactly when delta < 2.0 with three
// fractional bits. Purely combinational.
//
// The mux, the sign output and the (p-5)-input NOR follow the published
// architecture. Reading the NOR from the magnitude |d| rather than from d
// itself is a choice of this design: it keeps c0 exact when B > A, which is
// the case delta = y1 - y2 >= 0 the correction formula is written for.
module mvu
  import maxstar_pkg::*;
#(
  parameter int unsigned P = 16
) (
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  output logic [P-1:0] y1,
  output logic         s,
  output logic         c0
);

  logic [P-1:0] d;
  logic [P-1:0] delta;

  always_comb begin
    d     = a - b;
    s     = d[P-1];
    y1    = s ? b : a;
    delta = s ? (~d + 1'b1) : d;
    c0    = ~|delta[P-2:M_FRAC+1];
  end

  initial assert (P >= M_FRAC + 3) else $error("mvu: P must be at least %0d", M_FRAC + 3);

endmodule
