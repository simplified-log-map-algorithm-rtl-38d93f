// mvg2: two-input maximum-value generator (2-MVG), the leaf of the n-MVG
// tree.
//
// Returns both ordered values of A and B, y1 = max and y2 = min, together
// with the correction flag c0 = 1 when y1 - y2 < 2.0. It is an MVU (which
// gives y1, the sign s of A - B and c0) plus the second multiplexer
// y2 = s ? A : B. Purely combinational; p-bit two's-complement operands
// compared modulo 2^p as in the MVU.
module mvg2 #(
  parameter int unsigned P = 16
) (
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  output logic [P-1:0] y1,
  output logic [P-1:0] y2,
  output logic         c0
);

  logic s;

  mvu #(.P(P)) u_mvu (.a(a), .b(b), .y1(y1), .s(s), .c0(c0));

  assign y2 = s ? a : b;

endmodule
