// mvg_merge: combining stage of the n-MVG tree.
//
// Takes the results of two sub-trees, (y1a, y2a, c0a) and (y1b, y2b, c0b),
// each a first maximum, second maximum and correction flag of its own
// inputs, and returns the same triple for the union of both input sets.
// Three MVUs compare
//   MVU1: y1a vs y1b  -> y1 and the select s
//   MVU2: y1a vs y2b  -> larger value is y2 when s = 1
//   MVU3: y2a vs y1b  -> larger value is y2 when s = 0
// and y2 = s ? MVU2.y1 : MVU3.y1. The correction flag needs no subtractor
// of its own; it is chosen among flags that already exist, by the same
// selects (the gray-shaded multiplexer group of the architecture):
//   s = 0: c0 = MVU3.s ? MVU1.c0 : c0a   (y2 is y1b, or y2a)
//   s = 1: c0 = MVU2.s ? c0b : MVU1.c0   (y2 is y2b, or y1a)
// Purely combinational: one MVU delay plus two multiplexers.
//
// Three MVUs, the y2 multiplexer and the three c0 multiplexers follow the
// published architecture; the exact operand-to-pin assignment is this
// design's, chosen so that y1, y2 and c0 are exact.
module mvg_merge #(
  parameter int unsigned P = 16
) (
  input  logic [P-1:0] y1a,
  input  logic [P-1:0] y2a,
  input  logic         c0a,
  input  logic [P-1:0] y1b,
  input  logic [P-1:0] y2b,
  input  logic         c0b,
  output logic [P-1:0] y1,
  output logic [P-1:0] y2,
  output logic         c0
);

  logic [P-1:0] m2_y1, m3_y1;
  logic         s1, s2, s3;
  logic         m1_c0, m2_c0, m3_c0;

  mvu #(.P(P)) u_mvu1 (.a(y1a), .b(y1b), .y1(y1),    .s(s1), .c0(m1_c0));
  mvu #(.P(P)) u_mvu2 (.a(y1a), .b(y2b), .y1(m2_y1), .s(s2), .c0(m2_c0));
  mvu #(.P(P)) u_mvu3 (.a(y2a), .b(y1b), .y1(m3_y1), .s(s3), .c0(m3_c0));

  // MVU2/MVU3 correction flags are not needed: their deltas are never y1 - y2.
  always_comb begin
    y2 = s1 ? m2_y1 : m3_y1;
    if (s1) c0 = s2 ? c0b : m1_c0;
    else    c0 = s3 ? m1_c0 : c0a;
  end

endmodule
