// nmvg: n-input maximum-value generator (n-MVG) that also produces the
// max* correction flag.
//
// Finds the first maximum y1 and the second maximum y2 of N p-bit inputs
// (y2 = y1 when the maximum occurs twice) and c0 = 1 when y1 - y2 < 2.0
// (three fractional bits). The architecture is recursive: an N-MVG is two
// N/2-MVGs whose results are combined by an mvg_merge stage (three MVUs,
// the y2 multiplexer and the c0 multiplexers), ending in 2-MVGs. Here the
// recursion is unrolled level by level, which gives the same hardware:
// level 0 holds N/2 2-MVGs on the input pairs (x[2g], x[2g+1]); level l
// holds N/2^(l+1) merge stages, each combining groups 2g and 2g+1 of level
// l-1. The last level's single result is the output. Inputs x[0 .. N/2-1]
// form the first half of every split, as in the recursive form.
//
// Purely combinational, log2(N) MVU delays deep. N must be a power of two
// of at least 2; values are compared modulo 2^p (see mvu).
module nmvg #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [P-1:0] x [N],
  output logic [P-1:0] y1,
  output logic [P-1:0] y2,
  output logic         c0
);

  localparam int unsigned LEVELS = $clog2(N);

  initial assert (N >= 2 && (N & (N - 1)) == 0)
    else $error("nmvg: N must be a power of two >= 2");

  // Each level keeps its own result arrays (one entry per group), so the
  // levels form a strict feed-forward chain.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned GROUPS = N >> (l + 1);
    logic [P-1:0] gy1 [GROUPS];
    logic [P-1:0] gy2 [GROUPS];
    logic         gc0 [GROUPS];
    for (genvar g = 0; g < GROUPS; g++) begin : g_group
      if (l == 0) begin : g_leaf
        mvg2 #(.P(P)) u_mvg2 (
          .a(x[2*g]), .b(x[2*g+1]),
          .y1(gy1[g]), .y2(gy2[g]), .c0(gc0[g]));
      end else begin : g_merge
        mvg_merge #(.P(P)) u_merge (
          .y1a(g_level[l-1].gy1[2*g]),   .y2a(g_level[l-1].gy2[2*g]),
          .c0a(g_level[l-1].gc0[2*g]),
          .y1b(g_level[l-1].gy1[2*g+1]), .y2b(g_level[l-1].gy2[2*g+1]),
          .c0b(g_level[l-1].gc0[2*g+1]),
          .y1(gy1[g]), .y2(gy2[g]), .c0(gc0[g]));
      end
    end
  end

  assign y1 = g_level[LEVELS-1].gy1[0];
  assign y2 = g_level[LEVELS-1].gy2[0];
  assign c0 = g_level[LEVELS-1].gc0[0];

endmodule
