// apo_unit: a posteriori (APO) unit of a binary MAP (Log-MAP) decoder
// built around the simplified n-input max*.
//
// For one trellis step it computes
//   Lapo = max*_{u=1}(alpha(s') + gamma(u,c) + beta(s))
//        - max*_{u=0}(alpha(s') + gamma(u,c) + beta(s))
// over the NS transitions s' -> s of each input value u, and from it the
// extrinsic output Le = sat(sc * (Lapo - La - Ls)).
//   * Branch metrics use the 0/1 form gamma(u,c) = u*(La+Ls) + c*Lp, so
//     only three sums are needed (La+Ls, Lp, La+Ls+Lp).
//   * Each of the 2*NS transition metrics is one three-operand sum; the
//     trellis (next state s and parity c for every s', u) is fixed at
//     elaboration from the RSC polynomials GFB/GFF, default 23/33 octal
//     with MEM = 4 (the 16-state CCSDS component code).
//   * Two nmax_star instances, n = NS, give the max* of the u = 1 and u = 0
//     sets, and one subtractor gives Lapo.
// State metrics are wrapped (modulo 2^P), so all sums and the final
// difference are taken modulo 2^P; this is exact while the true spread of
// the metrics is below 2^(P-1). Metrics are P-bit and the LLRs exchanged
// with the channel and the other decoder (La, Ls, Lp, Le) W-bit, both two's
// complement with 3 fractional bits; the LLR inputs are sign-extended to P
// bits and the extrinsic output is saturated back to W bits.
//
// Timing: the datapath is combinational up to one output register; a
// result appears one clock after in_valid (out_valid), one step per cycle.
// rst_n is asynchronous and active low and clears all outputs.
//
// The operation list (metric additions, two n-input max* operations, one
// subtraction), the code and the scaling factor follow the published
// design; the branch-metric form, the single register stage and the reset
// are choices of this design.
module apo_unit
  import maxstar_pkg::*;
#(
  parameter int unsigned NS      = 16,
  parameter int unsigned MEM     = 4,
  parameter int unsigned GFB     = 'o23,
  parameter int unsigned GFF     = 'o33,
  parameter int unsigned P       = 16,
  parameter int unsigned W       = 10,
  parameter int unsigned SC_NUM  = 205,
  parameter int unsigned SC_FRAC = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [P-1:0] alpha [NS],
  input  logic [P-1:0] beta  [NS],
  input  logic [W-1:0] l_a,
  input  logic [W-1:0] l_s,
  input  logic [W-1:0] l_p,
  output logic         out_valid,
  output logic [P-1:0] l_apo,
  output logic [W-1:0] l_ext,
  output logic         c0_one,
  output logic         c0_zero,
  output logic         ext_sat
);

  initial assert (NS == (1 << MEM)) else $error("apo_unit: NS must be 2**MEM");

  // W-bit LLRs sign-extended to the metric width
  logic [P-1:0] la_x, ls_x, lp_x;
  assign la_x = P'($signed(l_a));
  assign ls_x = P'($signed(l_s));
  assign lp_x = P'($signed(l_p));

  // gamma indexed by {u, c}
  logic [P-1:0] gamma [4];
  always_comb begin
    gamma[0] = '0;
    gamma[1] = lp_x;
    gamma[2] = la_x + ls_x;
    gamma[3] = la_x + ls_x + lp_x;
  end

  // transition metrics, indexed by the starting state s'
  logic [P-1:0] m_one  [NS];
  logic [P-1:0] m_zero [NS];

  for (genvar sp = 0; sp < NS; sp++) begin : g_trans
    localparam int unsigned NX0 = rsc_next_state(sp, 1'b0, MEM, GFB);
    localparam int unsigned NX1 = rsc_next_state(sp, 1'b1, MEM, GFB);
    localparam int unsigned C0  = int'(rsc_parity(sp, 1'b0, MEM, GFB, GFF));
    localparam int unsigned C1  = int'(rsc_parity(sp, 1'b1, MEM, GFB, GFF));
    assign m_zero[sp] = alpha[sp] + gamma[C0]     + beta[NX0];
    assign m_one[sp]  = alpha[sp] + gamma[2 + C1] + beta[NX1];
  end

  logic [P-1:0] z_one, z_zero;
  logic [P-1:0] y1_one_unused, y2_one_unused, y1_zero_unused, y2_zero_unused;
  logic         c0_one_d, c0_zero_d;

  nmax_star #(.N(NS), .P(P)) u_max_one (
    .x(m_one), .z(z_one), .y1(y1_one_unused), .y2(y2_one_unused), .c0(c0_one_d));
  nmax_star #(.N(NS), .P(P)) u_max_zero (
    .x(m_zero), .z(z_zero), .y1(y1_zero_unused), .y2(y2_zero_unused), .c0(c0_zero_d));

  logic [P-1:0] l_apo_d;
  logic [W-1:0] l_ext_d;
  logic         sat_d;

  assign l_apo_d = z_one - z_zero;

  extrinsic_unit #(.P(P), .W(W), .SC_NUM(SC_NUM), .SC_FRAC(SC_FRAC)) u_ext (
    .l_apo(l_apo_d), .l_a(l_a), .l_s(l_s), .l_ext(l_ext_d), .sat(sat_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      l_apo     <= '0;
      l_ext     <= '0;
      c0_one    <= 1'b0;
      c0_zero   <= 1'b0;
      ext_sat   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        l_apo   <= l_apo_d;
        l_ext   <= l_ext_d;
        c0_one  <= c0_one_d;
        c0_zero <= c0_zero_d;
        ext_sat <= sat_d;
      end
    end
  end

endmodule
