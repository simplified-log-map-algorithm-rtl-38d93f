// extrinsic_unit: extrinsic information of one trellis step.
//
// Le = sat( sc * (Lapo - La - Ls) ). The two subtractions are done in P+2
// bits so they cannot overflow, the difference is multiplied by the
// constant scaling factor sc = SC_NUM / 2^SC_FRAC (default 205/256 = 0.80,
// the factor found best for the simplified max* on a binary turbo code)
// and shifted back with an arithmetic shift (rounding toward minus
// infinity), and the result is saturated to the W-bit range of the LLRs
// exchanged between the component decoders (W <= P). `sat` flags a
// clipped result. Purely combinational.
//
// Extended-width subtraction, constant scaling and saturation follow the
// published decoder description; the guard-bit count, the rounding and the
// LLR width W are choices of this design.
module extrinsic_unit #(
  parameter int unsigned P       = 16,
  parameter int unsigned W       = 10,
  parameter int unsigned SC_NUM  = 205,
  parameter int unsigned SC_FRAC = 8
) (
  input  logic signed [P-1:0] l_apo,
  input  logic signed [W-1:0] l_a,
  input  logic signed [W-1:0] l_s,
  output logic signed [W-1:0] l_ext,
  output logic                sat
);

  localparam int unsigned WD = P + 2;            // difference width
  localparam int unsigned WS = WD + SC_FRAC + 2; // product width
  localparam logic signed [WS-1:0] MAXV = WS'(2 ** (W - 1) - 1);
  localparam logic signed [WS-1:0] MINV = -WS'(2 ** (W - 1));

  logic signed [WD-1:0] diff;
  logic signed [WS-1:0] prod;
  logic signed [WS-1:0] scaled;

  initial assert (W <= P) else $error("extrinsic_unit: W must not exceed P");

  always_comb begin
    diff   = WD'(l_apo) - WD'(l_a) - WD'(l_s);
    prod   = WS'(diff) * $signed(WS'(SC_NUM));
    scaled = prod >>> SC_FRAC;
    sat    = 1'b0;
    if (scaled > MAXV) begin
      l_ext = MAXV[W-1:0];
      sat   = 1'b1;
    end else if (scaled < MINV) begin
      l_ext = MINV[W-1:0];
      sat   = 1'b1;
    end else begin
      l_ext = scaled[W-1:0];
    end
  end

endmodule
