// tb_apo_lte: the a posteriori unit configured for an 8-state binary code
// with feedback 13 and feedforward 15 (octal), the component code of the
// UMTS/LTE turbo code; 16-bit metrics, 10-bit LLRs, sc = 205/256. Two
// 8-input max* operations per step.
//
// Each cycle a random trellis step is applied: 8 forward metrics, 8
// backward metrics (each a random base word plus small offsets, so the
// wrapped words may cross 2^16) and random La, Ls, Lp. The reference uses
// its own shift-register model of the encoder (a = u ^ s2 ^ s3,
// c = a ^ s1 ^ s3 on the register taps) to enumerate the 16
// transitions, forms the true (unwrapped) metrics, applies the simplified
// max* (largest + 3/8 when the two largest differ by less than 2.0) to the
// u = 1 and u = 0 sets, and derives Lapo and the saturated, scaled
// extrinsic. Outputs are checked one cycle after in_valid (the unit's
// latency); idle cycles are mixed in and must leave out_valid low.
// Counted mechanisms, each of which must occur: correction applied and not
// applied in each of the two max* operations, extrinsic saturation, metric
// words wrapping around 2^16, and idle cycles.
module tb_apo_lte;

  localparam int NS = 8;
  localparam int P  = 16;
  localparam int W  = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_c1_on = 0, n_c1_off = 0, n_c0_on = 0, n_c0_off = 0;
  int n_sat = 0, n_wrap = 0, n_idle = 0, n_steps = 0;

  logic         rst_n;
  logic         in_valid;
  logic [P-1:0] alpha [NS];
  logic [P-1:0] beta  [NS];
  logic [W-1:0] l_a, l_s, l_p;
  logic         out_valid;
  logic [P-1:0] l_apo;
  logic [W-1:0] l_ext;
  logic         c0_one, c0_zero, ext_sat;

  apo_unit #(.NS(8), .MEM(3), .GFB('o13), .GFF('o15)) dut (
    .clk, .rst_n, .in_valid, .alpha, .beta, .l_a, .l_s, .l_p,
    .out_valid, .l_apo, .l_ext, .c0_one, .c0_zero, .ext_sat);

  // encoder model of the default code: state bit 0 = newest register bit
  function automatic int nxt(input int s, input int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    return ((s << 1) | a) & 7;
  endfunction
  function automatic int par(input int s, input int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    return a ^ (s & 1) ^ ((s >> 2) & 1);
  endfunction

  function automatic int smax(input int v [NS], output bit corr);
    int y1, y2, i1;
    i1 = 0;
    for (int i = 1; i < NS; i++) if (v[i] > v[i1]) i1 = i;
    y1 = v[i1];
    y2 = -1000000;
    for (int i = 0; i < NS; i++) if (i != i1 && v[i] > y2) y2 = v[i];
    corr = (y1 - y2) < 16;
    return y1 + (corr ? 3 : 0);
  endfunction

  typedef struct {
    logic [P-1:0] apo;
    logic [W-1:0] ext;
    bit           c1, c0, sat;
  } exp_t;

  exp_t exp_q [$];

  task automatic apply_step(input int ra, input int rb, input int rl);
    int ao [NS], bo [NS], m1 [NS], m0 [NS];
    int ba, bb, la, ls, lp, z1, z0, apo, e;
    bit c1, c0, sat;
    exp_t x;
    ba = $urandom; bb = $urandom;
    for (int i = 0; i < NS; i++) begin
      ao[i] = $urandom_range(0, ra);
      bo[i] = $urandom_range(0, rb);
      alpha[i] = P'(ba + ao[i]);
      beta[i]  = P'(bb + bo[i]);
    end
    la = $urandom_range(0, 2 * rl) - rl;
    ls = $urandom_range(0, 2 * rl) - rl;
    lp = $urandom_range(0, 2 * rl) - rl;
    l_a = W'(la); l_s = W'(ls); l_p = W'(lp);
    for (int s = 0; s < NS; s++) begin
      m0[s] = ao[s] + bo[nxt(s, 0)] + (par(s, 0) ? lp : 0);
      m1[s] = ao[s] + bo[nxt(s, 1)] + la + ls + (par(s, 1) ? lp : 0);
    end
    z1 = smax(m1, c1);
    z0 = smax(m0, c0);
    apo = z1 - z0;
    e = apo - la - ls;
    e = (e * 205) >>> 8;
    sat = 0;
    if (e > 511)  begin e = 511;  sat = 1; end
    if (e < -512) begin e = -512; sat = 1; end
    x.apo = P'(apo); x.ext = W'(e); x.c1 = c1; x.c0 = c0; x.sat = sat;
    exp_q.push_back(x);
    if (c1) n_c1_on++; else n_c1_off++;
    if (c0) n_c0_on++; else n_c0_off++;
    if (sat) n_sat++;
    if (((ba & 32'hffff) + ra > 32'hffff) || ((bb & 32'hffff) + rb > 32'hffff) ||
        (((ba + bb) & 32'hffff) + ra + rb + 3 * rl > 32'hffff)) n_wrap++;
    n_steps++;
  endtask

  // compare the registered outputs with the oldest expectation
  task automatic check_out();
    exp_t x;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL: out_valid low one cycle after in_valid");
      return;
    end
    x = exp_q.pop_front();
    if (l_apo !== x.apo || l_ext !== x.ext || c0_one !== x.c1 || c0_zero !== x.c0 ||
        ext_sat !== x.sat) begin
      failures++;
      $display("FAIL step: apo=%0d exp %0d ext=%0d exp %0d c1=%b/%b c0=%b/%b sat=%b/%b",
               $signed(l_apo), $signed(x.apo), $signed(l_ext), $signed(x.ext),
               c0_one, x.c1, c0_zero, x.c0, ext_sat, x.sat);
    end
  endtask

  initial begin
    bit was_valid;
    rst_n = 1'b0; in_valid = 1'b0;
    for (int i = 0; i < NS; i++) begin alpha[i] = '0; beta[i] = '0; end
    l_a = '0; l_s = '0; l_p = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || l_apo !== '0 || l_ext !== '0) begin
      failures++;
      $display("FAIL: outputs not cleared by reset");
    end
    rst_n = 1'b1;
    was_valid = 0;
    for (int k = 0; k < 4000; k++) begin
      // drive the next step (or an idle cycle) just after the clock edge
      if (k % 7 == 6) begin
        in_valid = 1'b0;
        n_idle++;
      end else begin
        in_valid = 1'b1;
        case (k % 4)
          0: apply_step(20, 20, 10);      // close metrics: corrections fire
          1: apply_step(3000, 3000, 511); // wide: saturation
          2: apply_step(300, 300, 100);
          default: apply_step(8, 8, 4);
        endcase
      end
      @(posedge clk); #1;
      if (in_valid) check_out();
      else begin
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL: out_valid high after an idle cycle");
        end
      end
    end
    checks++;
    if (n_c1_on == 0 || n_c1_off == 0 || n_c0_on == 0 || n_c0_off == 0 || n_sat == 0 ||
        n_wrap == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("mechanisms: steps=%0d corr(u=1) on/off=%0d/%0d corr(u=0) on/off=%0d/%0d sat=%0d wrap=%0d idle=%0d",
             n_steps, n_c1_on, n_c1_off, n_c0_on, n_c0_off, n_sat, n_wrap, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
