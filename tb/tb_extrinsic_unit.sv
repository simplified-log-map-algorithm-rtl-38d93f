// tb_extrinsic_unit: self-checking test of the extrinsic computation.
//
// Default instance: p = 16, W = 10, sc = 205/256. Second instance: p = 8,
// W = 6, sc = 218/256 (0.85). Random LLR triples over the full range and small
// ones; the reference forms Lapo - La - Ls as a plain integer, multiplies
// by the scale, divides by 2^frac rounding toward minus infinity and clips
// to the signed W-bit range. Checks l_ext and the saturation flag and
// requires both clipped and unclipped results.
module tb_extrinsic_unit;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sat = 0, n_lin = 0;

  logic signed [15:0] apo16;
  logic signed [9:0]  la16, ls16, le16;
  logic               sat16;
  logic signed [7:0]  apo8;
  logic signed [5:0]  la8, ls8, le8;
  logic               sat8;

  extrinsic_unit dut16 (.l_apo(apo16), .l_a(la16), .l_s(ls16), .l_ext(le16), .sat(sat16));
  extrinsic_unit #(.P(8), .W(6), .SC_NUM(218), .SC_FRAC(8)) dut8 (
    .l_apo(apo8), .l_a(la8), .l_s(ls8), .l_ext(le8), .sat(sat8));

  function automatic longint floordiv(input longint a, input longint d);
    longint q;
    q = a / d;
    if ((a % d != 0) && (a < 0)) q -= 1;
    return q;
  endfunction

  task automatic run(input int range16, input int range8, input int rl16, input int rl8);
    longint e, lim;
    bit es;
    apo16 = 16'($urandom_range(0, 2 * range16) - range16);
    la16  = 10'($urandom_range(0, 2 * rl16) - rl16);
    ls16  = 10'($urandom_range(0, 2 * rl16) - rl16);
    apo8  = 8'($urandom_range(0, 2 * range8) - range8);
    la8   = 6'($urandom_range(0, 2 * rl8) - rl8);
    ls8   = 6'($urandom_range(0, 2 * rl8) - rl8);
    @(posedge clk); #1;
    e = floordiv((longint'(apo16) - longint'(la16) - longint'(ls16)) * 205, 256);
    lim = 511; es = 0;
    if (e > lim) begin e = lim; es = 1; end
    if (e < -lim - 1) begin e = -lim - 1; es = 1; end
    checks++;
    if (le16 !== 10'(e) || sat16 !== es) begin
      failures++;
      $display("FAIL p16 apo=%0d la=%0d ls=%0d le=%0d exp %0d", apo16, la16, ls16, le16, e);
    end
    if (es) n_sat++; else n_lin++;
    e = floordiv((longint'(apo8) - longint'(la8) - longint'(ls8)) * 218, 256);
    lim = 31; es = 0;
    if (e > lim) begin e = lim; es = 1; end
    if (e < -lim - 1) begin e = -lim - 1; es = 1; end
    checks++;
    if (le8 !== 6'(e) || sat8 !== es) begin
      failures++;
      $display("FAIL p8 apo=%0d la=%0d ls=%0d le=%0d exp %0d", apo8, la8, ls8, le8, e);
    end
  endtask

  initial begin
    apo16 = '0; la16 = '0; ls16 = '0; apo8 = '0; la8 = '0; ls8 = '0;
    for (int k = 0; k < 3000; k++) begin
      if (k % 2 == 0) run(32767, 127, 511, 31);
      else            run(400, 25, 200, 12);
    end
    checks++;
    if (n_sat == 0 || n_lin == 0) begin
      failures++;
      $display("FAIL: coverage sat=%0d linear=%0d", n_sat, n_lin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
