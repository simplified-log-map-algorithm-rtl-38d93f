// tb_mvu: self-checking test of the maximum-value unit.
//
// Drives random and corner-case operand pairs into two instances (p = 16
// and p = 8) and checks y1, the sign s and the correction flag c0 against
// a reference computed with integer arithmetic: the operands are read as
// values modulo 2^p, the signed difference decides the maximum, and
// c0 = (|A - B| < 16 LSB), i.e. |A - B| < 2.0 with three fractional bits.
// Corner cases: equal operands, |A - B| = 15 and 16 LSB in both
// directions, and differences that wrap around 2^p.
module tb_mvu;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, y16;
  logic        s16, c16;
  logic [7:0]  a8, b8, y8;
  logic        s8, c8;

  mvu #(.P(16)) dut16 (.a(a16), .b(b16), .y1(y16), .s(s16), .c0(c16));
  mvu #(.P(8))  dut8  (.a(a8),  .b(b8),  .y1(y8),  .s(s8),  .c0(c8));

  // reference: signed difference of two p-bit words taken modulo 2^p
  function automatic int wrapdiff(input int a, input int b, input int p);
    int d;
    d = (a - b) % (1 << p);
    if (d < 0) d += (1 << p);
    if (d >= (1 << (p - 1))) d -= (1 << p);
    return d;
  endfunction

  task automatic check16(input int a, input int b);
    int d, dm;
    a16 = 16'(a); b16 = 16'(b);
    @(posedge clk); #1;
    d  = wrapdiff(a & 32'hffff, b & 32'hffff, 16);
    dm = d < 0 ? -d : d;
    checks++;
    if (y16 !== (d < 0 ? b16 : a16) || s16 !== (d < 0) || c16 !== (dm < 16)) begin
      failures++;
      $display("FAIL p16 a=%h b=%h y1=%h s=%b c0=%b (d=%0d)", a16, b16, y16, s16, c16, d);
    end
  endtask

  task automatic check8(input int a, input int b);
    int d, dm;
    a8 = 8'(a); b8 = 8'(b);
    @(posedge clk); #1;
    d  = wrapdiff(a & 32'hff, b & 32'hff, 8);
    dm = d < 0 ? -d : d;
    checks++;
    if (y8 !== (d < 0 ? b8 : a8) || s8 !== (d < 0) || c8 !== (dm < 16)) begin
      failures++;
      $display("FAIL p8 a=%h b=%h y1=%h s=%b c0=%b (d=%0d)", a8, b8, y8, s8, c8, d);
    end
  endtask

  int n_corr = 0;

  initial begin
    int base;
    a16 = '0; b16 = '0; a8 = '0; b8 = '0;
    // directed corner cases around the 2.0 threshold, both signs
    for (int k = 0; k < 8; k++) begin
      base = $urandom;
      check16(base, base);
      check16(base + 15, base);
      check16(base + 16, base);
      check16(base, base + 15);
      check16(base, base + 16);
      check16(base + 17, base);
      check16(base, base + 1);
      check8(base, base + 15);
      check8(base, base + 16);
      check8(base + 15, base);
      check8(base + 16, base);
    end
    // wrap-around: A just past 2^p, B just below
    check16(32'h0005, 32'hfffa);
    check16(32'h7ffc, 32'h8004);
    check8(32'h03, 32'hfe);
    // random, mostly near each other so that c0 = 1 occurs often
    for (int k = 0; k < 2000; k++) begin
      base = $urandom;
      if (k % 2 == 0) check16(base, base + $signed($urandom_range(0, 64)) - 32);
      else            check16(base, $urandom);
      check8(base, base + $signed($urandom_range(0, 40)) - 20);
      if (c16) n_corr++;
    end
    checks++;
    if (n_corr == 0) begin
      failures++;
      $display("FAIL: correction flag never set in random test");
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
