// tb_mvg2: self-checking test of the two-input maximum-value generator.
//
// Random operand pairs (p = 16), half of them within a few LSBs of each
// other, plus directed cases at the 2.0 threshold and across the 2^p wrap.
// The reference orders the two operands by their signed difference modulo
// 2^p and sets c0 = (y1 - y2 < 16 LSB). Checks y1, y2 and c0.
module tb_mvg2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_c0 = 0, n_swap = 0;

  logic [15:0] a, b, y1, y2;
  logic        c0;

  mvg2 #(.P(16)) dut (.a(a), .b(b), .y1(y1), .y2(y2), .c0(c0));

  task automatic check(input int av, input int bv);
    int d;
    logic [15:0] ey1, ey2;
    a = 16'(av); b = 16'(bv);
    @(posedge clk); #1;
    d = int'(a) - int'(b);
    if (d >= 32768) d -= 65536;
    if (d < -32768) d += 65536;
    ey1 = d < 0 ? b : a;
    ey2 = d < 0 ? a : b;
    checks++;
    if (y1 !== ey1 || y2 !== ey2 || c0 !== ((ey1 - ey2) < 16'd16)) begin
      failures++;
      $display("FAIL a=%h b=%h y1=%h y2=%h c0=%b", a, b, y1, y2, c0);
    end
    if (c0) n_c0++;
    if (d < 0) n_swap++;
  endtask

  initial begin
    int base;
    a = '0; b = '0;
    for (int k = 0; k < 8; k++) begin
      base = $urandom;
      check(base, base);
      check(base + 15, base);
      check(base, base + 15);
      check(base + 16, base);
      check(base, base + 16);
    end
    check(32'h0002, 32'hfff8);
    check(32'hfff8, 32'h0002);
    for (int k = 0; k < 2000; k++) begin
      base = $urandom;
      if (k % 2 == 0) check(base, base + $signed($urandom_range(0, 50)) - 25);
      else            check(base, $urandom);
    end
    checks++;
    if (n_c0 == 0 || n_swap == 0) begin
      failures++;
      $display("FAIL: coverage c0=%0d swap=%0d", n_c0, n_swap);
    end
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
