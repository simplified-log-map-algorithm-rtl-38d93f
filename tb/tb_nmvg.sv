// tb_nmvg: self-checking test of the n-input maximum-value generator.
//
// Two instances: N = 16, p = 16 (default size) and N = 4, p = 8. Each test
// vector is a random base word plus N random offsets, so the true order of
// the inputs is known from the offsets even when base + offset wraps past
// 2^p. The reference sorts the offsets: y1 = base + largest, y2 = base +
// second largest (counted with multiplicity), c0 = (y1 - y2 < 16 LSB).
// Offsets are drawn from narrow and wide ranges so that c0 is both 0 and 1.
// The test also counts, at the last merge level, the three ways y1 and y2
// can split between the input halves (both in the first half, both in the
// second, one in each) and requires each to occur, so every correction-flag
// multiplexer path is exercised.
module tb_nmvg;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_c0 = 0, n_wrap = 0;
  int n_case [3] = '{0, 0, 0};

  logic [15:0] x16 [16];
  logic [15:0] y1_16, y2_16;
  logic        c0_16;
  logic [7:0]  x4 [4];
  logic [7:0]  y1_4, y2_4;
  logic        c0_4;

  nmvg #(.N(16), .P(16)) dut16 (.x(x16), .y1(y1_16), .y2(y2_16), .c0(c0_16));
  nmvg #(.N(4),  .P(8))  dut4  (.x(x4),  .y1(y1_4),  .y2(y2_4),  .c0(c0_4));

  // indices of the largest and second-largest offsets (first index on ties)
  task automatic top2(input int off [], output int i1, output int i2);
    i1 = 0;
    for (int i = 1; i < off.size(); i++) if (off[i] > off[i1]) i1 = i;
    i2 = (i1 == 0) ? 1 : 0;
    for (int i = 0; i < off.size(); i++)
      if (i != i1 && off[i] > off[i2]) i2 = i;
  endtask

  task automatic run16(input int spread);
    int off [] = new[16];
    int base, i1, i2;
    logic [15:0] ey1, ey2;
    base = $urandom;
    for (int i = 0; i < 16; i++) begin
      off[i] = $urandom_range(0, spread);
      x16[i] = 16'(base + off[i]);
    end
    @(posedge clk); #1;
    top2(off, i1, i2);
    ey1 = 16'(base + off[i1]);
    ey2 = 16'(base + off[i2]);
    checks++;
    if (y1_16 !== ey1 || y2_16 !== ey2 || c0_16 !== ((off[i1] - off[i2]) < 16)) begin
      failures++;
      $display("FAIL N16 y1=%h/%h y2=%h/%h c0=%b delta=%0d", y1_16, ey1, y2_16, ey2,
               c0_16, off[i1] - off[i2]);
    end
    if (c0_16) n_c0++;
    if ((base & 32'hffff) + spread > 32'hffff) n_wrap++;
    // where do the two maxima sit? (values, not indices, decide for ties)
    if (i1 < 8 && i2 < 8)        n_case[0]++;
    else if (i1 >= 8 && i2 >= 8) n_case[1]++;
    else                         n_case[2]++;
  endtask

  task automatic run4(input int spread);
    int off [] = new[4];
    int base, i1, i2;
    base = $urandom;
    for (int i = 0; i < 4; i++) begin
      off[i] = $urandom_range(0, spread);
      x4[i] = 8'(base + off[i]);
    end
    @(posedge clk); #1;
    top2(off, i1, i2);
    checks++;
    if (y1_4 !== 8'(base + off[i1]) || y2_4 !== 8'(base + off[i2]) ||
        c0_4 !== ((off[i1] - off[i2]) < 16)) begin
      failures++;
      $display("FAIL N4 y1=%h y2=%h c0=%b", y1_4, y2_4, c0_4);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) x16[i] = '0;
    for (int i = 0; i < 4; i++) x4[i] = '0;
    for (int k = 0; k < 3000; k++) begin
      case (k % 4)
        0: run16(40);
        1: run16(200);
        2: run16(16383);
        default: run16(3);
      endcase
      run4(k % 2 ? 20 : 100);
    end
    checks++;
    if (n_c0 == 0 || n_wrap == 0 || n_case[0] == 0 || n_case[1] == 0 || n_case[2] == 0) begin
      failures++;
      $display("FAIL: coverage c0=%0d wrap=%0d cases=%0d/%0d/%0d", n_c0, n_wrap,
               n_case[0], n_case[1], n_case[2]);
    end
    $display("coverage: c0=%0d wrap=%0d split cases=%0d/%0d/%0d", n_c0, n_wrap,
             n_case[0], n_case[1], n_case[2]);
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
