// tb_nmax_star: self-checking test of the simplified n-input max*.
//
// Three sizes from the evaluated range: (N, p) = (16, 16), (8, 12) and
// (4, 8). Inputs are a random base word plus random offsets, so the true
// ordering is known even across the 2^p wrap. Reference:
//   z = y1 + 3 LSB (3/8)  if y1 - y2 < 16 LSB (2.0), else z = y1,
// modulo 2^p, with y1/y2 the largest and second-largest offsets. Checks z,
// y1, y2 and c0, and requires both correction outcomes to occur.
module tb_nmax_star;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_c0 = 0, n_noc0 = 0;

  logic [15:0] xa [16];
  logic [15:0] za, y1a, y2a;
  logic        c0a;
  logic [11:0] xb [8];
  logic [11:0] zb, y1b, y2b;
  logic        c0b;
  logic [7:0]  xc [4];
  logic [7:0]  zc, y1c, y2c;
  logic        c0c;

  nmax_star #(.N(16), .P(16)) dut_a (.x(xa), .z(za), .y1(y1a), .y2(y2a), .c0(c0a));
  nmax_star #(.N(8),  .P(12)) dut_b (.x(xb), .z(zb), .y1(y1b), .y2(y2b), .c0(c0b));
  nmax_star #(.N(4),  .P(8))  dut_c (.x(xc), .z(zc), .y1(y1c), .y2(y2c), .c0(c0c));

  // expected (y1, y2, z) offsets relative to base for the first n offsets
  function automatic void ref_max(input int off [16], input int n,
                                  output int r1, output int r2, output int rz);
    int i1;
    i1 = 0;
    for (int i = 1; i < n; i++) if (off[i] > off[i1]) i1 = i;
    r1 = off[i1];
    r2 = -1;
    for (int i = 0; i < n; i++) if (i != i1 && off[i] > r2) r2 = off[i];
    rz = r1 + ((r1 - r2) < 16 ? 3 : 0);
  endfunction

  task automatic run(input int spread);
    int off [16];
    int base, r1, r2, rz;
    base = $urandom;
    for (int i = 0; i < 16; i++) off[i] = $urandom_range(0, spread);
    for (int i = 0; i < 16; i++) xa[i] = 16'(base + off[i]);
    for (int i = 0; i < 8; i++)  xb[i] = 12'(base + off[i]);
    for (int i = 0; i < 4; i++)  xc[i] = 8'(base + (off[i] % 100));
    @(posedge clk); #1;
    ref_max(off, 16, r1, r2, rz);
    checks++;
    if (za !== 16'(base + rz) || y1a !== 16'(base + r1) || y2a !== 16'(base + r2) ||
        c0a !== (rz != r1)) begin
      failures++;
      $display("FAIL 16/16 z=%h exp %h", za, 16'(base + rz));
    end
    if (c0a) n_c0++; else n_noc0++;
    ref_max(off, 8, r1, r2, rz);
    checks++;
    if (zb !== 12'(base + rz) || y1b !== 12'(base + r1) || y2b !== 12'(base + r2)) begin
      failures++;
      $display("FAIL 8/12 z=%h exp %h", zb, 12'(base + rz));
    end
    for (int i = 0; i < 4; i++) off[i] = off[i] % 100;
    ref_max(off, 4, r1, r2, rz);
    checks++;
    if (zc !== 8'(base + rz) || y1c !== 8'(base + r1) || y2c !== 8'(base + r2)) begin
      failures++;
      $display("FAIL 4/8 z=%h exp %h", zc, 8'(base + rz));
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) xa[i] = '0;
    for (int i = 0; i < 8; i++)  xb[i] = '0;
    for (int i = 0; i < 4; i++)  xc[i] = '0;
    for (int k = 0; k < 3000; k++) run(k % 3 == 0 ? 1000 : (k % 3 == 1 ? 60 : 8));
    checks++;
    if (n_c0 == 0 || n_noc0 == 0) begin
      failures++;
      $display("FAIL: coverage c0=%0d no-c0=%0d", n_c0, n_noc0);
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
