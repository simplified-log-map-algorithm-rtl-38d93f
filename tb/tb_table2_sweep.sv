// tb_table2_sweep: the simplified n-input max* at every size of the
// published area/delay comparison, n in {4, 8, 16} times p in {8, 12, 16},
// plus n = 16, p = 11 (the size used to compare with a three-stage design).
//
// One nmax_star instance per size, each driven by its own process with
// 1500 random vectors (random base word + offsets, narrow and wide spreads,
// so the correction is both applied and not applied and words wrap around
// 2^p). The reference sorts the offsets and forms
// z = y1 + 3 LSB if y1 - y2 < 16 LSB, modulo 2^p. Every size must see both
// correction outcomes.
module tb_table2_sweep;

  localparam int NCFG = 10;
  localparam int CN [NCFG] = '{4, 4, 4, 8, 8, 8, 16, 16, 16, 16};
  localparam int CP [NCFG] = '{8, 12, 16, 8, 12, 16, 8, 12, 16, 11};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = CN[c];
    localparam int P = CP[c];

    logic [P-1:0] x [N];
    logic [P-1:0] z, y1, y2;
    logic         c0;

    nmax_star #(.N(N), .P(P)) dut (.x(x), .z(z), .y1(y1), .y2(y2), .c0(c0));

    initial begin
      int off [N];
      int base, r1, r2, i1, spread, n_on, n_off;
      n_on = 0; n_off = 0;
      for (int i = 0; i < N; i++) x[i] = '0;
      for (int k = 0; k < 1500; k++) begin
        spread = (k % 3 == 0) ? 10 : ((k % 3 == 1) ? 60 : (1 << (P - 3)));
        base = $urandom;
        for (int i = 0; i < N; i++) begin
          off[i] = $urandom_range(0, spread);
          x[i] = P'(base + off[i]);
        end
        @(posedge clk); #1;
        i1 = 0;
        for (int i = 1; i < N; i++) if (off[i] > off[i1]) i1 = i;
        r1 = off[i1];
        r2 = -1;
        for (int i = 0; i < N; i++) if (i != i1 && off[i] > r2) r2 = off[i];
        checks++;
        if (z !== P'(base + r1 + ((r1 - r2) < 16 ? 3 : 0)) || y1 !== P'(base + r1) ||
            y2 !== P'(base + r2)) begin
          failures++;
          $display("FAIL n=%0d p=%0d z=%h y1=%h y2=%h", N, P, z, y1, y2);
        end
        if (c0) n_on++; else n_off++;
      end
      checks++;
      if (n_on == 0 || n_off == 0) begin
        failures++;
        $display("FAIL n=%0d p=%0d: correction on/off %0d/%0d", N, P, n_on, n_off);
      end
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
