// tb_cholinv: checks the Cholesky-based inverse of a Hermitian matrix.
//
// Gram matrices of random channels (K = 4, M = 32, entries within +-0.5) are
// given in the 16-fraction-bit format; the result is compared entry by entry
// with a double-precision Gauss-Jordan inverse of the same quantised matrix
// (tolerance 2e-5 absolute plus 0.1 % of the entry, about 1000 LSB of
// 2^-24 for entries near 0.3). One case uses a diagonal matrix whose
// inverse is known in closed form. A singular (all-zero) matrix must set npd
// and still finish. The run time must be the 185 clocks
// stated for K = 4, the same for every matrix.
module tb_cholinv;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int K = 4;
  localparam int M = 32;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cgram_t [K-1:0][K-1:0] g;
  logic busy, done, npd;
  cinv_t [K-1:0][K-1:0] ginv;
  int checks = 0, failures = 0;
  int first_cycles = -1;

  cholinv #(.K(K)) dut (.clk, .rst_n, .start, .g, .busy, .done, .npd, .ginv);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(output int cycles);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    while (!done) begin @(posedge clk); cycles++; end
  endtask

  task automatic compare(input kmat_t er, input kmat_t ei, input string tag);
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++) begin
        real gr, gi, tr, ti;
        gr = from_fix(longint'(ginv[i][j].re), IFRAC);
        gi = from_fix(longint'(ginv[i][j].im), IFRAC);
        tr = 2e-5 + 1e-3 * ((er[i][j] < 0) ? -er[i][j] : er[i][j]);
        ti = 2e-5 + 1e-3 * ((ei[i][j] < 0) ? -ei[i][j] : ei[i][j]);
        checks++;
        if (gr - er[i][j] > tr || er[i][j] - gr > tr || gi - ei[i][j] > ti || ei[i][j] - gi > ti) begin
          failures++;
          $display("%s Ginv[%0d][%0d] got (%f,%f) expected (%f,%f)", tag, i, j, gr, gi, er[i][j], ei[i][j]);
        end
      end
  endtask

  initial begin
    kmat_t ar, ai;
    hmat_t hr, hi;
    int cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // closed-form case: diag(4, 2, 1, 0.5) -> diag(0.25, 0.5, 1, 2)
    g = '0;
    for (int i = 0; i < K; i++) g[i][i].re = GW'(to_fix(4.0 / (2.0 ** i), GFRAC));
    run(cycles);
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++) begin
        ar[i][j] = (i == j) ? (2.0 ** i) / 4.0 : 0.0;
        ai[i][j] = 0.0;
      end
    compare(ar, ai, "diag");
    checks++;
    if (npd) begin failures++; $display("npd set for a positive definite matrix"); end

    for (int t = 0; t < 30; t++) begin
      kmat_t gr, gi;
      for (int m = 0; m < M; m++)
        for (int k = 0; k < K; k++) begin
          hr[m][k] = urand(-0.5, 0.5);
          hi[m][k] = urand(-0.5, 0.5);
        end
      gram_ref(K, M, hr, hi, gr, gi);
      // quantise and load; use the quantised values as the reference input
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          g[i][j].re = GW'(to_fix(gr[i][j], GFRAC));
          g[i][j].im = GW'(to_fix(gi[i][j], GFRAC));
          ar[i][j] = from_fix(longint'(g[i][j].re), GFRAC);
          ai[i][j] = from_fix(longint'(g[i][j].im), GFRAC);
        end
      cinv(K, ar, ai);
      run(cycles);
      compare(ar, ai, $sformatf("rand%0d", t));
      checks++;
      if (first_cycles < 0) first_cycles = cycles;
      if (cycles != first_cycles || cycles != 185) begin
        failures++;
        $display("cycle count %0d (first %0d)", cycles, first_cycles);
      end
    end
    $display("cholinv latency %0d clocks", first_cycles);

    // singular input
    g = '0;
    run(cycles);
    checks++;
    if (!npd) begin failures++; $display("npd not set for a zero matrix"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
