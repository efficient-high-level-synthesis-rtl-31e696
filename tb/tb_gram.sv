// tb_gram: checks the Gram-matrix unit G = H^H H.
//
// Random channel matrices (K = 4 users, M = 32 antennas) are loaded; each
// entry of G is compared with an exact integer reference (the full-precision
// sum shifted down to 16 fraction bits, allowing one LSB) and the result
// must be Hermitian. done must follow start after K(K+1)/2 + 1 clocks.
module tb_gram;
  import mimo_pkg::*;

  localparam int K = 4;
  localparam int M = 32;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cdata_t [K-1:0][M-1:0] hcol;
  logic busy, done;
  cgram_t [K-1:0][K-1:0] g;
  int checks = 0, failures = 0;

  gram #(.K(K), .M(M)) dut (.clk, .rst_n, .start, .hcol, .busy, .done, .g);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp, longint tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 20; t++) begin
      int cycles;
      for (int k = 0; k < K; k++)
        for (int m = 0; m < M; m++) begin
          // samples within +-1.0 (12 fraction bits); a few runs at full scale
          int lim;
          lim = (t < 2) ? 32767 : 4096;
          hcol[k][m].re = DW'($signed($urandom_range(0, 2 * lim)) - lim);
          hcol[k][m].im = DW'($signed($urandom_range(0, 2 * lim)) - lim);
        end
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cycles = 0;
      while (!done) begin @(posedge clk); cycles++; end
      chk("gram cycles", cycles, K * (K + 1) / 2 + 1, 0);
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          longint sr, si;
          sr = 0; si = 0;
          for (int m = 0; m < M; m++) begin
            longint ar, ai, br, bi;
            ar = longint'(hcol[i][m].re); ai = longint'(hcol[i][m].im);
            br = longint'(hcol[j][m].re); bi = longint'(hcol[j][m].im);
            sr += ar * br + ai * bi;   // conj(a) * b
            si += ar * bi - ai * br;
          end
          chk($sformatf("G[%0d][%0d].re", i, j), longint'(g[i][j].re), sr >>> 8, 1);
          chk($sformatf("G[%0d][%0d].im", i, j), longint'(g[i][j].im), si >>> 8, 1);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
