// tb_wdet_mult: checks W_det = G^-1 H^H row by row.
//
// Random G^-1 (24 fraction bits) and channel columns (12 fraction bits) are
// applied; every output row is compared with an exact integer reference
// (sum_k Ginv[i][k] * conj(H[m][k]) shifted to 20 fraction bits, one LSB
// tolerance). Row i must appear (i+1)*K + 1 clocks after the clock that sampled
// start, rows in order 0..K-1, and done must come with the last row.
module tb_wdet_mult;
  import mimo_pkg::*;

  localparam int K = 4;
  localparam int M = 32;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cinv_t  [K-1:0][K-1:0] ginv;
  cdata_t [K-1:0][M-1:0] hcol;
  logic busy, done, row_valid;
  logic [$clog2(K+1)-1:0] row_idx;
  cw_t [M-1:0] row;
  int checks = 0, failures = 0;

  wdet_mult #(.K(K), .M(M)) dut (.clk, .rst_n, .start, .ginv, .hcol, .busy, .done,
                                 .row_valid, .row_idx, .row);

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
      int cycles, rows;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          ginv[i][j].re = IW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));  // +-0.5
          ginv[i][j].im = IW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
        end
      for (int k = 0; k < K; k++)
        for (int m = 0; m < M; m++) begin
          hcol[k][m].re = DW'($signed($urandom_range(0, 8192)) - 4096);
          hcol[k][m].im = DW'($signed($urandom_range(0, 8192)) - 4096);
        end
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cycles = 0;
      rows = 0;
      while (rows < K) begin
        @(posedge clk);
        cycles++;
        if (row_valid) begin
          chk("row index", longint'(row_idx), rows, 0);
          chk("row time", cycles, (rows + 1) * K + 1, 0);
          chk("done with last row", longint'(done), (rows == K - 1) ? 1 : 0, 0);
          for (int m = 0; m < M; m++) begin
            longint sr, si;
            sr = 0; si = 0;
            for (int k = 0; k < K; k++) begin
              longint ar, ai, br, bi;
              ar = longint'(ginv[rows][k].re); ai = longint'(ginv[rows][k].im);
              br = longint'(hcol[k][m].re);    bi = longint'(hcol[k][m].im);
              sr += ar * br + ai * bi;         // a * conj(b)
              si += ai * br - ar * bi;
            end
            chk("W.re", longint'(row[m].re), sr >>> 16, 1);
            chk("W.im", longint'(row[m].im), si >>> 16, 1);
          end
          rows++;
        end
        if (cycles > 10 * K * K) begin
          failures++;
          $display("rows missing");
          break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
