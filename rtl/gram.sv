// gram: Gram matrix G = H^H H of the M x K channel matrix.
//
// H is held as K columns h^k of M antenna samples. Conjugation and
// transposition of H are not separate passes: entry G[i][j] is formed directly
// as sum_m conj(h^i[m]) * h^j[m], with the M products computed in parallel and
// added in one tree. One entry of the lower triangle (i >= j) is produced per
// clock, row by row; the upper triangle is filled by conjugate symmetry in the
// same cycle, since G is Hermitian. After K(K+1)/2 busy clocks, done pulses
// for one cycle and g holds the whole matrix until the next start.
//
// Timing: start is sampled while busy is low; done is high K(K+1)/2 + 1 clocks
// after the clock that sampled start.
// The computed function follows the source; the one-entry-per-cycle schedule,
// the merged conjugate-transpose and the output format (32 bits, 16 fraction
// bits, saturated) are this design's choices.
module gram
  import mimo_pkg::*;
#(
  parameter int unsigned K = K_UE,
  parameter int unsigned M = M_ANT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  cdata_t [K-1:0][M-1:0] hcol,   // hcol[k][m] = H[m][k]
  output logic                  busy,
  output logic                  done,
  output cgram_t [K-1:0][K-1:0] g       // g[i][j] = G[i][j]
);

  localparam int unsigned IXW = (K > 1) ? $clog2(K) : 1;

  logic [IXW-1:0] i_q, j_q;

  // One entry: sum over all antennas of conj(h^i[m]) * h^j[m].
  cacc_t entry;
  always_comb begin
    entry = '0;
    for (int m = 0; m < M; m++) begin
      cacc_t p;
      p = cmul(32'(hcol[j_q][m].re), 32'(hcol[j_q][m].im),
               32'(hcol[i_q][m].re), 32'(hcol[i_q][m].im), 1'b1);
      entry.re = entry.re + p.re;
      entry.im = entry.im + p.im;
    end
  end

  localparam int unsigned SH = 2 * DFRAC - GFRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      i_q  <= '0;
      j_q  <= '0;
      g    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i_q  <= '0;
          j_q  <= '0;
        end
      end else begin
        g[i_q][j_q].re <= GW'(shr_sat(entry.re, SH, GW));
        g[i_q][j_q].im <= GW'(shr_sat(entry.im, SH, GW));
        g[j_q][i_q].re <= GW'(shr_sat(entry.re, SH, GW));
        g[j_q][i_q].im <= GW'(-shr_sat(entry.im, SH, GW));
        if (j_q == i_q) begin
          j_q <= '0;
          if (32'(i_q) == K - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end else begin
          j_q <= j_q + 1'b1;
        end
      end
    end
  end

endmodule
