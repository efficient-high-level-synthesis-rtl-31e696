// wdet_mult: detection matrix W_det = G^-1 H^H, produced one row per K clocks.
//
// Row i of W_det (one entry per antenna m) is sum_k G^-1[i][k] conj(H[m][k]).
// The M antenna entries are accumulated in parallel (M complex multipliers);
// the loop over k runs one step per clock. When the K-th term of a row has
// been added, the row is rounded to the memory format (24 bits, 20 fraction
// bits, saturated) and presented on row_valid / row_idx / row for one clock,
// ready to be written to the detection-matrix memory. The conjugate
// transpose of H is taken on the fly from the stored channel columns.
//
// Interface: start is sampled while busy is low; ginv and hcol must stay
// stable until done. Timing: row i is valid (i+1)*K + 1 clocks after the clock
// that sampled start; done pulses together with the last row. The function
// follows the source; the schedule and formats are this design's choices.
module wdet_mult
  import mimo_pkg::*;
#(
  parameter int unsigned K = K_UE,
  parameter int unsigned M = M_ANT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  cinv_t  [K-1:0][K-1:0]       ginv,
  input  cdata_t [K-1:0][M-1:0]       hcol,   // hcol[k][m] = H[m][k]
  output logic                        busy,
  output logic                        done,
  output logic                        row_valid,
  output logic [$clog2(K+1)-1:0]      row_idx,
  output cw_t    [M-1:0]              row
);

  localparam int unsigned XW = $clog2(K + 1);
  localparam int unsigned SH = IFRAC + DFRAC - WFRAC;

  logic [XW-1:0] i_q, k_q;
  cacc_t [M-1:0] acc, sum;

  function automatic logic [XW-1:0] cl(input logic [XW-1:0] x);
    return (32'(x) < K) ? x : XW'(K - 1);
  endfunction

  always_comb begin
    for (int m = 0; m < M; m++) begin
      cacc_t p;
      p = cmul(ginv[cl(i_q)][cl(k_q)].re, ginv[cl(i_q)][cl(k_q)].im,
               32'(hcol[cl(k_q)][m].re), 32'(hcol[cl(k_q)][m].im), 1'b1);
      sum[m].re = acc[m].re + p.re;
      sum[m].im = acc[m].im + p.im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      row_valid <= 1'b0;
      row_idx   <= '0;
      row       <= '0;
      i_q       <= '0;
      k_q       <= '0;
      acc       <= '0;
    end else begin
      done      <= 1'b0;
      row_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i_q  <= '0;
          k_q  <= '0;
          acc  <= '0;
        end
      end else if (32'(k_q) + 1 < K) begin
        acc <= sum;
        k_q <= k_q + 1'b1;
      end else begin
        for (int m = 0; m < M; m++) begin
          row[m].re <= WW'(shr_sat(sum[m].re, SH, WW));
          row[m].im <= WW'(shr_sat(sum[m].im, SH, WW));
        end
        row_valid <= 1'b1;
        row_idx   <= i_q;
        acc       <= '0;
        k_q       <= '0;
        if (32'(i_q) + 1 < K) begin
          i_q <= i_q + 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
