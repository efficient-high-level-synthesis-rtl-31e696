// cholinv: inverse of a K x K Hermitian positive-definite matrix through its
// Cholesky factor, G^-1 = L^-H L^-1 with G = L L^H.
//
// The unit is sequential and reuses one complex multiply-accumulate, one
// iterative square root and one iterative divider. It runs in three phases:
//   1. factor: column by column, L[j][j] = sqrt(G[j][j] - sum_k |L[j][k]|^2)
//      and L[i][j] = (G[i][j] - sum_k L[i][k] conj(L[j][k])) * r[j], where
//      r[j] = 1 / L[j][j] comes from the divider; the diagonal is real;
//   2. invert L: L^-1[j][j] = r[j] and, for i > j,
//      L^-1[i][j] = -r[i] * sum_{k=j..i-1} L[i][k] L^-1[k][j];
//   3. product: G^-1[i][j] = sum_{k>=i} conj(L^-1[k][i]) L^-1[k][j] for i >= j,
//      the upper triangle by conjugate symmetry.
// Formats: g and L have 16 fraction bits, r, L^-1 and the result 24 (see
// mimo_pkg). A diagonal that is not positive is clamped to one LSB and
// reported on npd, so the unit always finishes.
//
// Interface: start is sampled while busy is low, g must stay stable until
// done. done pulses one clock when ginv is valid; ginv holds until the next
// start. For K = 4 a run takes 185 clocks from start to done, 88 of them in the
// square roots (9 clocks each) and divisions (13 clocks each).
// The source uses a library Cholesky inversion without describing its
// insides; this datapath and schedule are this design's own.
module cholinv
  import mimo_pkg::*;
#(
  parameter int unsigned K = K_UE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  cgram_t [K-1:0][K-1:0] g,
  output logic                  busy,
  output logic                  done,
  output logic                  npd,
  output cinv_t  [K-1:0][K-1:0] ginv
);

  localparam int unsigned XW = $clog2(K + 1);
  localparam int unsigned RECIP_SH = GFRAC + IFRAC;  // 1/L: Q.16 -> Q.24

  typedef enum logic [3:0] {
    S_IDLE, S_DACC, S_SQRT, S_RECIP, S_OACC, S_OSCALE,
    S_LACC, S_LSCALE, S_GACC, S_GWR
  } state_t;

  state_t state;
  logic [XW-1:0] i_q, j_q, k_q;
  cacc_t acc;

  cgram_t [K-1:0][K-1:0] l_q;     // Cholesky factor, lower triangle
  cinv_t  [K-1:0][K-1:0] li_q;    // L^-1, lower triangle
  logic   [K-1:0][IW-1:0] r_q;    // 1 / L[j][j]

  // ---- square root and divider
  logic        sq_start, sq_busy, sq_done;
  logic [63:0] sq_x;
  logic [31:0] sq_q;
  logic        dv_start, dv_busy, dv_done;
  logic [47:0] dv_q;

  isqrt #(.IN_W(64)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .x(sq_x),
    .busy(sq_busy), .done(sq_done), .q(sq_q)
  );

  udiv #(.N_W(48), .D_W(32)) u_div (
    .clk, .rst_n, .start(dv_start), .n(48'(64'd1 << RECIP_SH)), .d(l_q[cl(j_q)][cl(j_q)].re),
    .busy(dv_busy), .done(dv_done), .q(dv_q)
  );

  // Indices clamped into range for the operand multiplexers.
  function automatic logic [XW-1:0] cl(input logic [XW-1:0] x);
    return (32'(x) < K) ? x : XW'(K - 1);
  endfunction

  // ---- the shared complex multiplier
  cacc_t prod;
  always_comb begin
    prod = '0;
    unique case (state)
      S_DACC:   prod = cmul(l_q[cl(j_q)][cl(k_q)].re, l_q[cl(j_q)][cl(k_q)].im,
                            l_q[cl(j_q)][cl(k_q)].re, l_q[cl(j_q)][cl(k_q)].im, 1'b1);
      S_OACC:   prod = cmul(l_q[cl(i_q)][cl(k_q)].re, l_q[cl(i_q)][cl(k_q)].im,
                            l_q[cl(j_q)][cl(k_q)].re, l_q[cl(j_q)][cl(k_q)].im, 1'b1);
      S_OSCALE: prod = cmul(32'(shr_sat(acc.re, GFRAC, GW)), 32'(shr_sat(acc.im, GFRAC, GW)),
                            r_q[cl(j_q)], 32'sd0, 1'b0);
      S_LACC:   prod = cmul(l_q[cl(i_q)][cl(k_q)].re, l_q[cl(i_q)][cl(k_q)].im,
                            li_q[cl(k_q)][cl(j_q)].re, li_q[cl(k_q)][cl(j_q)].im, 1'b0);
      S_LSCALE: prod = cmul(32'(shr_sat(acc.re, GFRAC, IW)), 32'(shr_sat(acc.im, GFRAC, IW)),
                            r_q[cl(i_q)], 32'sd0, 1'b0);
      S_GACC:   prod = cmul(li_q[cl(k_q)][cl(j_q)].re, li_q[cl(k_q)][cl(j_q)].im,
                            li_q[cl(k_q)][cl(i_q)].re, li_q[cl(k_q)][cl(i_q)].im, 1'b1);
      default:  prod = '0;
    endcase
  end

  assign sq_x = (acc.re > 0) ? acc.re : 64'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      i_q      <= '0;
      j_q      <= '0;
      k_q      <= '0;
      acc      <= '0;
      l_q      <= '0;
      li_q     <= '0;
      r_q      <= '0;
      ginv     <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      npd      <= 1'b0;
      sq_start <= 1'b0;
      dv_start <= 1'b0;
    end else begin
      done     <= 1'b0;
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          busy   <= 1'b1;
          npd    <= 1'b0;
          l_q    <= '0;
          li_q   <= '0;
          i_q    <= '0;
          j_q    <= '0;
          k_q    <= '0;
          acc.re <= 64'(g[0][0].re) <<< GFRAC;
          acc.im <= '0;
          state  <= S_DACC;
        end

        // diagonal: acc = G[j][j] - sum_k |L[j][k]|^2 (32 fraction bits)
        S_DACC: if (k_q < j_q) begin
          acc.re <= acc.re - prod.re;
          k_q    <= k_q + 1'b1;
        end else begin
          if (acc.re <= 0) npd <= 1'b1;
          sq_start <= 1'b1;
          state    <= S_SQRT;
        end

        S_SQRT: if (sq_done) begin
          l_q[j_q][j_q].re <= (sq_q == 0) ? 32'sd1 : $signed(sq_q);
          l_q[j_q][j_q].im <= '0;
          dv_start <= 1'b1;
          state    <= S_RECIP;
        end

        S_RECIP: if (dv_done) begin
          r_q[j_q]              <= (dv_q > 48'h7fff_ffff) ? 32'h7fff_ffff : dv_q[31:0];
          li_q[j_q][j_q].re     <= (dv_q > 48'h7fff_ffff) ? 32'sh7fff_ffff : $signed(dv_q[31:0]);
          li_q[j_q][j_q].im     <= '0;
          if (32'(j_q) + 1 < K) begin
            i_q    <= j_q + 1'b1;
            k_q    <= '0;
            acc.re <= 64'(g[cl(j_q + 1'b1)][j_q].re) <<< GFRAC;
            acc.im <= 64'(g[cl(j_q + 1'b1)][j_q].im) <<< GFRAC;
            state  <= S_OACC;
          end else begin
            // factor complete: start inverting L (nothing to do for K = 1)
            if (K > 1) begin
              j_q   <= '0;
              i_q   <= XW'(1);
              k_q   <= '0;
              acc   <= '0;
              state <= S_LACC;
            end else begin
              i_q   <= '0;
              j_q   <= '0;
              k_q   <= '0;
              acc   <= '0;
              state <= S_GACC;
            end
          end
        end

        // off-diagonal: acc = G[i][j] - sum_k L[i][k] conj(L[j][k])
        S_OACC: if (k_q < j_q) begin
          acc.re <= acc.re - prod.re;
          acc.im <= acc.im - prod.im;
          k_q    <= k_q + 1'b1;
        end else begin
          state <= S_OSCALE;
        end

        S_OSCALE: begin
          l_q[i_q][j_q].re <= GW'(shr_sat(prod.re, IFRAC, GW));
          l_q[i_q][j_q].im <= GW'(shr_sat(prod.im, IFRAC, GW));
          if (32'(i_q) + 1 < K) begin
            i_q    <= i_q + 1'b1;
            k_q    <= '0;
            acc.re <= 64'(g[cl(i_q + 1'b1)][j_q].re) <<< GFRAC;
            acc.im <= 64'(g[cl(i_q + 1'b1)][j_q].im) <<< GFRAC;
            state  <= S_OACC;
          end else begin
            j_q    <= j_q + 1'b1;
            k_q    <= '0;
            acc.re <= 64'(g[cl(j_q + 1'b1)][cl(j_q + 1'b1)].re) <<< GFRAC;
            acc.im <= '0;
            state  <= S_DACC;
          end
        end

        // L^-1: acc = sum_{k=j..i-1} L[i][k] L^-1[k][j] (40 fraction bits)
        S_LACC: if (k_q < i_q) begin
          acc.re <= acc.re + prod.re;
          acc.im <= acc.im + prod.im;
          k_q    <= k_q + 1'b1;
        end else begin
          state <= S_LSCALE;
        end

        S_LSCALE: begin
          li_q[i_q][j_q].re <= IW'(-shr_sat(prod.re, IFRAC, IW));
          li_q[i_q][j_q].im <= IW'(-shr_sat(prod.im, IFRAC, IW));
          acc <= '0;
          if (32'(i_q) + 1 < K) begin
            i_q   <= i_q + 1'b1;
            k_q   <= j_q;
            state <= S_LACC;
          end else if (32'(j_q) + 2 < K) begin
            j_q   <= j_q + 1'b1;
            i_q   <= j_q + 2'd2;
            k_q   <= j_q + 1'b1;
            state <= S_LACC;
          end else begin
            i_q   <= '0;
            j_q   <= '0;
            k_q   <= '0;
            state <= S_GACC;
          end
        end

        // G^-1: acc = sum_{k=i..K-1} conj(L^-1[k][i]) L^-1[k][j] (48 fraction bits)
        S_GACC: if (32'(k_q) < K) begin
          acc.re <= acc.re + prod.re;
          acc.im <= acc.im + prod.im;
          k_q    <= k_q + 1'b1;
        end else begin
          state <= S_GWR;
        end

        S_GWR: begin
          ginv[i_q][j_q].re <= IW'(shr_sat(acc.re, IFRAC, IW));
          ginv[i_q][j_q].im <= IW'(shr_sat(acc.im, IFRAC, IW));
          ginv[j_q][i_q].re <= IW'(shr_sat(acc.re, IFRAC, IW));
          ginv[j_q][i_q].im <= IW'(-shr_sat(acc.im, IFRAC, IW));
          acc <= '0;
          if (j_q < i_q) begin
            j_q   <= j_q + 1'b1;
            k_q   <= i_q;
            state <= S_GACC;
          end else if (32'(i_q) + 1 < K) begin
            i_q   <= i_q + 1'b1;
            j_q   <= '0;
            k_q   <= i_q + 1'b1;
            state <= S_GACC;
          end else begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
