// tb_util_pkg: reference arithmetic shared by the testbenches.
//
// Everything here works in double-precision real numbers, independently of
// the fixed-point datapaths it checks: a complex matrix inverse by
// Gauss-Jordan elimination with partial pivoting, the zero-forcing matrix
// W = (H^H H)^-1 H^H, and helpers to draw random numbers and to convert
// between reals and the fixed-point fields of mimo_pkg.
package tb_util_pkg;

  localparam int MAXK = 8;
  localparam int MAXM = 64;

  typedef real kmat_t [MAXK][MAXK];
  typedef real hmat_t [MAXM][MAXK];   // H[m][k]
  typedef real wmat_t [MAXK][MAXM];   // W[k][m]

  // uniform real in [lo, hi)
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  function automatic longint to_fix(real v, int frac);
    real s;
    s = v * (2.0 ** frac);
    return longint'($floor(s + 0.5));
  endfunction

  function automatic real from_fix(longint v, int frac);
    return real'(v) / (2.0 ** frac);
  endfunction

  // In-place inverse of the complex k x k matrix (ar + j ai).
  task automatic cinv(input int k, inout kmat_t ar, inout kmat_t ai);
    kmat_t br, bi;
    for (int r = 0; r < k; r++)
      for (int c = 0; c < k; c++) begin
        br[r][c] = (r == c) ? 1.0 : 0.0;
        bi[r][c] = 0.0;
      end
    for (int c = 0; c < k; c++) begin
      int  piv;
      real best, pr, pi, den, ir, ii;
      piv  = c;
      best = 0.0;
      for (int r = c; r < k; r++) begin
        real mag;
        mag = ar[r][c] * ar[r][c] + ai[r][c] * ai[r][c];
        if (mag > best) begin best = mag; piv = r; end
      end
      for (int x = 0; x < k; x++) begin
        real t;
        t = ar[c][x]; ar[c][x] = ar[piv][x]; ar[piv][x] = t;
        t = ai[c][x]; ai[c][x] = ai[piv][x]; ai[piv][x] = t;
        t = br[c][x]; br[c][x] = br[piv][x]; br[piv][x] = t;
        t = bi[c][x]; bi[c][x] = bi[piv][x]; bi[piv][x] = t;
      end
      pr  = ar[c][c];
      pi  = ai[c][c];
      den = pr * pr + pi * pi;
      ir  = pr / den;
      ii  = -pi / den;
      for (int x = 0; x < k; x++) begin
        real tr, ti;
        tr = ar[c][x] * ir - ai[c][x] * ii; ti = ar[c][x] * ii + ai[c][x] * ir;
        ar[c][x] = tr; ai[c][x] = ti;
        tr = br[c][x] * ir - bi[c][x] * ii; ti = br[c][x] * ii + bi[c][x] * ir;
        br[c][x] = tr; bi[c][x] = ti;
      end
      for (int r = 0; r < k; r++) begin
        real fr, fi;
        if (r == c) continue;
        fr = ar[r][c];
        fi = ai[r][c];
        for (int x = 0; x < k; x++) begin
          ar[r][x] -= fr * ar[c][x] - fi * ai[c][x];
          ai[r][x] -= fr * ai[c][x] + fi * ar[c][x];
          br[r][x] -= fr * br[c][x] - fi * bi[c][x];
          bi[r][x] -= fr * bi[c][x] + fi * br[c][x];
        end
      end
    end
    ar = br;
    ai = bi;
  endtask

  // G = H^H H
  task automatic gram_ref(input int k, input int m, input hmat_t hr, input hmat_t hi,
                          output kmat_t gr, output kmat_t gi);
    for (int i = 0; i < MAXK; i++)
      for (int j = 0; j < MAXK; j++) begin gr[i][j] = 0.0; gi[i][j] = 0.0; end
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++)
        for (int a = 0; a < m; a++) begin
          // conj(H[a][i]) * H[a][j]
          gr[i][j] += hr[a][i] * hr[a][j] + hi[a][i] * hi[a][j];
          gi[i][j] += hr[a][i] * hi[a][j] - hi[a][i] * hr[a][j];
        end
  endtask

  // W = (H^H H)^-1 H^H
  task automatic zf_ref(input int k, input int m, input hmat_t hr, input hmat_t hi,
                        output wmat_t wr, output wmat_t wi);
    kmat_t gr, gi;
    gram_ref(k, m, hr, hi, gr, gi);
    cinv(k, gr, gi);
    for (int i = 0; i < MAXK; i++)
      for (int a = 0; a < MAXM; a++) begin wr[i][a] = 0.0; wi[i][a] = 0.0; end
    for (int i = 0; i < k; i++)
      for (int a = 0; a < m; a++)
        for (int j = 0; j < k; j++) begin
          // Ginv[i][j] * conj(H[a][j])
          wr[i][a] += gr[i][j] * hr[a][j] + gi[i][j] * hi[a][j];
          wi[i][a] += gi[i][j] * hr[a][j] - gr[i][j] * hi[a][j];
        end
  endtask

endpackage
