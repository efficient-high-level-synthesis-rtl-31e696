// mimo_pkg: types, number formats and small arithmetic helpers shared by the
// uplink massive-MIMO detector.
//
// The detector works on complex fixed-point numbers. Four formats are used,
// each chosen so that the numbers of one processing stage fit with headroom:
//   cdata_t  antenna samples y, channel estimates h and detected symbols s:
//            16-bit two's complement per part, 12 fraction bits (range +-8).
//   cgram_t  Gram matrix G = H^H H and its Cholesky factor L:
//            32-bit, 16 fraction bits.
//   cinv_t   reciprocals of the Cholesky diagonal, L^-1 and G^-1:
//            32-bit, 24 fraction bits.
//   cw_t     detection matrix W_det = G^-1 H^H as stored in the memory:
//            24-bit, 20 fraction bits.
// The widths are this design's own choice; the source only states that the
// data are complex and leaves the fixed-point formats to the HLS library.
package mimo_pkg;

  // ---- system sizes (Table "selected parameters": K = 4, M = 32, Nsub = 600)
  parameter int unsigned K_UE  = 4;    // user equipments served
  parameter int unsigned M_ANT = 32;   // base-station antennas
  parameter int unsigned N_SUB = 600;  // subcarriers per OFDM symbol
  // OFDM symbols per subframe; the first one carries the uplink pilots.
  // The number of data symbols is not given, 14 is an assumption.
  parameter int unsigned N_SYM = 14;

  // ---- number formats
  localparam int unsigned DW    = 16;  // sample width per real part
  localparam int unsigned DFRAC = 12;
  localparam int unsigned GW    = 32;  // Gram / Cholesky width
  localparam int unsigned GFRAC = 16;
  localparam int unsigned IW    = 32;  // inverse width
  localparam int unsigned IFRAC = 24;
  localparam int unsigned WW    = 24;  // detection-matrix width
  localparam int unsigned WFRAC = 20;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cdata_t;

  typedef struct packed {
    logic signed [GW-1:0] re;
    logic signed [GW-1:0] im;
  } cgram_t;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } cinv_t;

  typedef struct packed {
    logic signed [WW-1:0] re;
    logic signed [WW-1:0] im;
  } cw_t;

  // Full-precision complex value used by accumulators (64 bits per part).
  typedef struct packed {
    logic signed [63:0] re;
    logic signed [63:0] im;
  } cacc_t;

  // a * b, or a * conj(b) when conj_b is set; full precision.
  function automatic cacc_t cmul(input logic signed [31:0] are, input logic signed [31:0] aim,
                                 input logic signed [31:0] bre, input logic signed [31:0] bim,
                                 input logic conj_b);
    cacc_t r;
    logic signed [63:0] rr, ii, ri, ir;
    rr = 64'(are) * 64'(bre);
    ii = 64'(aim) * 64'(bim);
    ri = 64'(are) * 64'(bim);
    ir = 64'(aim) * 64'(bre);
    if (conj_b) begin
      r.re = rr + ii;
      r.im = ir - ri;
    end else begin
      r.re = rr - ii;
      r.im = ir + ri;
    end
    return r;
  endfunction

  // Arithmetic shift right by sh with saturation to a signed field of width w.
  function automatic logic signed [63:0] shr_sat(input logic signed [63:0] v,
                                                 input int unsigned sh, input int unsigned w);
    logic signed [63:0] s, hi, lo;
    s  = v >>> sh;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (s > hi) return hi;
    if (s < lo) return lo;
    return s;
  endfunction

endpackage
