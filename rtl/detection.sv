// detection: zero-forcing detection of the K user symbols of one data vector,
// s_hat = W_det * y.
//
// The K subcarriers of a group share one detection matrix. The block keeps
// the rows of the matrix it used last in a local register cache. When a data
// vector of another group arrives (or the cached matrix has been rewritten),
// it first reads the K rows of that group from the detection-matrix memory,
// one row per clock. It then computes one entry of s_hat per clock: entry e
// is the dot product of row e of W_det with the M antenna samples, formed by
// M parallel complex multipliers and an adder tree. After K clocks the K
// entries leave together on the output.
//
// Interface: valid/ready input (vector and subcarrier index), a read port to
// the memory (registered, one clock latency), the memory's write strobe and
// address for cache invalidation, valid/ready output of K detected symbols
// with their subcarrier index, idle when no vector is in work, and reload
// pulsing at each matrix fetch.
// Timing: with the matrix cached, a vector taken in clock t appears on the
// output from clock t+K+1 and a new vector is taken every K clocks; a vector
// that needs a fetch adds K+1 clocks. A full output register stalls the
// block. Reading the memory once per group, one output entry per clock and
// the K-clock rate follow the source; the cache and handshakes are this
// design's choices.
module detection
  import mimo_pkg::*;
#(
  parameter int unsigned K    = K_UE,
  parameter int unsigned M    = M_ANT,
  parameter int unsigned NSUB = N_SUB,
  localparam int unsigned SCW = $clog2(NSUB),
  localparam int unsigned AW  = $clog2(NSUB)
) (
  input  logic               clk,
  input  logic               rst_n,
  // data vectors
  input  logic               in_valid,
  output logic               in_ready,
  input  cdata_t [M-1:0]     in_y,
  input  logic   [SCW-1:0]   in_sc,
  // memory read port
  output logic               mem_re,
  output logic   [AW-1:0]    mem_raddr,
  input  cw_t    [M-1:0]     mem_rdata,
  // memory write snoop
  input  logic               mem_we,
  input  logic   [AW-1:0]    mem_waddr,
  // detected user symbols
  output logic               out_valid,
  input  logic               out_ready,
  output cdata_t [K-1:0]     out_s,
  output logic   [SCW-1:0]   out_sc,
  // status
  output logic               idle,
  output logic               reload
);

  localparam int unsigned XW = $clog2(K + 1);
  localparam int unsigned SH = WFRAC;   // Q.20 * Q.12 -> Q.12

  typedef enum logic [1:0] { D_IDLE, D_LOAD, D_CALC } dstate_t;

  dstate_t        state;
  cw_t [K-1:0][M-1:0] wrow;             // cached matrix rows
  logic [SCW-1:0] cache_grp;
  logic           cache_valid;
  cdata_t [M-1:0] y_q;
  logic [SCW-1:0] sc_q;
  logic [XW-1:0]  e_q;                  // entry being computed / row being read
  logic           rd_pend;
  logic [XW-1:0]  rd_row;
  cdata_t [K-1:0] s_q;

  function automatic logic [XW-1:0] cl(input logic [XW-1:0] x);
    return (32'(x) < K) ? x : XW'(K - 1);
  endfunction

  // ---- one entry of s_hat: row e of W_det times y
  cacc_t  dot;
  cdata_t s_e;
  always_comb begin
    dot = '0;
    for (int m = 0; m < M; m++) begin
      cacc_t p;
      p = cmul(32'(wrow[cl(e_q)][m].re), 32'(wrow[cl(e_q)][m].im),
               32'(y_q[m].re), 32'(y_q[m].im), 1'b0);
      dot.re = dot.re + p.re;
      dot.im = dot.im + p.im;
    end
    s_e.re = DW'(shr_sat(dot.re, SH, DW));
    s_e.im = DW'(shr_sat(dot.im, SH, DW));
  end

  logic [SCW-1:0] in_grp;
  logic           out_free, last_entry, hit;
  always_comb begin
    in_grp     = SCW'(in_sc / SCW'(K));
    out_free   = !out_valid || out_ready;
    last_entry = (state == D_CALC) && (32'(e_q) == K - 1);
    in_ready   = (state == D_IDLE) || (last_entry && out_free);
    hit        = cache_valid && (cache_grp == in_grp);
    mem_re     = (state == D_LOAD) && (32'(e_q) < K);
    mem_raddr  = AW'(32'(cache_grp) * K + 32'(cl(e_q)));
    idle       = (state == D_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= D_IDLE;
      wrow        <= '0;
      cache_grp   <= '0;
      cache_valid <= 1'b0;
      y_q         <= '0;
      sc_q        <= '0;
      e_q         <= '0;
      rd_pend     <= 1'b0;
      rd_row      <= '0;
      s_q         <= '0;
      out_valid   <= 1'b0;
      out_s       <= '0;
      out_sc      <= '0;
      reload      <= 1'b0;
    end else begin
      reload  <= 1'b0;
      rd_pend <= mem_re;
      rd_row  <= e_q;
      if (out_valid && out_ready) out_valid <= 1'b0;

      unique case (state)
        D_IDLE: ;
        D_LOAD: begin
          if (32'(e_q) < K) e_q <= e_q + 1'b1;
          if (rd_pend) begin
            wrow[cl(rd_row)] <= mem_rdata;
            if (32'(rd_row) == K - 1) begin
              cache_valid <= 1'b1;
              e_q         <= '0;
              state       <= D_CALC;
            end
          end
        end
        D_CALC: begin
          s_q[cl(e_q)] <= s_e;
          if (!last_entry) begin
            e_q <= e_q + 1'b1;
          end else if (out_free) begin
            for (int k = 0; k < K; k++) out_s[k] <= (k == K - 1) ? s_e : s_q[k];
            out_sc    <= sc_q;
            out_valid <= 1'b1;
            state     <= D_IDLE;
          end
        end
        default: state <= D_IDLE;
      endcase

      // take a new vector (also in the last compute clock of the previous one)
      if (in_valid && in_ready) begin
        y_q  <= in_y;
        sc_q <= in_sc;
        e_q  <= '0;
        if (hit) begin
          state <= D_CALC;
        end else begin
          cache_grp   <= in_grp;
          cache_valid <= 1'b0;
          reload      <= 1'b1;
          state       <= D_LOAD;
        end
      end

      // a write into the cached group makes the cache stale
      if (mem_we && (32'(mem_waddr) / K == 32'(cache_grp))) cache_valid <= 1'b0;
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_s));

endmodule
