// chest_preproc: channel estimation and pre-processing of the pilot symbol.
//
// In the pilot symbol, subcarrier sc carries the pilot of user u = sc mod K
// only, and the K subcarriers of group g = sc / K share one channel matrix H_g.
// For every pilot vector the block estimates one channel column,
// h^u = y * conj(p_u) (chan_est), and stores it. When the K-th column of a
// group has arrived, it turns H_g into the zero-forcing detection matrix
//     W_det = (H^H H)^-1 H^H
// in three steps: gram (G = H^H H), cholinv (G^-1 through a Cholesky factor)
// and wdet_mult (G^-1 H^H). The K rows of W_det are written to the
// detection-matrix memory at addresses g*K .. g*K+K-1.
//
// The channel buffer has two banks (ping-pong): while one group is being
// pre-processed, the columns of the next group are estimated into the other
// bank, so the per-vector estimation keeps running during the long inversion.
// When both banks are full, in_ready falls and the input stalls.
//
// Interface: valid/ready input of one antenna vector with its subcarrier
// index; pilot holds the K pilot values (unit magnitude); a write port to the
// memory; idle is high when no column is buffered and no group is in work;
// grp_done pulses when a group's rows are all written; npd reports a
// non-positive pivot seen by the inversion. Timing: a vector is taken in the
// clock it is offered when a bank is free; for K = 4, grp_done follows the
// clock that took a group's last vector by 211 clocks (Gram 11, inversion
// 185, W_det 17, hand-over cycles), when no other group is ahead of it.
// The split into estimation and pre-processing steps, the per-group sharing
// of H and the storing of W_det follow the source; the buffer organisation,
// handshake and schedule are this design's choices.
module chest_preproc
  import mimo_pkg::*;
#(
  parameter int unsigned K     = K_UE,
  parameter int unsigned M     = M_ANT,
  parameter int unsigned NSUB  = N_SUB,
  localparam int unsigned SCW  = $clog2(NSUB),
  localparam int unsigned AW   = $clog2(NSUB)
) (
  input  logic                clk,
  input  logic                rst_n,
  // pilot vectors
  input  logic                in_valid,
  output logic                in_ready,
  input  cdata_t [M-1:0]      in_y,
  input  logic   [SCW-1:0]    in_sc,
  input  cdata_t [K-1:0]      pilot,
  // detection-matrix memory write port
  output logic                mem_we,
  output logic   [AW-1:0]     mem_waddr,
  output cw_t    [M-1:0]      mem_wdata,
  // status
  output logic                idle,
  output logic                grp_done,
  output logic                npd
);

  localparam int unsigned XW = $clog2(K + 1);
  localparam int unsigned UW = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [1:0] { P_IDLE, P_GRAM, P_CHOL, P_WDET } pstate_t;

  // ---- channel estimation of the offered vector
  logic [SCW-1:0] u_idx, g_idx;
  cdata_t [M-1:0] h_est;

  always_comb begin
    u_idx = SCW'(in_sc % SCW'(K));
    g_idx = SCW'(in_sc / SCW'(K));
  end

  chan_est #(.M(M)) u_est (
    .y(in_y), .pilot(pilot[u_idx[UW-1:0]]), .h(h_est)
  );

  // ---- two-bank channel buffer
  cdata_t [1:0][K-1:0][M-1:0] hbuf;
  logic   [1:0]               bank_full;
  logic   [1:0][SCW-1:0]      bank_grp;
  logic                       wb, pb;          // bank being filled / processed
  pstate_t                    pstate;

  assign in_ready = !bank_full[wb];
  wire accept   = in_valid && in_ready;
  wire last_col = (32'(u_idx) == K - 1);

  // ---- pre-processing units
  logic gram_start, gram_busy, gram_done;
  logic chol_start, chol_busy, chol_done, chol_npd;
  logic wd_start, wd_busy, wd_done, wd_row_valid;
  logic [XW-1:0] wd_row_idx;
  cgram_t [K-1:0][K-1:0] g_mat;
  cinv_t  [K-1:0][K-1:0] ginv;
  cw_t    [M-1:0]        wd_row;

  gram #(.K(K), .M(M)) u_gram (
    .clk, .rst_n, .start(gram_start), .hcol(hbuf[pb]),
    .busy(gram_busy), .done(gram_done), .g(g_mat)
  );

  cholinv #(.K(K)) u_chol (
    .clk, .rst_n, .start(chol_start), .g(g_mat),
    .busy(chol_busy), .done(chol_done), .npd(chol_npd), .ginv(ginv)
  );

  wdet_mult #(.K(K), .M(M)) u_wdet (
    .clk, .rst_n, .start(wd_start), .ginv(ginv), .hcol(hbuf[pb]),
    .busy(wd_busy), .done(wd_done),
    .row_valid(wd_row_valid), .row_idx(wd_row_idx), .row(wd_row)
  );

  assign gram_start = (pstate == P_IDLE) && bank_full[pb];
  assign chol_start = (pstate == P_GRAM) && gram_done;
  assign wd_start   = (pstate == P_CHOL) && chol_done;

  assign mem_we    = wd_row_valid;
  assign mem_waddr = AW'(32'(bank_grp[pb]) * K + 32'(wd_row_idx));
  assign mem_wdata = wd_row;

  // A bank that has some but not all columns of a group also counts as work.
  logic anything_partial;

  assign idle = (bank_full == 2'b00) && (pstate == P_IDLE) && !wd_busy && !chol_busy && !gram_busy
                && !anything_partial;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hbuf             <= '0;
      bank_full        <= '0;
      bank_grp         <= '0;
      wb               <= 1'b0;
      pb               <= 1'b0;
      pstate           <= P_IDLE;
      grp_done         <= 1'b0;
      npd              <= 1'b0;
      anything_partial <= 1'b0;
    end else begin
      grp_done <= 1'b0;

      // estimation side
      if (accept) begin
        hbuf[wb][u_idx[UW-1:0]] <= h_est;
        if (last_col) begin
          bank_full[wb]    <= 1'b1;
          bank_grp[wb]     <= g_idx;
          wb               <= ~wb;
          anything_partial <= 1'b0;
        end else begin
          anything_partial <= 1'b1;
        end
      end

      // pre-processing side
      unique case (pstate)
        P_IDLE: if (bank_full[pb]) pstate <= P_GRAM;
        P_GRAM: if (gram_done) pstate <= P_CHOL;
        P_CHOL: if (chol_done) begin
          pstate <= P_WDET;
          if (chol_npd) npd <= 1'b1;
        end
        P_WDET: if (wd_done) begin
          bank_full[pb] <= 1'b0;
          pb            <= ~pb;
          grp_done      <= 1'b1;
          pstate        <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // The columns of one group must arrive in user order 0..K-1.
  logic [XW-1:0] exp_u;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) exp_u <= '0;
    else if (accept) exp_u <= last_col ? '0 : exp_u + 1'b1;
  end
  a_col_order: assert property (@(posedge clk) disable iff (!rst_n)
                                accept |-> (32'(u_idx) == 32'(exp_u)));

endmodule
