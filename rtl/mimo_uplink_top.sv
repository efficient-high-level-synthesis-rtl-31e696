// mimo_uplink_top: uplink massive-MIMO zero-forcing detector for a base
// station with M antennas serving K single-antenna users on N_SUB subcarriers.
//
// Antenna vectors (one M x 1 complex vector per subcarrier, in subcarrier
// order, from the OFDM demodulator) enter flow_control, which sends the
// vectors of the pilot symbol to chest_preproc and those of data symbols to
// detection. chest_preproc estimates the channel matrix of each group of K
// subcarriers from the pilots and writes its detection matrix
// W_det = (H^H H)^-1 H^H into wdet_mem; detection reads W_det back for the
// data vectors of the same group and outputs s_hat = W_det y, the K users'
// symbols. Small FIFOs couple flow_control to the two paths.
//
// Interface: in_* is the antenna-vector stream (valid/ready); pilot holds the
// K pilot values of unit magnitude; out_* carries the K detected symbols and
// the subcarrier index (valid/ready); npd flags a channel matrix whose Gram
// matrix was not positive definite; ev_* are one-clock event strobes. All
// numbers are complex fixed point, see mimo_pkg. Single clock (200 MHz in the source's implementation), active-low
// asynchronous reset.
// The partition into flow control, channel estimation & pre-processing,
// memory and detection follows the source's block diagram; the FIFOs, the
// handshakes and the drain rule at symbol-type switches are this design's.
module mimo_uplink_top
  import mimo_pkg::*;
#(
  parameter int unsigned K    = K_UE,
  parameter int unsigned M    = M_ANT,
  parameter int unsigned NSUB = N_SUB,
  parameter int unsigned NSYM = N_SYM,
  localparam int unsigned SCW = $clog2(NSUB),
  localparam int unsigned AW  = $clog2(NSUB)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  cdata_t [M-1:0]     in_y,
  input  cdata_t [K-1:0]     pilot,
  output logic               out_valid,
  input  logic               out_ready,
  output cdata_t [K-1:0]     out_s,
  output logic   [SCW-1:0]   out_sc,
  output logic               npd,
  // event strobes for monitoring
  output logic               ev_switch_hold,  // a vector held at a symbol-type switch
  output logic               ev_grp_done,     // a group's W_det fully written
  output logic               ev_reload,       // detection fetched a W_det from memory
  output logic               is_pilot_sym     // the symbol being received is the pilot symbol
);

  typedef struct packed {
    cdata_t [M-1:0]   y;
    logic   [SCW-1:0] sc;
  } vec_t;

  // ---- flow control
  logic   fc_p_valid, fc_p_ready, fc_d_valid, fc_d_ready;
  vec_t   fc_p, fc_d;
  logic   ce_idle, det_idle;

  flow_control #(.M(M), .NSUB(NSUB), .NSYM(NSYM)) u_fc (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_y,
    .p_valid(fc_p_valid), .p_ready(fc_p_ready), .p_y(fc_p.y), .p_sc(fc_p.sc),
    .d_valid(fc_d_valid), .d_ready(fc_d_ready), .d_y(fc_d.y), .d_sc(fc_d.sc),
    .ce_idle, .det_idle, .hold(ev_switch_hold), .is_pilot_sym
  );

  // ---- queues to the two paths
  logic q_p_valid, q_p_ready, q_p_empty;
  logic q_d_valid, q_d_ready, q_d_empty;
  vec_t q_p, q_d;

  stream_fifo #(.T(vec_t), .DEPTH(2)) u_q_pilot (
    .clk, .rst_n,
    .in_valid(fc_p_valid), .in_ready(fc_p_ready), .in_data(fc_p),
    .out_valid(q_p_valid), .out_ready(q_p_ready), .out_data(q_p), .empty(q_p_empty)
  );

  stream_fifo #(.T(vec_t), .DEPTH(2)) u_q_data (
    .clk, .rst_n,
    .in_valid(fc_d_valid), .in_ready(fc_d_ready), .in_data(fc_d),
    .out_valid(q_d_valid), .out_ready(q_d_ready), .out_data(q_d), .empty(q_d_empty)
  );

  // ---- channel estimation & pre-processing
  logic          mem_we;
  logic [AW-1:0] mem_waddr;
  cw_t [M-1:0]   mem_wdata;
  logic          ce_block_idle;

  chest_preproc #(.K(K), .M(M), .NSUB(NSUB)) u_ce (
    .clk, .rst_n,
    .in_valid(q_p_valid), .in_ready(q_p_ready), .in_y(q_p.y), .in_sc(q_p.sc),
    .pilot,
    .mem_we, .mem_waddr, .mem_wdata,
    .idle(ce_block_idle), .grp_done(ev_grp_done), .npd
  );

  // ---- detection-matrix memory
  logic          mem_re;
  logic [AW-1:0] mem_raddr;
  cw_t [M-1:0]   mem_rdata;

  wdet_mem #(.M(M), .DEPTH(NSUB)) u_mem (
    .clk,
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  // ---- detection
  logic det_block_idle;

  detection #(.K(K), .M(M), .NSUB(NSUB)) u_det (
    .clk, .rst_n,
    .in_valid(q_d_valid), .in_ready(q_d_ready), .in_y(q_d.y), .in_sc(q_d.sc),
    .mem_re, .mem_raddr, .mem_rdata,
    .mem_we, .mem_waddr,
    .out_valid, .out_ready, .out_s, .out_sc,
    .idle(det_block_idle), .reload(ev_reload)
  );

  assign ce_idle  = q_p_empty && ce_block_idle;
  assign det_idle = q_d_empty && det_block_idle;

endmodule
