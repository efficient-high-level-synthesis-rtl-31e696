// tb_mimo_uplink_full: end-to-end test of mimo_uplink_top at its default,
// full size: K = 4 users, M = 32 antennas, 600 subcarriers and 14 OFDM
// symbols per subframe (one pilot symbol, 13 data symbols), i.e. 150 groups
// of four subcarriers, 600 channel-estimation vectors and 7800 data vectors.
//
// The top is instantiated without parameter overrides. One subframe is sent;
// stimulus, reference and checks are the same as in tb_mimo_uplink_top (see
// tb_uplink_body.svh): noiseless QPSK over random per-group channels, every
// detected symbol checked, every mechanism counted, and the data-symbol
// output interval and the pilot-path group interval checked.
module tb_mimo_uplink_full;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int K = K_UE, M = M_ANT, NSUB = N_SUB, NSYM = N_SYM, NF = 1;
  localparam int NG = NSUB / K;
  localparam int SCW = $clog2(NSUB);
  localparam int NDATA = NSUB * (NSYM - 1) * NF;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  cdata_t [M-1:0] in_y = '0;
  cdata_t [K-1:0] pilot;
  logic out_valid, out_ready = 1'b1;
  cdata_t [K-1:0] out_s;
  logic [SCW-1:0] out_sc;
  logic npd, ev_switch_hold, ev_grp_done, ev_reload, is_pilot_sym;

  mimo_uplink_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_y, .pilot,
    .out_valid, .out_ready, .out_s, .out_sc, .npd,
    .ev_switch_hold, .ev_grp_done, .ev_reload, .is_pilot_sym
  );

`include "tb_uplink_body.svh"

endmodule
