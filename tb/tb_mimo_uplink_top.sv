// tb_mimo_uplink_top: end-to-end test of the uplink detector.
//
// NF subframes are streamed into the top. Each subframe has its own random
// channel per group of K subcarriers (entries within +-0.5). In the pilot
// symbol, subcarrier g*K+u carries y = h^u_g * p_u with p_u = j^u; in every
// data symbol, subcarrier sc carries y = H_g s with random QPSK symbols
// s = (+-0.5, +-0.5j) for all K users (noiseless channel). Every detected
// symbol must equal the transmitted one within 0.01 and must decide to the
// right QPSK point. The consumer's ready is random for part of the run.
// Counted, and each required to happen: pilot-path stalls (input held
// because pre-processing is behind), holds at a symbol-type switch, groups
// whose W_det was written (exactly NSUB/K per subframe), matrix fetches by
// detection and vectors served from its cache, output back-pressure, and
// no non-positive-definite flag. The symbol rate in the data symbols is
// checked too: within one data symbol (no back-pressure) the outputs come
// one per K clocks plus one K+1-clock matrix fetch per group; and while the
// input is backed up in a pilot symbol, a group of W_det rows is finished at
// least every 214 clocks (K = 4).
module tb_mimo_uplink_top;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int K = 4, M = 8, NSUB = 16, NSYM = 3, NF = 2;
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

  mimo_uplink_top #(.K(K), .M(M), .NSUB(NSUB), .NSYM(NSYM)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_y, .pilot,
    .out_valid, .out_ready, .out_s, .out_sc, .npd,
    .ev_switch_hold, .ev_grp_done, .ev_reload, .is_pilot_sym
  );

`include "tb_uplink_body.svh"

endmodule
