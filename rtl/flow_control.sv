// flow_control: splits the incoming antenna-vector stream into the pilot path
// and the data path.
//
// Vectors arrive from the OFDM demodulator one subcarrier at a time, N_SUB
// vectors per OFDM symbol, N_SYM symbols per subframe. The block counts
// subcarriers and symbols; the first symbol of every subframe is the uplink
// pilot symbol and goes to channel estimation & pre-processing, all other
// symbols are data and go to detection. Each vector leaves with its
// subcarrier index.
//
// Symbol-type switch: a data symbol may only use detection matrices that have
// been written, and a new pilot symbol overwrites them. So when the symbol
// type changes, the first vector of the new symbol is held until the other
// path has drained: before data, the pilot path must be idle (all W_det of
// the subframe written); before pilots, the data path must be idle. hold
// pulses in each clock a vector is held for this reason.
//
// Interface: valid/ready on the input and on both outputs; each output has a
// one-entry register, so a vector is routed one clock after it is taken and
// the input accepts one vector per clock (initiation interval 1).
// ce_idle / det_idle come from the two paths including their queues.
// Routing by symbol type and the one-vector-per-clock rate follow the source;
// the symbol counting, the drain rule at a switch and N_SYM are this
// design's choices.
module flow_control
  import mimo_pkg::*;
#(
  parameter int unsigned M    = M_ANT,
  parameter int unsigned NSUB = N_SUB,
  parameter int unsigned NSYM = N_SYM,
  localparam int unsigned SCW = $clog2(NSUB)
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the OFDM demodulator
  input  logic               in_valid,
  output logic               in_ready,
  input  cdata_t [M-1:0]     in_y,
  // pilot path
  output logic               p_valid,
  input  logic               p_ready,
  output cdata_t [M-1:0]     p_y,
  output logic   [SCW-1:0]   p_sc,
  // data path
  output logic               d_valid,
  input  logic               d_ready,
  output cdata_t [M-1:0]     d_y,
  output logic   [SCW-1:0]   d_sc,
  // drain status of the two paths
  input  logic               ce_idle,
  input  logic               det_idle,
  // status
  output logic               hold,
  output logic               is_pilot_sym
);

  localparam int unsigned SYW = (NSYM > 1) ? $clog2(NSYM) : 1;

  logic [SCW-1:0] sc_q;
  logic [SYW-1:0] sym_q;
  logic           last_pilot;   // type of the previous symbol routed

  logic cur_pilot, need_switch, path_free, other_quiet, accept;

  always_comb begin
    cur_pilot   = (sym_q == '0);
    need_switch = (cur_pilot != last_pilot);
    path_free   = cur_pilot ? (!p_valid || p_ready) : (!d_valid || d_ready);
    other_quiet = cur_pilot ? (det_idle && !d_valid) : (ce_idle && !p_valid);
    in_ready    = path_free && (!need_switch || other_quiet);
    accept      = in_valid && in_ready;
    hold        = in_valid && path_free && need_switch && !other_quiet;
  end

  assign is_pilot_sym = cur_pilot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_q       <= '0;
      sym_q      <= '0;
      last_pilot <= 1'b1;
      p_valid    <= 1'b0;
      d_valid    <= 1'b0;
      p_y        <= '0;
      d_y        <= '0;
      p_sc       <= '0;
      d_sc       <= '0;
    end else begin
      if (p_valid && p_ready) p_valid <= 1'b0;
      if (d_valid && d_ready) d_valid <= 1'b0;
      if (accept) begin
        last_pilot <= cur_pilot;
        if (cur_pilot) begin
          p_valid <= 1'b1;
          p_y     <= in_y;
          p_sc    <= sc_q;
        end else begin
          d_valid <= 1'b1;
          d_y     <= in_y;
          d_sc    <= sc_q;
        end
        if (32'(sc_q) == NSUB - 1) begin
          sc_q  <= '0;
          sym_q <= (32'(sym_q) == NSYM - 1) ? '0 : sym_q + 1'b1;
        end else begin
          sc_q <= sc_q + 1'b1;
        end
      end
    end
  end

  // An output register is only replaced after it has been taken.
  a_p_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               p_valid && !p_ready |=> p_valid && $stable(p_y) && $stable(p_sc));
  a_d_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               d_valid && !d_ready |=> d_valid && $stable(d_y) && $stable(d_sc));

endmodule
