// chan_est: least-squares channel estimate of one user from one pilot vector.
//
// In the pilot symbol only user u = subcarrier mod K transmits, with a known
// pilot p of unit magnitude, so the received M x 1 vector is y = h^u * p and
// the channel column follows as h^u = y * conj(p). All M antenna entries are
// multiplied in parallel (the loop over antennas is fully unrolled).
//
// Interface: y (M samples), pilot (one complex value), h (M samples). Purely
// combinational; the caller registers h when it writes the channel buffer.
// Products are rounded toward minus infinity back to the 12-fraction-bit
// sample format and saturated; with pilots from {1, j, -1, -j} the result is
// exact. The estimate formula follows the source; the parallel structure and
// rounding are this design's choices.
module chan_est
  import mimo_pkg::*;
#(
  parameter int unsigned M = M_ANT
) (
  input  cdata_t [M-1:0] y,
  input  cdata_t         pilot,
  output cdata_t [M-1:0] h
);

  always_comb begin
    for (int m = 0; m < M; m++) begin
      cacc_t p;
      p = cmul(32'(y[m].re), 32'(y[m].im), 32'(pilot.re), 32'(pilot.im), 1'b1);
      h[m].re = DW'(shr_sat(p.re, DFRAC, DW));
      h[m].im = DW'(shr_sat(p.im, DFRAC, DW));
    end
  end

endmodule
