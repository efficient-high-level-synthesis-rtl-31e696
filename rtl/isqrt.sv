// isqrt: iterative integer square root, R result bits per clock.
//
// Computes q = floor(sqrt(x)) for an unsigned IN_W-bit x (IN_W even) with the
// classic digit-by-digit (restoring) method: each step brings down two bits
// of x into the remainder and tries to subtract 4*q + 1. R such steps are
// chained in one clock, so after IN_W/(2R) clocks the root is in q and done
// pulses for one clock.
//
// Interface: start is sampled while busy is low; x is captured with it.
// Latency: IN_W/(2R) + 1 clocks from start to done (9 for the defaults).
// IN_W/2 must be a multiple of R. Used by the Cholesky inverter for the
// diagonal of the factor; the method and the number of steps per clock are
// this design's choices, the source names only the Cholesky inversion it
// belongs to.
module isqrt #(
  parameter int unsigned IN_W = 64,
  parameter int unsigned R    = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IN_W-1:0]   x,
  output logic              busy,
  output logic              done,
  output logic [IN_W/2-1:0] q
);

  localparam int unsigned QW  = IN_W / 2;
  localparam int unsigned NCLK = QW / R;
  localparam int unsigned CW  = $clog2(NCLK + 1);

  logic [IN_W-1:0] xs;     // remaining bits of x, top two consumed first
  logic [QW+1:0]   rem;    // partial remainder
  logic [CW-1:0]   cnt;

  // R chained digit steps
  logic [IN_W-1:0] xs_n;
  logic [QW+1:0]   rem_n;
  logic [QW-1:0]   q_n;
  always_comb begin
    xs_n  = xs;
    rem_n = rem;
    q_n   = q;
    for (int s = 0; s < int'(R); s++) begin
      logic [QW+1:0] rem_sh, trial;
      rem_sh = {rem_n[QW-1:0], xs_n[IN_W-1 -: 2]};
      trial  = {q_n, 2'b01};
      xs_n   = xs_n << 2;
      if (rem_sh >= trial) begin
        rem_n = rem_sh - trial;
        q_n   = {q_n[QW-2:0], 1'b1};
      end else begin
        rem_n = rem_sh;
        q_n   = {q_n[QW-2:0], 1'b0};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      xs   <= '0;
      rem  <= '0;
      q    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          xs   <= x;
          rem  <= '0;
          q    <= '0;
          cnt  <= CW'(NCLK);
        end
      end else begin
        xs  <= xs_n;
        rem <= rem_n;
        q   <= q_n;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
