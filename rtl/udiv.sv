// udiv: iterative unsigned restoring divider, R quotient bits per clock.
//
// Computes q = floor(n / d) for an N_W-bit numerator and a D_W-bit
// denominator. Each step shifts the next numerator bit into the partial
// remainder and subtracts d when it fits; R steps are chained in one clock.
// A zero denominator gives an all-ones quotient. After N_W/R clocks done
// pulses for one clock.
//
// Interface: start is sampled while busy is low; n and d are captured with it.
// Latency: N_W/R + 1 clocks from start to done (13 for the defaults). N_W
// must be a multiple of R. Used by the Cholesky inverter for the reciprocals
// of the factor's diagonal; the method and the steps per clock are this
// design's choices.
module udiv #(
  parameter int unsigned N_W = 48,
  parameter int unsigned D_W = 32,
  parameter int unsigned R   = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] n,
  input  logic [D_W-1:0] d,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] q
);

  localparam int unsigned NCLK = N_W / R;
  localparam int unsigned CW   = $clog2(NCLK + 1);

  logic [N_W-1:0] ns;
  logic [D_W-1:0] dq;
  logic [D_W:0]   rem;
  logic [CW-1:0]  cnt;

  // R chained restoring steps
  logic [N_W-1:0] ns_n, q_n;
  logic [D_W:0]   rem_n;
  always_comb begin
    ns_n  = ns;
    rem_n = rem;
    q_n   = q;
    for (int s = 0; s < int'(R); s++) begin
      logic [D_W:0] rem_sh;
      rem_sh = {rem_n[D_W-1:0], ns_n[N_W-1]};
      ns_n   = ns_n << 1;
      if (rem_sh >= {1'b0, dq}) begin
        rem_n = rem_sh - {1'b0, dq};
        q_n   = {q_n[N_W-2:0], 1'b1};
      end else begin
        rem_n = rem_sh;
        q_n   = {q_n[N_W-2:0], 1'b0};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      ns   <= '0;
      dq   <= '0;
      rem  <= '0;
      q    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          ns   <= n;
          dq   <= d;
          rem  <= '0;
          q    <= '0;
          cnt  <= CW'(NCLK);
        end
      end else begin
        ns  <= ns_n;
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
