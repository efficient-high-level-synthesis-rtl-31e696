// tb_uplink_body.svh: stimulus, reference and checks shared by the
// end-to-end testbenches of mimo_uplink_top (the small-size run and the
// full-size run). Expects K, M, NSUB, NSYM, NF, NG, SCW, NDATA and the DUT
// signals to be declared by the including module.

  int checks = 0, failures = 0;
  int n_pilot_stall = 0, n_hold = 0, n_grp = 0, n_reload = 0, n_out = 0, n_backpressure = 0;
  int cyc = 0;
  int rate_t0 = -1, rate_n = 0, rate_t1 = 0;
  int grp_last = 0, grp_gap_max = 0;   // clocks between W_det groups of one pilot symbol
  bit random_ready = 1'b0;

  hmat_t hr [NG], hi [NG];
  int    exp_sc [$];
  real   exp_re [$], exp_im [$];

  always #5 clk = ~clk;

  initial begin
    repeat (200 * (NSUB * NSYM * NF) * 2 + 600 * NG * NF) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < K; u++) begin
      case (u % 4)
        0: begin pilot[u].re = DW'(4096);  pilot[u].im = '0;         end
        1: begin pilot[u].re = '0;         pilot[u].im = DW'(4096);  end
        2: begin pilot[u].re = DW'(-4096); pilot[u].im = '0;         end
        default: begin pilot[u].re = '0;   pilot[u].im = DW'(-4096); end
      endcase
    end
  end

  // ---- monitors
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready && is_pilot_sym && !ev_switch_hold) n_pilot_stall++;
    if (ev_switch_hold) n_hold++;
    if (ev_grp_done) begin
      if (n_grp % NG != 0 && cyc - grp_last > grp_gap_max) grp_gap_max = cyc - grp_last;
      grp_last = cyc;
      n_grp++;
    end
    if (ev_reload) n_reload++;
    if (npd) begin
      checks++;
      failures++;
      $display("npd raised");
    end
    if (out_valid && !out_ready) n_backpressure++;
    if (out_valid && out_ready) begin
      int s;
      s = exp_sc.pop_front();
      checks++;
      if (int'(out_sc) != s) begin failures++; $display("output sc %0d expected %0d", out_sc, s); end
      for (int k = 0; k < K; k++) begin
        real er, ei, gr, gi;
        er = exp_re.pop_front();
        ei = exp_im.pop_front();
        gr = from_fix(longint'(out_s[k].re), DFRAC);
        gi = from_fix(longint'(out_s[k].im), DFRAC);
        checks++;
        if (gr - er > 0.01 || er - gr > 0.01 || gi - ei > 0.01 || ei - gi > 0.01 ||
            (gr > 0) != (er > 0) || (gi > 0) != (ei > 0)) begin
          failures++;
          if (failures < 20)
            $display("sc %0d user %0d got (%f,%f) sent (%f,%f)", s, k, gr, gi, er, ei);
        end
      end
      n_out++;
      if (rate_t0 >= 0 && rate_n >= 0) begin
        rate_n++;
        rate_t1 = cyc;
      end
    end
  end

  task automatic offer(input cdata_t [M-1:0] y);
    @(negedge clk);
    in_y = y;
    in_valid = 1'b1;
    #2;
    while (!in_ready) begin @(negedge clk); #2; end
    @(posedge clk);
    in_valid <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NF; f++) begin
      // new channel for every group
      for (int g = 0; g < NG; g++)
        for (int m = 0; m < M; m++)
          for (int k = 0; k < K; k++) begin
            hr[g][m][k] = from_fix(to_fix(urand(-0.5, 0.5), DFRAC), DFRAC);
            hi[g][m][k] = from_fix(to_fix(urand(-0.5, 0.5), DFRAC), DFRAC);
          end
      for (int sym = 0; sym < NSYM; sym++) begin
        random_ready = (f == NF - 1) && (sym == NSYM - 1);
        for (int sc = 0; sc < NSUB; sc++) begin
          cdata_t [M-1:0] y;
          int g, u;
          g = sc / K;
          u = sc % K;
          if (sym == 0) begin
            for (int m = 0; m < M; m++) begin
              real a, b, yr, yi;
              a = hr[g][m][u];
              b = hi[g][m][u];
              case (u % 4)
                0: begin yr = a;  yi = b;  end
                1: begin yr = -b; yi = a;  end
                2: begin yr = -a; yi = -b; end
                default: begin yr = b; yi = -a; end
              endcase
              y[m].re = DW'(to_fix(yr, DFRAC));
              y[m].im = DW'(to_fix(yi, DFRAC));
            end
          end else begin
            real sr [K], si [K];
            for (int k = 0; k < K; k++) begin
              sr[k] = ($urandom_range(0, 1) != 0) ? 0.5 : -0.5;
              si[k] = ($urandom_range(0, 1) != 0) ? 0.5 : -0.5;
              exp_re.push_back(sr[k]);
              exp_im.push_back(si[k]);
            end
            exp_sc.push_back(sc);
            for (int m = 0; m < M; m++) begin
              real yr, yi;
              yr = 0.0; yi = 0.0;
              for (int k = 0; k < K; k++) begin
                yr += hr[g][m][k] * sr[k] - hi[g][m][k] * si[k];
                yi += hr[g][m][k] * si[k] + hi[g][m][k] * sr[k];
              end
              y[m].re = DW'(to_fix(yr, DFRAC));
              y[m].im = DW'(to_fix(yi, DFRAC));
            end
          end
          // measure the output rate over the first data symbol
          if (f == 0 && sym == 1 && sc == 0) begin rate_t0 = -1; rate_n = -1; end
          offer(y);
          if (f == 0 && sym == 1 && sc == K) begin rate_t0 = cyc; rate_n = 0; end
          if (f == 0 && sym == 2 && sc == 0) rate_n = -1 - rate_n;   // freeze the count
        end
      end
    end
    while (n_out < NDATA) @(posedge clk);
    repeat (5) @(posedge clk);

    // output rate within the first data symbol: one vector per K clocks
    begin
      int n;
      real per;
      n = -1 - rate_n;
      per = real'(rate_t1 - rate_t0) / real'((n > 1) ? n - 1 : 1);
      $display("data-symbol output interval: %f clocks per vector over %0d vectors", per, n);
      checks++;
      // K clocks per vector, plus one K+1-clock matrix fetch per group of K
      if (per > real'(K) + real'(K + 1) / real'(K) + 0.25) begin
        failures++;
        $display("data rate too low");
      end
    end
    // pilot path: with the input backed up, one group every 214 clocks (K = 4)
    $display("largest interval between groups of a pilot symbol: %0d clocks", grp_gap_max);
    if (K == 4) begin
      checks++;
      if (grp_gap_max > 214) begin failures++; $display("pilot path slower than one group per 214 clocks"); end
    end
    checks++;
    if (n_grp != NG * NF) begin failures++; $display("groups written %0d, expected %0d", n_grp, NG * NF); end
    checks++;
    if (n_reload < NG * NF) begin failures++; $display("only %0d matrix fetches", n_reload); end
    checks++;
    if (n_out - n_reload <= 0) begin failures++; $display("no vector served from the cache"); end
    checks++;
    if (n_hold == 0) begin failures++; $display("no hold at a symbol switch"); end
    checks++;
    if (n_pilot_stall == 0) begin failures++; $display("pilot path never stalled"); end
    checks++;
    if (n_backpressure == 0) begin failures++; $display("output back-pressure never happened"); end
    $display("outputs=%0d pilot_stalls=%0d switch_holds=%0d groups=%0d fetches=%0d cache_hits=%0d backpressure=%0d clocks=%0d",
             n_out, n_pilot_stall, n_hold, n_grp, n_reload, n_out - n_reload, n_backpressure, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    #1;
    out_ready = random_ready ? ($urandom_range(0, 99) < 50) : 1'b1;
  end
