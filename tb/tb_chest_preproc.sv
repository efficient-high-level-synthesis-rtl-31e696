// tb_chest_preproc: checks channel estimation & pre-processing end to end.
//
// Four groups of K = 4 subcarriers (M = 8 antennas for a short run) get
// random channel matrices with entries within +-0.5. User u's pilot is j^u;
// the pilot vector of subcarrier g*K+u is y = h^u_g * j^u, formed exactly in
// integers. The vectors are offered back to back. Every row written to the
// memory is captured and, at the end, compared with a double-precision
// zero-forcing matrix (H^H H)^-1 H^H of the same quantised channel
// (tolerance 3e-4 absolute plus 0.5 % of the entry). Also checked: each
// address written once, grp_done once per group, no npd, idle at the end,
// input stalls when both channel banks are full, vectors still taken while
// a group is being processed, and a pre-processing time of 211 clocks
// (K = 4) from taking a group's last vector to grp_done.
module tb_chest_preproc;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int K = 4, M = 8, NSUB = 16, NG = NSUB / K;
  localparam int SCW = $clog2(NSUB), AW = $clog2(NSUB);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  cdata_t [M-1:0] in_y = '0;
  logic [SCW-1:0] in_sc = '0;
  cdata_t [K-1:0] pilot;
  logic mem_we;
  logic [AW-1:0] mem_waddr;
  cw_t [M-1:0] mem_wdata;
  logic idle, grp_done, npd;
  int checks = 0, failures = 0;

  hmat_t hr [NG], hi [NG];
  cw_t [M-1:0] got [NSUB];
  int writes [NSUB];
  int stalls = 0, overlap = 0, groups_done = 0, cyc = 0;
  int last_col_cyc [NG];
  int proc_time = -1;

  chest_preproc #(.K(K), .M(M), .NSUB(NSUB)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_y, .in_sc, .pilot,
    .mem_we, .mem_waddr, .mem_wdata, .idle, .grp_done, .npd
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready && dut.pstate != 2'd0) overlap++;
    if (in_valid && in_ready && (int'(in_sc) % K == K - 1)) last_col_cyc[int'(in_sc) / K] = cyc;
    if (mem_we) begin
      got[mem_waddr] = mem_wdata;
      writes[mem_waddr]++;
    end
    if (grp_done) begin
      int g, t;
      g = int'(dut.bank_grp[dut.pb]);
      t = cyc - last_col_cyc[g];
      if (groups_done == 0) begin
        proc_time = t;
        $display("pre-processing time of a group: %0d clocks", t);
      end
      groups_done++;
    end
  end

  // pilot u = j^u
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

  initial begin
    for (int a = 0; a < NSUB; a++) writes[a] = 0;
    // random quantised channels
    for (int g = 0; g < NG; g++)
      for (int m = 0; m < M; m++)
        for (int k = 0; k < K; k++) begin
          hr[g][m][k] = from_fix(to_fix(urand(-0.5, 0.5), DFRAC), DFRAC);
          hi[g][m][k] = from_fix(to_fix(urand(-0.5, 0.5), DFRAC), DFRAC);
        end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int sc = 0; sc < NSUB; sc++) begin
      int g, u;
      g = sc / K;
      u = sc % K;
      @(negedge clk);
      for (int m = 0; m < M; m++) begin
        longint a, b;
        a = to_fix(hr[g][m][u], DFRAC);
        b = to_fix(hi[g][m][u], DFRAC);
        // y = h * j^u
        case (u % 4)
          0: begin in_y[m].re = DW'(a);  in_y[m].im = DW'(b);  end
          1: begin in_y[m].re = DW'(-b); in_y[m].im = DW'(a);  end
          2: begin in_y[m].re = DW'(-a); in_y[m].im = DW'(-b); end
          default: begin in_y[m].re = DW'(b); in_y[m].im = DW'(-a); end
        endcase
      end
      in_sc = SCW'(sc);
      in_valid = 1'b1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      in_valid <= 1'b0;
    end
    while (groups_done < NG) @(posedge clk);
    repeat (3) @(posedge clk);

    checks++;
    if (proc_time != 211) begin failures++; $display("pre-processing time %0d, expected 211", proc_time); end
    checks++;
    if (!idle) begin failures++; $display("not idle at the end"); end
    checks++;
    if (npd) begin failures++; $display("npd set"); end
    checks++;
    if (stalls == 0) begin failures++; $display("input never stalled"); end
    checks++;
    if (overlap == 0) begin failures++; $display("no vector taken during pre-processing"); end
    for (int g = 0; g < NG; g++) begin
      wmat_t wr, wi;
      zf_ref(K, M, hr[g], hi[g], wr, wi);
      for (int r = 0; r < K; r++) begin
        checks++;
        if (writes[g * K + r] != 1) begin
          failures++;
          $display("address %0d written %0d times", g * K + r, writes[g * K + r]);
        end
        for (int m = 0; m < M; m++) begin
          real vr, vi, tr, ti;
          vr = from_fix(longint'(got[g * K + r][m].re), WFRAC);
          vi = from_fix(longint'(got[g * K + r][m].im), WFRAC);
          tr = 3e-4 + 5e-3 * ((wr[r][m] < 0) ? -wr[r][m] : wr[r][m]);
          ti = 3e-4 + 5e-3 * ((wi[r][m] < 0) ? -wi[r][m] : wi[r][m]);
          checks++;
          if (vr - wr[r][m] > tr || wr[r][m] - vr > tr || vi - wi[r][m] > ti || wi[r][m] - vi > ti) begin
            failures++;
            $display("group %0d W[%0d][%0d] got (%f,%f) expected (%f,%f)", g, r, m, vr, vi, wr[r][m], wi[r][m]);
          end
        end
      end
    end
    $display("stalls=%0d overlapped=%0d groups=%0d", stalls, overlap, groups_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
