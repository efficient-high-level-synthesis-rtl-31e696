// tb_detection: checks zero-forcing detection s_hat = W_det * y.
//
// A behavioural memory (registered read, one clock) holds random detection
// matrices for 4 groups of K = 4 subcarriers (M = 8 antennas to keep the run
// short). Two data symbols of 16 subcarriers each are streamed in. Each
// output entry is compared with an exact integer reference (dot product
// shifted to 12 fraction bits, saturated, one LSB tolerance). Timing checks
// with an always-ready consumer: output K+1 clocks after a cached vector is
// taken, 2K+2 after one that needs a fetch, and one vector every K clocks
// within a group. A write into the cached group must force a fresh fetch
// and its new values must be used. A phase with a random output ready checks
// the stall. Fetches are counted: one per group change.
module tb_detection;
  import mimo_pkg::*;

  localparam int K = 4, M = 8, NSUB = 16;
  localparam int SCW = $clog2(NSUB), AW = $clog2(NSUB);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  cdata_t [M-1:0] in_y = '0;
  logic [SCW-1:0] in_sc = '0;
  logic mem_re, mem_we = 1'b0;
  logic [AW-1:0] mem_raddr, mem_waddr = '0;
  cw_t [M-1:0] mem_rdata = '0;
  logic out_valid, out_ready = 1'b1;
  cdata_t [K-1:0] out_s;
  logic [SCW-1:0] out_sc;
  logic idle, reload;
  cw_t [M-1:0] mem [NSUB];
  int checks = 0, failures = 0, reloads = 0, stalls = 0;

  detection #(.K(K), .M(M), .NSUB(NSUB)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_y, .in_sc,
    .mem_re, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr,
    .out_valid, .out_ready, .out_s, .out_sc, .idle, .reload
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mem_re) mem_rdata <= mem[mem_raddr];
    if (mem_we) mem[mem_waddr] <= '0;   // the test only uses writes as a cache-invalidation event
    if (rst_n && reload) reloads++;
    if (rst_n && out_valid && !out_ready) stalls++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output of one vector
  function automatic cdata_t [K-1:0] ref_s(input cdata_t [M-1:0] y, input int grp);
    cdata_t [K-1:0] s;
    for (int e = 0; e < K; e++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int m = 0; m < M; m++) begin
        longint wr, wi, yr, yi;
        wr = longint'(mem[grp * K + e][m].re); wi = longint'(mem[grp * K + e][m].im);
        yr = longint'(y[m].re);                yi = longint'(y[m].im);
        sr += wr * yr - wi * yi;
        si += wr * yi + wi * yr;
      end
      sr = sr >>> 20; si = si >>> 20;
      s[e].re = DW'((sr > 32767) ? 32767 : (sr < -32768) ? -32768 : sr);
      s[e].im = DW'((si > 32767) ? 32767 : (si < -32768) ? -32768 : si);
    end
    return s;
  endfunction

  // queue of expected results and of acceptance times
  cdata_t [K-1:0] exp_q [$];
  int             sc_q  [$];
  int             lat_q [$];
  int             cyc = 0;
  int             last_accept = -1;
  bit             timing_on = 1'b0;
  bit             prev_fetch = 1'b1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_ready) begin
      int grp;
      bit need_fetch;
      grp = int'(in_sc) / K;
      need_fetch = !(dut.cache_valid && dut.cache_grp == SCW'(grp));
      exp_q.push_back(ref_s(in_y, grp));
      sc_q.push_back(int'(in_sc));
      lat_q.push_back(cyc + (need_fetch ? 2 * K + 2 : K + 1));
      if (timing_on && !need_fetch && !prev_fetch && last_accept >= 0) begin
        checks++;
        if (cyc - last_accept != K) begin failures++; $display("interval %0d", cyc - last_accept); end
      end
      last_accept = cyc;
      prev_fetch  = need_fetch;
    end
    if (rst_n && out_valid && out_ready) begin
      cdata_t [K-1:0] e;
      int s, l;
      e = exp_q.pop_front();
      s = sc_q.pop_front();
      l = lat_q.pop_front();
      for (int k = 0; k < K; k++) begin
        int gr, gi, er, ei;
        gr = int'(out_s[k].re); gi = int'(out_s[k].im);
        er = int'(e[k].re);     ei = int'(e[k].im);
        checks++;
        if (gr - er > 1 || er - gr > 1 || gi - ei > 1 || ei - gi > 1) begin
          failures++;
          $display("sc %0d user %0d got (%0d,%0d) expected (%0d,%0d)", s, k, gr, gi, er, ei);
        end
      end
      checks++;
      if (int'(out_sc) != s) begin failures++; $display("sc %0d expected %0d", out_sc, s); end
      if (timing_on) begin
        checks++;
        if (cyc != l) begin failures++; $display("sc %0d latency off: at %0d expected %0d", s, cyc, l); end
      end
    end
  end

  // offer one vector from a falling edge; it is taken at the first rising
  // edge with in_ready high
  task automatic send(int sc);
    @(negedge clk);
    for (int m = 0; m < M; m++) begin
      in_y[m].re = DW'($signed($urandom_range(0, 16384)) - 8192);
      in_y[m].im = DW'($signed($urandom_range(0, 16384)) - 8192);
    end
    in_sc    = SCW'(sc);
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    in_valid <= 1'b0;
  endtask

  task automatic drain();
    @(negedge clk);
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    for (int a = 0; a < NSUB; a++)
      for (int m = 0; m < M; m++) begin
        mem[a][m].re = WW'($signed($urandom_range(0, 1 << 20)) - (1 << 19));   // +-0.5
        mem[a][m].im = WW'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // symbol 1: back-to-back, always-ready consumer, timing checked
    timing_on = 1'b1;
    for (int sc = 0; sc < NSUB; sc++) send(sc);
    drain();
    @(posedge clk);
    timing_on = 1'b0;
    checks++;
    if (reloads != NSUB / K) begin failures++; $display("fetches %0d expected %0d", reloads, NSUB / K); end
    // a write into the cached group (group 3): new rows must be fetched
    @(negedge clk);
    mem_we = 1'b1; mem_waddr = AW'(NSUB - 2);
    @(negedge clk);
    mem_we = 1'b0;
    @(posedge clk);
    send(NSUB - 1);
    drain();
    checks++;
    if (reloads != NSUB / K + 1) begin failures++; $display("no fetch after write"); end
    // symbol 2: random output stalls
    fork
      begin
        for (int sc = 0; sc < NSUB; sc++) send(sc);
      end
      begin
        repeat (200) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 99) < 40);
        end
        out_ready = 1'b1;
      end
    join
    drain();
    checks++;
    if (stalls == 0) begin failures++; $display("no output stall happened"); end
    checks++;
    if (!idle) begin failures++; $display("not idle at the end"); end
    $display("fetches=%0d stalls=%0d", reloads, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
