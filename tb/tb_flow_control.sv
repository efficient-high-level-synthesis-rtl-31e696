// tb_flow_control: checks the pilot/data demultiplexer.
//
// Three subframes of 3 symbols x 8 subcarriers are streamed through the
// block (small sizes for a short run). Each vector carries its sequence
// number in antenna 0. Both paths take vectors with random ready patterns,
// and each path reports idle only some clocks after it last took a vector.
// Checked: every vector of symbol 0 of a subframe, and only those, leaves on
// the pilot path, with the right subcarrier index, in order; nothing is lost;
// a vector of the other type is never routed while the other path is busy
// (the hold rule), and hold is seen at each switch; with both paths ready
// and no switch, one vector is taken per clock.
module tb_flow_control;
  import mimo_pkg::*;

  localparam int M = 2, NSUB = 8, NSYM = 3, NFRAMES = 3;
  localparam int NVEC = NSUB * NSYM * NFRAMES;
  localparam int SCW = $clog2(NSUB);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  cdata_t [M-1:0] in_y = '0;
  logic p_valid, d_valid, p_ready = 1'b0, d_ready = 1'b0;
  cdata_t [M-1:0] p_y, d_y;
  logic [SCW-1:0] p_sc, d_sc;
  logic ce_idle, det_idle, hold, is_pilot_sym;
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0, holds = 0, switches_seen = 0;
  int ce_quiet = 100, det_quiet = 100;   // clocks since each path last took a vector
  int rdy_pct = 60;
  bit last_rcv_pilot = 1'b1;

  flow_control #(.M(M), .NSUB(NSUB), .NSYM(NSYM)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_y,
    .p_valid, .p_ready, .p_y, .p_sc, .d_valid, .d_ready, .d_y, .d_sc,
    .ce_idle, .det_idle, .hold, .is_pilot_sym
  );

  assign ce_idle  = (ce_quiet > 6);
  assign det_idle = (det_quiet > 3);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(bit pilot_path, int seq, int sc);
    int pos_in_frame;
    bit exp_pilot;
    pos_in_frame = seq % (NSUB * NSYM);
    exp_pilot    = (pos_in_frame < NSUB);
    checks++;
    if (seq != rcvd) begin failures++; $display("order: got %0d expected %0d", seq, rcvd); end
    checks++;
    if (pilot_path != exp_pilot) begin failures++; $display("vector %0d on wrong path", seq); end
    checks++;
    if (sc != seq % NSUB) begin failures++; $display("vector %0d sc %0d", seq, sc); end
    rcvd++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (hold) holds++;
    if (in_valid && in_ready) begin
      bit pil;
      pil = ((sent % (NSUB * NSYM)) < NSUB);
      // a switch may only be taken when the other path is idle and empty
      if (pil != last_rcv_pilot) begin
        switches_seen++;
        checks++;
        if (pil ? !(det_idle && !d_valid) : !(ce_idle && !p_valid)) begin
          failures++;
          $display("vector %0d switched while the other path was busy", sent);
        end
      end
      last_rcv_pilot = pil;
      sent++;
    end
    ce_quiet  = (p_valid && p_ready) ? 0 : ce_quiet + 1;
    det_quiet = (d_valid && d_ready) ? 0 : det_quiet + 1;
    if (p_valid && p_ready) check_out(1'b1, int'(p_y[0].re), int'(p_sc));
    if (d_valid && d_ready) check_out(1'b0, int'(d_y[0].re), int'(d_sc));
  end

  always @(negedge clk) if (rst_n) begin
    in_valid <= (sent < NVEC);
    in_y[0].re <= DW'(sent);
    p_ready <= ($urandom_range(0, 99) < rdy_pct);
    d_ready <= ($urandom_range(0, 99) < rdy_pct);
  end

  initial begin
    int t0, n0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent >= NSUB + 2);   // inside the first data symbol
    rdy_pct = 100;
    @(posedge clk);
    #1;
    t0 = sent;
    repeat (4) @(posedge clk);
    #1;
    n0 = sent - t0;
    checks++;
    if (n0 != 4) begin failures++; $display("rate: %0d vectors in 4 clocks", n0); end
    rdy_pct = 60;
    wait (rcvd == NVEC);
    checks++;
    if (switches_seen != 2 * NFRAMES - 1) begin failures++; $display("switches %0d", switches_seen); end
    checks++;
    if (holds == 0) begin failures++; $display("hold never seen"); end
    $display("holds=%0d switches=%0d", holds, switches_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
