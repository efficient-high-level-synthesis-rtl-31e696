// tb_stream_fifo: checks the block-to-block FIFO.
//
// A producer and a consumer with random valid and ready patterns exchange
// 2000 numbered words through a depth-2 FIFO; every word must arrive once,
// in order. Checked as well: a full FIFO refuses a write unless it is being
// read in the same clock, empty tracks the occupancy, and the FIFO passes one
// word per clock when both sides are always ready.
module tb_stream_fifo;
  localparam int DEPTH = 2;
  typedef logic [15:0] word_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  logic in_ready, out_valid, empty;
  word_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0, occ = 0;
  int p_in = 50, p_out = 50;
  bit full_refused = 0;

  stream_fifo #(.T(word_t), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .empty
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample both sides just before the edge
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (empty != (occ == 0)) begin failures++; $display("empty flag wrong at occupancy %0d", occ); end
    if (in_valid && !in_ready) begin
      checks++;
      if (occ < DEPTH || out_ready) begin failures++; $display("refused with room"); end
      full_refused = 1;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != word_t'(rcvd)) begin failures++; $display("got %0d expected %0d", out_data, rcvd); end
      rcvd++;
    end
    occ = occ + ((in_valid && in_ready) ? 1 : 0) - ((out_valid && out_ready) ? 1 : 0);
    if (in_valid && in_ready) sent++;
  end

  always @(negedge clk) if (rst_n) begin
    in_valid  <= (sent < 2000) && ($urandom_range(0, 99) < p_in);
    in_data   <= word_t'(sent);
    out_ready <= ($urandom_range(0, 99) < p_out);
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent >= 1000);
    p_in = 100; p_out = 100;
    @(posedge clk);
    t0 = rcvd;
    repeat (20) @(posedge clk);
    checks++;
    if (rcvd - t0 < 19) begin failures++; $display("not one word per clock: %0d in 20", rcvd - t0); end
    p_in = 90; p_out = 30;
    wait (sent >= 2000);
    p_out = 100;
    wait (rcvd == 2000);
    checks++;
    if (!full_refused) begin failures++; $display("full condition never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
