// tb_wdet_mem: checks the detection-matrix memory.
//
// Random rows are written to every address, then read back in random order
// and compared with a scoreboard; read data must appear exactly one clock
// after the read strobe and hold while no read is issued. A read and a write
// of the same address in one clock must return the old word.
module tb_wdet_mem;
  import mimo_pkg::*;

  localparam int M     = 4;
  localparam int DEPTH = 24;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  cw_t [M-1:0] wdata = '0, rdata;
  cw_t [M-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  wdet_mem #(.M(M), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cw_t [M-1:0] rnd_row();
    cw_t [M-1:0] r;
    for (int m = 0; m < M; m++) begin
      r[m].re = WW'($urandom);
      r[m].im = WW'($urandom);
    end
    return r;
  endfunction

  initial begin
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = rnd_row();
      we <= 1'b1; waddr <= AW'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      re <= 1'b1; raddr <= AW'(a);
      @(posedge clk);
      re <= 1'b0;
      #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("read %0d mismatch", a); end
      @(posedge clk);   // no read: data must hold
      #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("read %0d not held", a); end
    end
    // read-during-write of the same address returns the old word
    for (int t = 0; t < 20; t++) begin
      int a;
      cw_t [M-1:0] old;
      a = $urandom_range(0, DEPTH - 1);
      old = model[a];
      model[a] = rnd_row();
      we <= 1'b1; waddr <= AW'(a); wdata <= model[a];
      re <= 1'b1; raddr <= AW'(a);
      @(posedge clk);
      we <= 1'b0; re <= 1'b0;
      #1;
      checks++;
      if (rdata != old) begin failures++; $display("read-during-write %0d wrong", a); end
      re <= 1'b1;
      @(posedge clk);
      re <= 1'b0;
      #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("new word %0d wrong", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
