// tb_chan_est: checks the pilot-based channel estimate h = y * conj(p).
//
// Random antenna vectors are combined with each of the four unit pilots
// {1, j, -1, -j}, for which the estimate is an exact rotation of y, and with
// a general unit-magnitude pilot (0.6 + 0.8j), checked against a real-valued
// reference to within one LSB. Saturation is checked with a full-scale
// input. The unit is combinational; outputs are sampled after a short delay.
module tb_chan_est;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int M = 8;

  cdata_t [M-1:0] y, h;
  cdata_t         pilot;
  int checks = 0, failures = 0;

  chan_est #(.M(M)) dut (.y(y), .pilot(pilot), .h(h));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clamp16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  task automatic check_one(int m, longint er, longint ei, longint tol);
    longint gr, gi;
    checks++;
    gr = longint'(h[m].re);
    gi = longint'(h[m].im);
    if ((gr - er > tol) || (er - gr > tol) || (gi - ei > tol) || (ei - gi > tol)) begin
      failures++;
      $display("mismatch m=%0d got (%0d,%0d) expected (%0d,%0d)", m, gr, gi, er, ei);
    end
  endtask

  initial begin
    const int one = 1 << DFRAC;
    for (int it = 0; it < 50; it++) begin
      for (int m = 0; m < M; m++) begin
        y[m].re = DW'($urandom_range(0, 16'hffff));
        y[m].im = DW'($urandom_range(0, 16'hffff));
        if (y[m].re == -16'sd32768) y[m].re = 16'sd5;
        if (y[m].im == -16'sd32768) y[m].im = -16'sd5;
      end
      for (int p = 0; p < 4; p++) begin
        case (p)
          0: begin pilot.re = DW'(one);  pilot.im = '0;         end
          1: begin pilot.re = '0;        pilot.im = DW'(one);   end
          2: begin pilot.re = DW'(-one); pilot.im = '0;         end
          default: begin pilot.re = '0;  pilot.im = DW'(-one);  end
        endcase
        #1;
        for (int m = 0; m < M; m++) begin
          longint yr, yi;
          yr = longint'(y[m].re);
          yi = longint'(y[m].im);
          case (p)
            0: check_one(m,  yr,  yi, 0);  // y * 1
            1: check_one(m,  yi, -yr, 0);  // y * (-j)
            2: check_one(m, -yr, -yi, 0);  // y * (-1)
            default: check_one(m, -yi, yr, 0);  // y * j
          endcase
        end
      end
      // general unit pilot 0.6 + 0.8j
      pilot.re = DW'(to_fix(0.6, DFRAC));
      pilot.im = DW'(to_fix(0.8, DFRAC));
      #1;
      for (int m = 0; m < M; m++) begin
        real yr, yi, pr, pim, er, ei;
        yr = from_fix(longint'(y[m].re), DFRAC); yi = from_fix(longint'(y[m].im), DFRAC);
        pr = from_fix(longint'(pilot.re), DFRAC); pim = from_fix(longint'(pilot.im), DFRAC);
        er = yr * pr + yi * pim;
        ei = yi * pr - yr * pim;
        check_one(m, clamp16(longint'($floor(er * 4096.0))), clamp16(longint'($floor(ei * 4096.0))), 1);
      end
    end
    // saturation: 7.99 * (1 + j)conj -> real part exceeds +8
    for (int m = 0; m < M; m++) begin
      y[m].re = 16'sh7fff; y[m].im = -16'sh7fff;
    end
    pilot.re = DW'(to_fix(0.7071, DFRAC)); pilot.im = DW'(-to_fix(0.7071, DFRAC));
    #1;
    for (int m = 0; m < M; m++) begin
      checks++;
      if (h[m].re != 16'sh7fff) begin
        failures++;
        $display("no saturation m=%0d got %0d", m, h[m].re);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
