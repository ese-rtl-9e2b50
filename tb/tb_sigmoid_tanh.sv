// Self-checking test of sigmoid_tanh: sweeps the whole Q3.12 input range in both modes and
// compares with the real sigmoid and tanh (computed with $exp); the approximation must stay
// within 0.02 (sigmoid) and 0.04 (tanh) everywhere, be exact at 0, and be monotonic except for
// PLAN's own step at |x| = 2.375 (the two segments meet 0.0039 apart, 16 LSB; 32 LSB for tanh,
// which doubles the sigmoid), which is allowed.
// The reference does not say how sigmoid and tanh are computed; the tolerances are set for the
// piecewise-linear form chosen here.
module tb_sigmoid_tanh;
  import ese_pkg::*;
  int checks = 0, failures = 0;
  act_t x, y;
  logic mode;
  sigmoid_tanh dut (.x, .mode_tanh(mode), .y);

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, ref_v, err, maxerr;
    int prev;
    for (int m = 0; m < 2; m++) begin
      mode = m[0];
      maxerr = 0.0;
      prev = -100000;
      for (int v = -32768; v < 32768; v += 7) begin
        x = act_t'(v);
        #1;
        xr = v / 4096.0;
        ref_v = mode ? (1.0 - 2.0 / (1.0 + $exp(2.0 * xr))) : 1.0 / (1.0 + $exp(-xr));
        err = y / 4096.0 - ref_v;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > (mode ? 0.04 : 0.02)) begin failures++; $display("mode %0d x=%f y=%f ref=%f", m, xr, y / 4096.0, ref_v); end
        checks++;
        if (int'(y) < prev - (mode ? 32 : 16)) begin failures++; $display("not monotonic at %0d", v); end
        prev = int'(y);
      end
      x = '0; #1;
      checks++;
      if (int'(y) != (mode ? 0 : 2048)) begin failures++; $display("mode %0d f(0) = %0d", m, y); end
      $display("mode %0d max error %f", m, maxerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
