// Self-checking test of elem_mul: random and corner operands for the plain multiplier and the
// multiply-add variant, compared with floor((a*b + c*d) / 4096) saturated to 16 bits.
module tb_elem_mul;
  import ese_pkg::*;
  int checks = 0, failures = 0;
  act_t a, b, c, d, y0, y1;
  elem_mul #(.HAS_ADD(1'b0)) u0 (.a, .b, .c, .d, .y(y0));
  elem_mul #(.HAS_ADD(1'b1)) u1 (.a, .b, .c, .d, .y(y1));

  function automatic int expect_v(longint v);
    longint q;
    q = v >>> 12;
    if (q > 32767) return 32767;
    if (q < -32768) return -32768;
    return int'(q);
  endfunction

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      if (n < 4) begin
        a = (n[0]) ? 16'sh7fff : 16'sh8000; b = (n[1]) ? 16'sh7fff : 16'sh8000;
        c = 16'sh8000; d = 16'sh8000;
      end else begin
        a = act_t'($urandom); b = act_t'($urandom); c = act_t'($urandom); d = act_t'($urandom);
        if (n % 3 == 0) begin a = a >>> 4; b = b >>> 4; c = c >>> 4; d = d >>> 4; end
      end
      #1;
      checks += 2;
      if (int'(y0) != expect_v(longint'(a) * b)) begin
        failures++; $display("mul %0d*%0d -> %0d", a, b, y0);
      end
      if (int'(y1) != expect_v(longint'(a) * b + longint'(c) * d)) begin
        failures++; $display("mac %0d*%0d+%0d*%0d -> %0d", a, b, c, d, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
