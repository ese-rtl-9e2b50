// Self-checking test of adder_tree: random and extreme operands, compared with the saturated
// sum a + b + c.
module tb_adder_tree;
  import ese_pkg::*;
  int checks = 0, failures = 0;
  act_t a, b, c, y;
  adder_tree dut (.a, .b, .c, .y);

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int n = 0; n < 2000; n++) begin
      a = act_t'($urandom); b = act_t'($urandom); c = act_t'($urandom);
      if (n % 2 == 0) begin a = a >>> 3; b = b >>> 3; c = c >>> 3; end
      #1;
      e = int'(a) + int'(b) + int'(c);
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      checks++;
      if (int'(y) != e) begin failures++; $display("%0d+%0d+%0d -> %0d", a, b, c, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
