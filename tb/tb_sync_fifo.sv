// Self-checking test of sync_fifo against a queue model: random pushes and pops (including
// pushes into a full FIFO and pops from an empty one, which must be ignored), occasional clears,
// and checks of dout, full, empty and count after every cycle. Depth 8, 16-bit words.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] q [$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, balanced
      clr  = ($urandom % 300 == 0);
      push = ($urandom % 100) < ((i / 500) % 3 == 0 ? 80 : (i / 500) % 3 == 1 ? 20 : 50);
      pop  = ($urandom % 100) < ((i / 500) % 3 == 0 ? 20 : (i / 500) % 3 == 1 ? 80 : 50);
      din  = W'($urandom);
      checks += 4;
      if (int'(count) != q.size()) begin failures++; $display("count %0d, model %0d", count, q.size()); end
      if (empty != (q.size() == 0)) begin failures++; $display("empty flag"); end
      if (full != (q.size() == DEPTH)) begin failures++; $display("full flag"); end
      if (q.size() != 0 && dout != q[0]) begin failures++; $display("dout %h, model %h", dout, q[0]); end
      @(posedge clk);
      if (clr) q.delete();
      else begin
        bit can_pop, can_push;
        can_pop = pop && q.size() != 0;
        can_push = push && q.size() != DEPTH;
        if (can_pop) void'(q.pop_front());
        if (can_push) q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
