// Self-checking test of act_queue: a stream of activations is pushed while each of the NPE
// consumers pops at its own random rate. Every consumer must receive the whole stream in order,
// the writer must be stalled while any FIFO is full (and only then), and clr must empty all FIFOs.
module tb_act_queue;
  import ese_pkg::*;
  localparam int NPE = 4, DEPTH = 4, N = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0, in_ready, stall;
  act_t in_data = '0;
  logic [NPE-1:0] pop, empty;
  act_t dout [NPE];
  int sent = 0, got [NPE], nstall = 0;

  act_queue #(.NPE(NPE), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumers
  logic [NPE-1:0] rate_ok;
  logic hold = 1'b0;
  always_comb for (int p = 0; p < NPE; p++) pop[p] = !empty[p] && rst_n && rate_ok[p] && !hold;
  always @(negedge clk) for (int p = 0; p < NPE; p++) rate_ok[p] = ($urandom % (p + 2)) == 0;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPE; p++) if (pop[p]) begin
      checks++;
      if (int'(dout[p]) != (got[p] * 37 + 5) % 30000) begin
        failures++; $display("PE %0d item %0d = %0d", p, got[p], dout[p]);
      end
      got[p]++;
    end
    if (stall) nstall++;
  end

  initial begin
    for (int p = 0; p < NPE; p++) got[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data = act_t'((sent * 37 + 5) % 30000);
      @(posedge clk);
      #1;
      if (in_ready) sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (200) @(posedge clk);
    for (int p = 0; p < NPE; p++) begin
      checks++;
      if (got[p] != N) begin failures++; $display("PE %0d got %0d of %0d", p, got[p], N); end
    end
    checks++;
    if (nstall == 0) begin failures++; $display("writer never stalled"); end
    // clr
    @(negedge clk);
    hold = 1'b1;
    in_valid = 1'b1; in_data = 16'sd1;
    @(negedge clk);
    in_valid = 1'b0; clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    checks++;
    if (empty != '1) begin failures++; $display("clr left data"); end
    $display("stalls=%0d", nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
