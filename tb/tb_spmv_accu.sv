// Self-checking test of spmv_accu: random products (including back-to-back hits on the same
// row) are accumulated into two banks; after a clear the bank must restart from zero. The
// results read through the read port must equal the sums of a*w, and an update must be
// visible two cycles after its input.
module tb_spmv_accu;
  import ese_pkg::*;
  localparam int ROWS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, clr_bank = 0, in_valid = 0, in_bank = 0, busy, rd_bank = 0;
  act_t in_a = '0;
  wgt_t in_w = '0;
  logic [$clog2(ROWS)-1:0] in_row = '0, rd_row = '0;
  acc_t rd_data;
  longint sums [2][ROWS];

  spmv_accu #(.ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < ROWS; r++) begin
        rd_bank = b[0]; rd_row = r[$clog2(ROWS)-1:0];
        #1;
        checks++;
        if (longint'(rd_data) != sums[b][r]) begin
          failures++; $display("bank %0d row %0d = %0d expected %0d", b, r, rd_data, sums[b][r]);
        end
      end
  endtask

  initial begin
    for (int b = 0; b < 2; b++) for (int r = 0; r < ROWS; r++) sums[b][r] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      @(negedge clk);
      clr = 1; clr_bank = round[0];
      for (int r = 0; r < ROWS; r++) sums[round[0]][r] = 0;
      @(negedge clk);
      clr = 0;
      for (int n = 0; n < 300; n++) begin
        in_valid = 1; in_bank = ($urandom % 4 == 0) ? ~round[0] : round[0];
        in_a = act_t'($urandom); in_w = wgt_t'($urandom);
        in_row = (n % 7 == 0) ? in_row : $clog2(ROWS)'($urandom);
        sums[in_bank][in_row] += longint'(in_a) * longint'(in_w);
        // keep the reference in 32-bit two's complement like the accumulator
        sums[in_bank][in_row] = longint'(signed'(32'(sums[in_bank][in_row])));
        @(negedge clk);
      end
      in_valid = 0;
      // latency: not yet complete one cycle after the last input, complete after two
      checks++;
      if (!busy) begin failures++; $display("busy low with a product in flight"); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy high after drain"); end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
