// Self-checking test of ptr_read: fills both halves with different increasing pointer lists,
// then reads every column of each half and checks beg = end of the previous column (0 for the
// first) and fin = this column's end; writing one half must not disturb the other.
module tb_ptr_read;
  import ese_pkg::*;
  localparam int NCOL = 64, WDEPTH = 1024;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, wbank = 0, rbank = 0;
  logic [$clog2(NCOL)-1:0] waddr = '0, col = '0;
  logic [$clog2(WDEPTH):0] wdata = '0, beg, fin;
  int ref_p [2][NCOL];

  ptr_read #(.NCOL(NCOL), .WDEPTH(WDEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      int acc;
      acc = 0;
      for (int j = 0; j < NCOL; j++) begin
        acc += $urandom % 8;
        ref_p[b][j] = acc;
        @(negedge clk);
        we = 1; wbank = b[0]; waddr = j[$clog2(NCOL)-1:0]; wdata = ($clog2(WDEPTH)+1)'(acc);
      end
    end
    @(negedge clk);
    we = 0;
    for (int b = 0; b < 2; b++)
      for (int j = 0; j < NCOL; j++) begin
        rbank = b[0]; col = j[$clog2(NCOL)-1:0];
        #1;
        checks += 2;
        if (int'(fin) != ref_p[b][j]) begin failures++; $display("bank %0d col %0d fin %0d", b, j, fin); end
        if (int'(beg) != ((j == 0) ? 0 : ref_p[b][j-1])) begin failures++; $display("bank %0d col %0d beg %0d", b, j, beg); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
