// Self-checking test of output_buffer: all channels write their y_t streams at once (each
// with its own order), then the host reads every (channel, index) back.
module tb_output_buffer;
  import ese_pkg::*;
  localparam int NCH = 4, NY = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [NCH-1:0] we = '0;
  logic [$clog2(NY)-1:0] waddr [NCH];
  act_t wdata [NCH];
  logic [$clog2(NCH)-1:0] rch = '0;
  logic [$clog2(NY)-1:0] raddr = '0;
  act_t rdata;
  int Y [NCH][NY];

  output_buffer #(.NCH(NCH), .NY(NY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) for (int i = 0; i < NY; i++) Y[c][i] = int'($urandom % 65536) - 32768;
    for (int i = 0; i < NY; i++) begin
      @(negedge clk);
      we = '1;
      for (int c = 0; c < NCH; c++) begin
        waddr[c] = $clog2(NY)'((i * (2 * c + 1)) % NY);
        wdata[c] = act_t'(Y[c][(i * (2 * c + 1)) % NY]);
      end
    end
    @(negedge clk);
    we = '0;
    for (int c = 0; c < NCH; c++) for (int i = 0; i < NY; i++) begin
      rch = $clog2(NCH)'(c); raddr = $clog2(NY)'(i);
      #1;
      checks++;
      if (int'(rdata) != Y[c][i]) begin failures++; $display("ch %0d y[%0d] = %0d", c, i, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
