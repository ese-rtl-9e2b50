// Self-checking test of input_buffer: writes x_t for every channel and the seven parameter
// vectors, then reads them back through every channel's read ports.
module tb_input_buffer;
  import ese_pkg::*;
  localparam int NCH = 3, NX = 10, NH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, sel = 0;
  logic [$clog2(NCH)-1:0] ch = '0;
  prm_e kind = P_WIC;
  logic [$clog2(NH)-1:0] addr = '0;
  act_t data = '0;
  logic [$clog2(NX)-1:0] x_raddr [NCH];
  act_t x_rdata [NCH];
  logic [$clog2(NH)-1:0] p_raddr [NCH];
  act_t p_rdata [NCH][NPRM];
  int X [NCH][NX];
  int P [NPRM][NH];

  input_buffer #(.NCH(NCH), .NX(NX), .NH(NH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) for (int j = 0; j < NX; j++) begin
      X[c][j] = int'($urandom % 65536) - 32768;
      @(negedge clk);
      we = 1; sel = 0; ch = $clog2(NCH)'(c); addr = $clog2(NH)'(j); data = act_t'(X[c][j]);
    end
    for (int k = 0; k < NPRM; k++) for (int e = 0; e < NH; e++) begin
      P[k][e] = int'($urandom % 65536) - 32768;
      @(negedge clk);
      we = 1; sel = 1; kind = prm_e'(k); addr = $clog2(NH)'(e); data = act_t'(P[k][e]);
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < NH; i++) begin
      for (int c = 0; c < NCH; c++) begin
        x_raddr[c] = $clog2(NX)'((i + c) % NX);
        p_raddr[c] = $clog2(NH)'((i + 3 * c) % NH);
      end
      #1;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (int'(x_rdata[c]) != X[c][(i + c) % NX]) begin failures++; $display("x ch %0d", c); end
        for (int k = 0; k < NPRM; k++) begin
          checks++;
          if (int'(p_rdata[c][k]) != P[k][(i + 3 * c) % NH]) begin failures++; $display("p ch %0d kind %0d", c, k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
