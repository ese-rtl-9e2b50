// Self-checking test of spmat_read: writes random entries into both halves, reads them back
// (padding entries, zero weights with other relative indices, random words) and checks the
// decoded weight, relative index and padding flag.
module tb_spmat_read;
  import ese_pkg::*;
  localparam int WDEPTH = 256;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, wbank = 0, rbank = 0, is_pad;
  logic [$clog2(WDEPTH)-1:0] waddr = '0, raddr = '0;
  logic [ENT_W-1:0] wdata = '0;
  entry_t ent;
  logic [ENT_W-1:0] ref_e [2][WDEPTH];

  spmat_read #(.WDEPTH(WDEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < WDEPTH; a++) begin
        case ($urandom % 5)
          0:       ref_e[b][a] = 16'hf000;                                  // padding
          1:       ref_e[b][a] = ENT_W'(($urandom % 15) << 12);             // zero weight, not padding
          default: ref_e[b][a] = ENT_W'($urandom);
        endcase
        @(negedge clk);
        we = 1; wbank = b[0]; waddr = a[$clog2(WDEPTH)-1:0]; wdata = ref_e[b][a];
      end
    @(negedge clk);
    we = 0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < WDEPTH; a++) begin
        rbank = b[0]; raddr = a[$clog2(WDEPTH)-1:0];
        #1;
        checks += 3;
        if (int'(ent.w) != int'(signed'(ref_e[b][a][11:0]))) begin failures++; $display("w mismatch %0d/%0d", b, a); end
        if (ent.rel != ref_e[b][a][15:12]) begin failures++; $display("rel mismatch %0d/%0d", b, a); end
        if (is_pad != (ref_e[b][a] == 16'hf000)) begin failures++; $display("pad flag %0d/%0d", b, a); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
