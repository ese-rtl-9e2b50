// Self-checking test of assemble: for every vector index, the local row driven to the PEs must
// be idx / NPE and the output the saturated (acc >>> 10) of PE idx mod NPE's accumulator.
module tb_assemble;
  import ese_pkg::*;
  localparam int NPE = 4, ROWS = 8;
  int checks = 0, failures = 0;
  logic [$clog2(NPE*ROWS)-1:0] idx;
  logic [$clog2(ROWS)-1:0] rd_row;
  acc_t rd_data [NPE];
  act_t y;
  acc_t table_v [NPE][ROWS];

  assemble #(.NPE(NPE), .ROWS(ROWS)) dut (.*);
  // PE act buffers modelled as tables read at rd_row
  always_comb for (int p = 0; p < NPE; p++) rd_data[p] = table_v[p][rd_row];

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int rep = 0; rep < 20; rep++) begin
      for (int p = 0; p < NPE; p++)
        for (int r = 0; r < ROWS; r++)
          table_v[p][r] = (rep % 2 == 0) ? acc_t'($urandom) : acc_t'(int'($urandom) >>> 8);
      for (int i = 0; i < NPE*ROWS; i++) begin
        idx = i[$clog2(NPE*ROWS)-1:0];
        #1;
        e = longint'(table_v[i % NPE][i / NPE]) >>> 10;
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        checks += 2;
        if (int'(rd_row) != i / NPE) begin failures++; $display("idx %0d row %0d", i, rd_row); end
        if (longint'(y) != e) begin failures++; $display("idx %0d y %0d exp %0d", i, y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
