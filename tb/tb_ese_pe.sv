// Self-checking test of ese_pe: loads a random sparse slice (ROWS local rows x NCOL columns,
// with long zero gaps so padding entries occur) into one half of the buffers, runs the job
// with activations served from a FIFO model, and checks every accumulated row against the
// dense product. It also checks the rate: with activations always available the job must take
// sum over columns of max(1, entries in the column) cycles, plus the 2-cycle pipeline drain.
// A second job on the other half accumulates without clearing, then a third clears.
// The one-entry-per-cycle rate is the reference architecture's; the 3-cycle overhead is this
// design's pipeline.
module tb_ese_pe;
  import ese_pkg::*;
  localparam int ROWS = 32, NCOL = 24, WDEPTH = 512;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ld_we_ptr = 0, ld_we_ent = 0, ld_bank = 0;
  logic [$clog2(WDEPTH)-1:0] ld_addr = '0;
  logic [ENT_W-1:0] ld_data = '0;
  logic start = 0, wbank = 0, abank = 0, clear = 0, done;
  logic [$clog2(NCOL):0] ncols = '0;
  logic fifo_empty, fifo_pop, rd_bank = 0, issue, issue_pad;
  act_t fifo_dout;
  logic [$clog2(ROWS)-1:0] rd_row = '0;
  acc_t rd_data;

  ese_pe #(.ROWS(ROWS), .NCOL(NCOL), .WDEPTH(WDEPTH)) dut (.*);
  always #5 clk = ~clk;

  int Wm [2][ROWS][NCOL];
  int av [NCOL];
  int ptr [2][NCOL];
  int ent [2][$];
  longint expect_v [ROWS];
  int fifo_idx;
  int npad = 0;

  assign fifo_empty = (fifo_idx >= NCOL);
  assign fifo_dout  = act_t'(fifo_idx < NCOL ? av[fifo_idx] : 0);
  always @(posedge clk) begin
    if (start) fifo_idx <= 0;
    else if (fifo_pop && !fifo_empty) fifo_idx <= fifo_idx + 1;
    if (issue_pad) npad++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make(int b);
    ent[b].delete();
    for (int j = 0; j < NCOL; j++) begin
      int pos;
      pos = 0;
      for (int r = 0; r < ROWS; r++) begin
        // column 3 empty, column 5 only the last row (needs padding), else ~25 % dense
        if (j == 3) Wm[b][r][j] = 0;
        else if (j == 5) Wm[b][r][j] = (r == ROWS - 1) ? 77 : 0;
        else Wm[b][r][j] = ($urandom % 4 == 0) ? int'($urandom % 2047) - 1023 : 0;
        if (Wm[b][r][j] != 0) begin
          int gap;
          gap = r - pos;
          while (gap >= 16) begin ent[b].push_back(16'hf000); gap -= 16; end
          ent[b].push_back((gap << 12) | (Wm[b][r][j] & 12'hfff));
          pos = r + 1;
        end
      end
      ptr[b][j] = ent[b].size();
    end
    for (int j = 0; j < NCOL; j++) begin
      @(negedge clk);
      ld_we_ptr = 1; ld_bank = b[0]; ld_addr = $clog2(WDEPTH)'(j); ld_data = ENT_W'(ptr[b][j]);
    end
    @(negedge clk);
    ld_we_ptr = 0;
    for (int e = 0; e < ent[b].size(); e++) begin
      ld_we_ent = 1; ld_addr = $clog2(WDEPTH)'(e); ld_data = ENT_W'(ent[b][e]);
      @(negedge clk);
    end
    ld_we_ent = 0;
  endtask

  task automatic run(int b, int ab, bit clr, bit accumulate);
    int expected_cycles, cyc;
    expected_cycles = 0;
    for (int j = 0; j < NCOL; j++) begin
      int n;
      n = (j == 0) ? ptr[b][0] : ptr[b][j] - ptr[b][j-1];
      expected_cycles += (n == 0) ? 1 : n;
    end
    for (int j = 0; j < NCOL; j++) av[j] = int'($urandom % 8191) - 4095;
    for (int r = 0; r < ROWS; r++) begin
      if (!accumulate) expect_v[r] = 0;
      for (int j = 0; j < NCOL; j++) expect_v[r] += longint'(Wm[b][r][j]) * av[j];
    end
    @(negedge clk);
    start = 1; ncols = ($clog2(NCOL)+1)'(NCOL); wbank = b[0]; abank = ab[0]; clear = clr;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    // one cycle to fetch the first column, then the entries, then the 2-stage drain
    if (cyc != expected_cycles + 3) begin
      failures++; $display("job took %0d cycles, expected %0d", cyc, expected_cycles + 3);
    end
    for (int r = 0; r < ROWS; r++) begin
      rd_bank = ab[0]; rd_row = $clog2(ROWS)'(r);
      #1;
      checks++;
      if (longint'(rd_data) != expect_v[r]) begin
        failures++; $display("row %0d = %0d expected %0d", r, rd_data, expect_v[r]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    make(0);
    make(1);
    run(0, 1, 1'b1, 1'b0);
    run(1, 1, 1'b0, 1'b1);
    run(1, 0, 1'b1, 1'b0);
    checks++;
    if (npad == 0) begin failures++; $display("no padding entry issued"); end
    $display("padding entries issued: %0d", npad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
