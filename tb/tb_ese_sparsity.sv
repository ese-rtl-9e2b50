// Speedup against sparsity on one channel (8 PEs, a 256 x 64 matrix): the same product is run
// with 100, 50, 30, 20, 15 and 10 percent non-zero weights, each twice: with the non-zeros drawn
// independently for every weight (unbalanced), and with every PE's slice given the same number
// of non-zeros (the result of load-balance-aware pruning). For each matrix the testbench loads
// the encoded matrix, runs the product, reads the first 64 results through a y pass and
// compares them exactly with a reference. It prints the cycles and the speedup over the dense
// matrix, and checks that
//   - each product takes between the busiest PE's cost (one entry per cycle, an empty column
//     one cycle) and the lockstep bound (sum over columns of the worst PE) plus a fixed margin;
//   - the speedup grows as weights are removed;
//   - at 10 percent non-zero (90 percent pruned) the unbalanced speedup is at least 5.5 and the
//     balanced one at least 6.2, the figures the reference design reaches there, and balancing
//     is not slower at 80 percent pruned or more.
// The sweep and the two pruning styles follow the reference's evaluation; the matrix size is
// reduced to keep the run short.
module tb_ese_sparsity;
  import ese_pkg::*;
  localparam int NPE = 8, NX = 64, NY = 64, NH = 256, WDEPTH = 2048, QDEPTH = 8;
  localparam int ROWS = NH / NPE;
  localparam int ND = 6;
  localparam int DENS [ND] = '{100, 50, 30, 20, 15, 10};
  int checks = 0, failures = 0;
  longint cycles = 0;

  logic clk = 0, rst_n = 0;
  logic ld_we_ptr = 0, ld_we_ent = 0, ld_bank = 0;
  logic [$clog2(WDEPTH)-1:0] ld_addr = '0;
  logic [ENT_W-1:0] ld_data [NPE];
  logic sp_start = 0, sp_wbank = 0, sp_abank = 0, sp_clear = 0, sp_done;
  mat_e sp_mat = M_IX;
  logic ew_start = 0, ew_abank = 0, ew_done, zero_state = 0;
  ew_e  ew_job = EW_Y;
  logic [$clog2(NX)-1:0] x_raddr;
  act_t x_rdata;
  logic [$clog2(NH)-1:0] p_raddr;
  act_t p_rdata [NPRM];
  logic y_valid;
  logic [$clog2(NY)-1:0] y_idx;
  act_t y_data;
  logic ev_stall;
  logic [NPE-1:0] ev_issue, ev_pad;

  ese_channel #(.NPE(NPE), .NX(NX), .NY(NY), .NH(NH), .WDEPTH(WDEPTH), .QDEPTH(QDEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  int xv [NX];
  assign x_rdata = act_t'(xv[x_raddr]);
  for (genvar q = 0; q < NPRM; q++) begin : g_prm
    assign p_rdata[q] = '0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction
  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  int W [NH][NX];
  int ptrs [NPE][NX];
  int ents [NPE][$];
  int lo_bound, hi_bound, nmax;

  function automatic int wrand();
    return rnd(0, 1) ? rnd(1, 200) : -rnd(1, 200);
  endfunction

  task automatic build(int dens, bit balanced);
    int cost [NPE];
    if (!balanced) begin
      for (int r = 0; r < NH; r++)
        for (int j = 0; j < NX; j++)
          W[r][j] = (rnd(0, 99) < dens) ? wrand() : 0;
    end else begin
      // exactly K non-zeros at random places in every PE's slice
      int K, pos [ROWS*NX];
      K = (dens * ROWS * NX + 50) / 100;
      for (int p = 0; p < NPE; p++) begin
        for (int i = 0; i < ROWS*NX; i++) pos[i] = i;
        for (int i = ROWS*NX - 1; i > 0; i--) begin
          int k, t;
          k = rnd(0, i); t = pos[i]; pos[i] = pos[k]; pos[k] = t;
        end
        for (int i = 0; i < ROWS*NX; i++)
          W[(pos[i] / NX) * NPE + p][pos[i] % NX] = (i < K) ? wrand() : 0;
      end
    end
    hi_bound = 0; nmax = 0;
    for (int p = 0; p < NPE; p++) begin cost[p] = 0; ents[p].delete(); end
    for (int j = 0; j < NX; j++) begin
      int worst;
      worst = 1;
      for (int p = 0; p < NPE; p++) begin
        int pos, n0;
        pos = 0; n0 = ents[p].size();
        for (int lr = 0; lr < ROWS; lr++) begin
          int w, gap;
          w = W[lr*NPE + p][j];
          if (w != 0) begin
            gap = lr - pos;
            while (gap >= 16) begin ents[p].push_back(15 << 12); gap -= 16; end
            ents[p].push_back((gap << 12) | (w & 12'hfff));
            pos = lr + 1;
          end
        end
        ptrs[p][j] = ents[p].size();
        n0 = ents[p].size() - n0;
        cost[p] += (n0 == 0) ? 1 : n0;
        if (n0 > worst) worst = n0;
      end
      hi_bound += worst;
    end
    lo_bound = 0;
    for (int p = 0; p < NPE; p++) begin
      if (cost[p] > lo_bound) lo_bound = cost[p];
      if (ents[p].size() > nmax) nmax = ents[p].size();
    end
    hi_bound += 3 + QDEPTH + 6;
  endtask

  task automatic load();
    for (int j = 0; j < NX; j++) begin
      @(negedge clk);
      ld_we_ptr = 1; ld_bank = 0; ld_addr = $clog2(WDEPTH)'(j);
      for (int p = 0; p < NPE; p++) ld_data[p] = ENT_W'(ptrs[p][j]);
    end
    for (int a = 0; a < nmax; a++) begin
      @(negedge clk);
      ld_we_ptr = 0; ld_we_ent = 1; ld_addr = $clog2(WDEPTH)'(a);
      for (int p = 0; p < NPE; p++) ld_data[p] = (a < ents[p].size()) ? ENT_W'(ents[p][a]) : '0;
    end
    @(negedge clk);
    ld_we_ptr = 0; ld_we_ent = 0;
  endtask

  int got [NY];
  always @(posedge clk) if (y_valid) got[y_idx] <= int'(y_data);

  initial begin
    longint t0, cyc [2][ND];
    real sp, prev_sp, sp90 [2];
    for (int p = 0; p < NPE; p++) ld_data[p] = '0;
    for (int j = 0; j < NX; j++) xv[j] = rnd(-4096, 4096);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
    for (int d = 0; d < ND; d++) begin
      build(DENS[d], b[0]);
      load();
      @(negedge clk);
      sp_start = 1; sp_mat = M_IX; sp_wbank = 0; sp_abank = 0; sp_clear = 1;
      @(negedge clk);
      sp_start = 0;
      t0 = cycles;
      while (!sp_done) @(negedge clk);
      cyc[b][d] = cycles - t0;
      checks++;
      if (cyc[b][d] < lo_bound || cyc[b][d] > hi_bound) begin
        failures++; $display("density %0d%%: %0d cycles outside %0d..%0d", DENS[d], cyc[b][d], lo_bound, hi_bound);
      end
      @(negedge clk);
      ew_start = 1; ew_job = EW_Y; ew_abank = 0;
      @(negedge clk);
      ew_start = 0;
      while (!ew_done) @(negedge clk);
      for (int r = 0; r < NY; r++) begin
        longint a;
        a = 0;
        for (int j = 0; j < NX; j++) a += longint'(W[r][j]) * xv[j];
        checks++;
        if (got[r] != sat16(a >>> WGT_FRAC)) begin
          failures++;
          if (failures < 10) $display("density %0d%%: y[%0d] = %0d, expected %0d", DENS[d], r, got[r], sat16(a >>> WGT_FRAC));
        end
      end
      sp = real'(cyc[b][0]) / real'(cyc[b][d]);
      $display("%s, %0d%% non-zero (%0d%% pruned): %0d cycles, speedup %.2fx",
               b ? "balanced  " : "unbalanced", DENS[d], 100 - DENS[d], cyc[b][d], sp);
      if (d > 0) begin
        checks++;
        if (sp <= prev_sp) begin failures++; $display("speedup did not grow"); end
      end
      prev_sp = sp;
      if (d == ND - 1) sp90[b] = sp;
    end
    checks += 2;
    if (sp90[0] < 5.5) begin failures++; $display("unbalanced speedup at 90%% pruned below 5.5x"); end
    if (sp90[1] < 6.2) begin failures++; $display("balanced speedup at 90%% pruned below 6.2x"); end
    for (int d = 0; d < ND; d++)
      if (DENS[d] <= 20) begin
        checks++;
        if (cyc[1][d] > cyc[0][d]) begin
          failures++; $display("balanced matrix slower at %0d%% non-zero", DENS[d]);
        end
      end
    $display("gain from balancing at 90%% pruned: %.1f%%", 100.0 * (sp90[1] / sp90[0] - 1.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
