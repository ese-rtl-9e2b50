// Self-checking test of one channel (ActQueue, PEs, Assemble, element-wise unit) on reduced
// sizes (4 PEs, 12 inputs, 16 outputs, 128 cells). Sequence:
//   1. load a random sparse NH x NX matrix A into half 0 through the load bus;
//   2. product A x_t into act-buffer bank 0 (clear), while B (NH x NY) loads into half 1;
//   3. y pass on bank 0 (y1 = first NY rows of A x) while a second A x product runs into bank 1;
//   4. product B y1 accumulated onto bank 0 (source: the channel's own y buffer);
//   5. y pass on bank 0 (A x + B y1) and on bank 1 (A x again).
// Every y is compared exactly with a reference. Each product's cycle count must lie between
// the longest PE slice (one entry per cycle, an empty column costs a cycle) and the lockstep
// bound (sum over columns of the worst PE) plus a fixed margin; each y pass takes NY + 2
// cycles counting the start cycle; the overlap of step 3 must be observed.
module tb_ese_channel;
  import ese_pkg::*;
  localparam int NPE = 4, NX = 12, NY = 16, NH = 128, WDEPTH = 512, QDEPTH = 4;
  localparam int ROWS = NH / NPE;
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
    repeat (200000) @(posedge clk);
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

  // matrices: 0 = A (NH x NX), 1 = B (NH x NY)
  int W [2][NH][NY];
  int ncol [2];
  int ptrs [2][NPE][NY];
  int ents [2][NPE][$];
  int lo_bound [2], hi_bound [2];

  task automatic build(int k);
    int cost [NPE];
    ncol[k] = (k == 0) ? NX : NY;
    for (int r = 0; r < NH; r++)
      for (int j = 0; j < NY; j++)
        W[k][r][j] = (j < ncol[k] && rnd(0, 99) < 20) ? (rnd(0, 1) ? rnd(1, 500) : -rnd(1, 500)) : 0;
    // one long gap (31 local rows) in column 0 of the last PE so padding entries are used
    for (int lr = 0; lr < ROWS - 1; lr++) W[k][lr*NPE + NPE-1][0] = 0;
    W[k][NPE*ROWS-1][0] = 77;
    hi_bound[k] = 0;
    for (int p = 0; p < NPE; p++) cost[p] = 0;
    for (int j = 0; j < ncol[k]; j++) begin
      int worst;
      worst = 1;
      for (int p = 0; p < NPE; p++) begin
        int pos, n0;
        pos = 0; n0 = ents[k][p].size();
        for (int lr = 0; lr < ROWS; lr++) begin
          int w, gap;
          w = W[k][lr*NPE + p][j];
          if (w != 0) begin
            gap = lr - pos;
            while (gap >= 16) begin ents[k][p].push_back(15 << 12); gap -= 16; end
            ents[k][p].push_back((gap << 12) | (w & 12'hfff));
            pos = lr + 1;
          end
        end
        ptrs[k][p][j] = ents[k][p].size();
        n0 = ents[k][p].size() - n0;
        cost[p] += (n0 == 0) ? 1 : n0;
        if (n0 > worst) worst = n0;
      end
      hi_bound[k] += worst;
    end
    lo_bound[k] = 0;
    for (int p = 0; p < NPE; p++) if (cost[p] > lo_bound[k]) lo_bound[k] = cost[p];
    hi_bound[k] += 3 + QDEPTH + 6;
  endtask

  task automatic load(int k, int half);
    int n;
    n = 0;
    for (int p = 0; p < NPE; p++) if (ents[k][p].size() > n) n = ents[k][p].size();
    for (int j = 0; j < ncol[k]; j++) begin
      @(negedge clk);
      ld_we_ptr = 1; ld_bank = half[0]; ld_addr = $clog2(WDEPTH)'(j);
      for (int p = 0; p < NPE; p++) ld_data[p] = ENT_W'(ptrs[k][p][j]);
    end
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      ld_we_ptr = 0; ld_we_ent = 1; ld_addr = $clog2(WDEPTH)'(a);
      for (int p = 0; p < NPE; p++) ld_data[p] = (a < ents[k][p].size()) ? ENT_W'(ents[k][p][a]) : '0;
    end
    @(negedge clk);
    ld_we_ptr = 0; ld_we_ent = 0;
  endtask

  task automatic run_sp(mat_e m, int half, int bank, bit clr, int k);
    longint t0;
    @(negedge clk);
    sp_start = 1; sp_mat = m; sp_wbank = half[0]; sp_abank = bank[0]; sp_clear = clr;
    @(negedge clk);
    sp_start = 0;
    t0 = cycles;
    while (!sp_done) @(negedge clk);
    checks++;
    if (cycles - t0 < lo_bound[k] || cycles - t0 > hi_bound[k]) begin
      failures++;
      $display("product %0d took %0d cycles, allowed %0d..%0d", k, cycles - t0, lo_bound[k], hi_bound[k]);
    end else
      $display("product %0d: %0d cycles (bounds %0d..%0d)", k, cycles - t0, lo_bound[k], hi_bound[k]);
  endtask

  int got [NY];
  int ngot;
  always @(posedge clk) if (y_valid) begin got[y_idx] <= int'(y_data); ngot <= ngot + 1; end

  task automatic run_y(int bank, int expv [NY], string tag);
    longint t0;
    ngot = 0;
    @(negedge clk);
    ew_start = 1; ew_job = EW_Y; ew_abank = bank[0];
    @(negedge clk);
    ew_start = 0;
    t0 = cycles;
    while (!ew_done) @(negedge clk);
    checks += 2;
    // the start cycle counts, as in the element-wise unit's own test
    if (cycles - t0 + 1 != NY + 2) begin failures++; $display("%s: pass took %0d cycles", tag, cycles - t0 + 1); end
    if (ngot != NY) begin failures++; $display("%s: %0d outputs", tag, ngot); end
    for (int r = 0; r < NY; r++) begin
      checks++;
      if (got[r] != expv[r]) begin
        failures++;
        if (failures < 10) $display("%s: y[%0d] = %0d, expected %0d", tag, r, got[r], expv[r]);
      end
    end
  endtask

  int n_pad = 0, n_stall = 0, n_ovl = 0;
  always @(posedge clk) if (rst_n) begin
    n_pad   += $countones(ev_pad);
    n_stall += ev_stall;
  end

  initial begin
    longint ax [NH];
    int y1 [NY], y2 [NY];
    for (int p = 0; p < NPE; p++) ld_data[p] = '0;
    for (int j = 0; j < NX; j++) xv[j] = rnd(-4096, 4096);
    build(0); build(1);
    for (int r = 0; r < NH; r++) begin
      ax[r] = 0;
      for (int j = 0; j < NX; j++) ax[r] += longint'(W[0][r][j]) * xv[j];
    end
    for (int r = 0; r < NY; r++) y1[r] = sat16(ax[r] >>> WGT_FRAC);
    for (int r = 0; r < NY; r++) begin
      longint a;
      a = ax[r];
      for (int j = 0; j < NY; j++) a += longint'(W[1][r][j]) * y1[j];
      y2[r] = sat16(a >>> WGT_FRAC);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(0, 0);
    // 2: product A x into bank 0 while B loads into half 1
    fork
      run_sp(M_IX, 0, 0, 1, 0);
      load(1, 1);
    join
    // 3: y pass on bank 0 overlapping a second A x product into bank 1
    fork
      run_sp(M_CX, 0, 1, 1, 0);
      run_y(0, y1, "y1");
      begin
        repeat (4) @(negedge clk);
        if (!sp_done && !ew_done) n_ovl++;
      end
    join
    // 4: B y1 accumulated onto bank 0
    run_sp(M_IR, 1, 0, 0, 1);
    // 5
    run_y(0, y2, "y2");
    run_y(1, y1, "y1 from bank 1");
    checks += 3;
    if (n_ovl == 0) begin failures++; $display("no overlap of product and element-wise pass"); end
    if (n_pad == 0) begin failures++; $display("no padding entry issued"); end
    if (n_stall == 0) begin failures++; $display("no ActQueue stall"); end
    $display("pads=%0d stalls=%0d", n_pad, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
