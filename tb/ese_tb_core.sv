// Stimulus, memory model and reference model for the end-to-end test of ese_top.
//
// The wrapper testbench instantiates ese_top and this module side by side (ports joined by
// name). This module:
//   - draws nine random sparse matrices (DENS percent non-zero, rows balanced over the PEs by
//     construction of the encoding only), peephole and bias vectors, and NSTEP input frames per
//     channel;
//   - encodes every matrix per PE in column-compressed form (interleaved rows, 4-bit relative
//     row index, padding entries for gaps of 16 rows or more) and plays the memory side: it
//     answers each ld_req with the pointer beats, then the entry beats, with random idle cycles;
//   - runs NSTEP time steps and compares every y_t of every channel with a fixed-point LSTM
//     model written from the equations (sigmoid/tanh by their piecewise-linear definition);
//   - counts back-pressure stalls, padding entries, overlapped loads, overlapped element-wise
//     passes and first-frame steps, and fails if any of them never happened; reports the
//     share of PE-cycles of channel 0 that took an entry.
// The weights are random at the evaluated density, not the trained network's; the memory side's
// beat format and idle cycles are this design's choices.
module ese_tb_core
  import ese_pkg::*;
#(
  parameter int NCH    = 2,
  parameter int NPE    = 4,
  parameter int NX     = 12,
  parameter int NY     = 16,
  parameter int NH     = 128,
  parameter int WDEPTH = 4096,
  parameter int NSTEP  = 3,
  parameter int DENS   = 12,
  parameter int WATCHDOG = 2000000
) (
  output logic                      clk,
  output logic                      rst_n,
  output logic                      in_we,
  output logic                      in_sel,
  output logic [$clog2(NCH)-1:0]    in_ch,
  output prm_e                      in_kind,
  output logic [$clog2(NH)-1:0]     in_addr,
  output act_t                      in_data,
  output logic                      start,
  output logic                      new_seq,
  input  logic                      busy,
  input  logic                      done,
  output logic [$clog2(NCH)-1:0]    out_ch,
  output logic [$clog2(NY)-1:0]     out_addr,
  input  act_t                      out_data,
  input  logic                      ld_req_valid,
  input  mat_e                      ld_req_mat,
  output logic                      ld_valid,
  output logic                      ld_is_ptr,
  output logic [$clog2(WDEPTH)-1:0] ld_addr,
  output logic [ENT_W-1:0]          ld_data [NPE],
  output logic                      ld_last,
  input  logic                      ev_stall,
  input  logic                      ev_pad,
  input  logic                      ev_load_overlap,
  input  logic                      ev_ew_overlap,
  input  logic [NPE-1:0]            ev_issue
);
  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_stall = 0, n_pad = 0, n_ldov = 0, n_ewov = 0, n_zero = 0;
  longint n_issue = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  // ---------------- model data ----------------
  int mrows [NMAT];
  int mcols [NMAT];
  int W    [NMAT][][];          // dense weights (Q1.10)
  int prmv [NPRM][NH];
  int xin  [NSTEP][NCH][NX];
  // encoded per matrix per PE
  int ptrs [NMAT][NPE][];
  int ents [NMAT][NPE][$];
  int maxlen [NMAT];

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // sigmoid by its piecewise-linear definition, Q12 in and out
  function automatic int sig_ref(longint x);
    longint ax, s;
    ax = (x < 0) ? -x : x;
    if (ax >= 5*4096)        s = 4096;
    else if (ax >= 9728)     s = ax / 32 + 3456;   // 2.375, 0.84375
    else if (ax >= 4096)     s = ax / 8 + 2560;    // 0.625
    else                     s = ax / 4 + 2048;
    if (x < 0) s = 4096 - s;
    return int'(s);
  endfunction
  function automatic int tanh_ref(int x);
    return sat16(2 * longint'(sig_ref(2 * longint'(x))) - 4096);
  endfunction
  function automatic int emul(int a, int b);
    return sat16((longint'(a) * b) >>> 12);
  endfunction

  // ---------------- build the problem ----------------
  task automatic build();
    for (int k = 0; k < NMAT; k++) begin
      mrows[k] = (k == 8) ? NY : NH;
      mcols[k] = (k == 8) ? NH : ((k % 2 == 0) ? NX : NY);
      W[k] = new[mrows[k]];
      for (int r = 0; r < mrows[k]; r++) begin
        W[k][r] = new[mcols[k]];
        for (int j = 0; j < mcols[k]; j++)
          W[k][r][j] = (rnd(0, 99) < DENS) ? (rnd(0, 1) ? rnd(1, 300) : -rnd(1, 300)) : 0;
      end
      // encode
      maxlen[k] = 0;
      for (int p = 0; p < NPE; p++) begin
        ptrs[k][p] = new[mcols[k]];
        ents[k][p].delete();
        for (int j = 0; j < mcols[k]; j++) begin
          int pos;
          pos = 0;
          for (int lr = 0; lr < mrows[k] / NPE; lr++) begin
            int w, gap;
            w = W[k][lr * NPE + p][j];
            if (w != 0) begin
              gap = lr - pos;
              while (gap >= 16) begin
                ents[k][p].push_back(15 << 12);
                gap -= 16;
              end
              ents[k][p].push_back((gap << 12) | (w & 12'hfff));
              pos = lr + 1;
            end
          end
          ptrs[k][p][j] = ents[k][p].size();
        end
        if (ents[k][p].size() > maxlen[k]) maxlen[k] = ents[k][p].size();
        if (ents[k][p].size() > WDEPTH) begin
          $display("matrix %0d PE %0d needs %0d entries > WDEPTH", k, p, ents[k][p].size());
          failures++;
        end
      end
    end
    for (int q = 0; q < NPRM; q++)
      for (int e = 0; e < NH; e++)
        prmv[q][e] = (q <= int'(P_WOC)) ? rnd(-2048, 2048) : rnd(-2048, 2048);
    for (int t = 0; t < NSTEP; t++)
      for (int c = 0; c < NCH; c++)
        for (int j = 0; j < NX; j++)
          xin[t][c][j] = rnd(-4096, 4096);
  endtask

  // ---------------- reference LSTM ----------------
  int cst [NCH][NH];
  int yst [NCH][NY];

  task automatic ref_step(int t, int c, bit first);
    longint acc [5][];
    int ig [NH], fg [NH], cn [NH], mv [NH];
    int cp [NH], yp [NY], gate, pre, s;
    for (int e = 0; e < NH; e++) cp[e] = first ? 0 : cst[c][e];
    for (int e = 0; e < NY; e++) yp[e] = first ? 0 : yst[c][e];
    for (int g = 0; g < 4; g++) begin
      acc[g] = new[NH];
      for (int r = 0; r < NH; r++) begin
        longint a;
        a = 0;
        for (int j = 0; j < NX; j++) a += longint'(W[2*g][r][j]) * xin[t][c][j];
        for (int j = 0; j < NY; j++) a += longint'(W[2*g+1][r][j]) * yp[j];
        acc[g][r] = a;
      end
    end
    for (int e = 0; e < NH; e++) begin
      s = sat16(acc[0][e] >>> 10);
      pre = sat16(longint'(s) + emul(prmv[P_WIC][e], cp[e]) + prmv[P_BI][e]);
      ig[e] = sig_ref(pre);
      s = sat16(acc[1][e] >>> 10);
      pre = sat16(longint'(s) + emul(prmv[P_WFC][e], cp[e]) + prmv[P_BF][e]);
      fg[e] = sig_ref(pre);
      s = sat16(acc[2][e] >>> 10);
      pre = sat16(longint'(s) + prmv[P_BC][e]);
      gate = sig_ref(pre);
      cn[e] = sat16((longint'(fg[e]) * cp[e] + longint'(gate) * ig[e]) >>> 12);
      s = sat16(acc[3][e] >>> 10);
      pre = sat16(longint'(s) + emul(prmv[P_WOC][e], cn[e]) + prmv[P_BO][e]);
      gate = sig_ref(pre);
      mv[e] = emul(gate, tanh_ref(cn[e]));
    end
    for (int r = 0; r < NY; r++) begin
      longint a;
      a = 0;
      for (int j = 0; j < NH; j++) a += longint'(W[8][r][j]) * mv[j];
      yst[c][r] = sat16(a >>> 10);
    end
    for (int e = 0; e < NH; e++) cst[c][e] = cn[e];
  endtask

  // ---------------- memory side ----------------
  int req_q [$];
  always @(posedge clk) if (ld_req_valid) req_q.push_back(int'(ld_req_mat));

  initial begin
    ld_valid = 1'b0; ld_is_ptr = 1'b0; ld_addr = '0; ld_last = 1'b0;
    for (int p = 0; p < NPE; p++) ld_data[p] = '0;
    forever begin
      @(posedge clk);
      #1;
      ld_valid = 1'b0; ld_last = 1'b0;
      if (req_q.size() != 0) begin
        int k, nbeat, b;
        k = req_q.pop_front();
        nbeat = mcols[k] + maxlen[k];
        b = 0;
        while (b < nbeat) begin
          if (rnd(0, 3) != 0) begin
            ld_valid  = 1'b1;
            ld_is_ptr = (b < mcols[k]);
            ld_addr   = $clog2(WDEPTH)'(ld_is_ptr ? b : b - mcols[k]);
            for (int p = 0; p < NPE; p++) begin
              if (ld_is_ptr) ld_data[p] = ENT_W'(ptrs[k][p][b]);
              else if (b - mcols[k] < ents[k][p].size()) ld_data[p] = ENT_W'(ents[k][p][b - mcols[k]]);
              else ld_data[p] = '0;
            end
            ld_last = (b == nbeat - 1);
            b++;
          end else begin
            ld_valid = 1'b0;
            ld_last  = 1'b0;
          end
          @(posedge clk);
          #1;
          ld_valid = 1'b0; ld_last = 1'b0;
        end
      end
    end
  end

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_stall)        n_stall++;
      if (ev_pad)          n_pad++;
      if (ev_load_overlap) n_ldov++;
      if (ev_ew_overlap)   n_ewov++;
      n_issue += $countones(ev_issue);
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  task automatic host_write(bit sel, int ch, int kind, int addr, int data);
    @(negedge clk);
    in_we = 1'b1; in_sel = sel; in_ch = $clog2(NCH)'(ch); in_kind = prm_e'(kind);
    in_addr = $clog2(NH)'(addr); in_data = act_t'(data);
    @(negedge clk);
    in_we = 1'b0;
  endtask

  initial begin
    longint t0, nnz_max_sum;
    rst_n = 1'b0; in_we = 1'b0; in_sel = 1'b0; in_ch = '0; in_kind = P_WIC; in_addr = '0;
    in_data = '0; start = 1'b0; new_seq = 1'b0; out_ch = '0; out_addr = '0;
    build();
    nnz_max_sum = 0;
    for (int k = 0; k < NMAT; k++) nnz_max_sum += maxlen[k];
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < NPRM; q++)
      for (int e = 0; e < NH; e++) host_write(1'b1, 0, q, e, prmv[q][e]);
    for (int t = 0; t < NSTEP; t++) begin
      for (int c = 0; c < NCH; c++)
        for (int j = 0; j < NX; j++) host_write(1'b0, c, 0, j, xin[t][c][j]);
      for (int c = 0; c < NCH; c++) ref_step(t, c, t == 0);
      @(negedge clk);
      start = 1'b1; new_seq = (t == 0);
      if (t == 0) n_zero++;
      @(negedge clk);
      start = 1'b0; new_seq = 1'b0;
      t0 = cycles;
      n_issue = 0;
      while (!done) @(posedge clk);
      $display("step %0d: %0d cycles (sum over matrices of the longest PE slice: %0d entries)",
               t, cycles - t0, nnz_max_sum);
      $display("  channel 0 PE utilisation: %0d entries in %0d PE-cycles (%0d%%)",
               n_issue, (cycles - t0) * NPE, n_issue * 100 / ((cycles - t0) * NPE));
      // a product can never take fewer cycles than the longest PE slice
      checks++;
      if (cycles - t0 < nnz_max_sum) begin
        $display("step faster than the longest-slice bound"); failures++;
      end
      for (int c = 0; c < NCH; c++)
        for (int r = 0; r < NY; r++) begin
          @(negedge clk);
          out_ch = $clog2(NCH)'(c); out_addr = $clog2(NY)'(r);
          #1;
          checks++;
          if (t == NSTEP-1 && c == 0 && r < 4) $display("  y[%0d] = %0d", r, out_data);
          if (int'(out_data) != yst[c][r]) begin
            failures++;
            if (failures < 10) $display("step %0d ch %0d y[%0d] = %0d, expected %0d", t, c, r, out_data, yst[c][r]);
          end
        end
    end
    $display("mechanisms: stalls=%0d pads=%0d load_overlap=%0d ew_overlap=%0d first_frame=%0d",
             n_stall, n_pad, n_ldov, n_ewov, n_zero);
    checks += 5;
    if (n_stall == 0) begin $display("no ActQueue stall"); failures++; end
    if (n_pad   == 0) begin $display("no padding entry");  failures++; end
    if (n_ldov  == 0) begin $display("no overlapped load"); failures++; end
    if (n_ewov  == 0) begin $display("no overlapped element-wise pass"); failures++; end
    if (n_zero  == 0) begin $display("no first frame"); failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
