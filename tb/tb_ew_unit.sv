// Self-checking test of ew_unit: two time steps of the five element-wise passes (i, f, g/c,
// o/m, y) with random SpMV sums, peephole weights and biases. The first step runs from zero
// state. m_t (through the m read port), the y_t stream and y_{t-1} (through the y read port)
// are compared with a model written from the LSTM equations, and each pass must take exactly
// its vector length plus the two-stage drain.
module tb_ew_unit;
  import ese_pkg::*;
  localparam int NH = 32, NY = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, zero_state = 0, done, busy, y_valid;
  ew_e job = EW_I;
  logic [$clog2(NH)-1:0] idx, m_raddr = '0;
  logic [$clog2(NY)-1:0] y_raddr = '0, y_idx;
  act_t s_val, m_rdata, y_rdata, y_data;
  act_t prm [NPRM];
  int S [5][NH];
  int P [NPRM][NH];
  int cst [NH], mref [NH];
  int ngot;

  ew_unit #(.NH(NH), .NY(NY)) dut (.*);
  always #5 clk = ~clk;
  assign s_val = act_t'(S[int'(job)][idx]);
  always_comb for (int k = 0; k < NPRM; k++) prm[k] = act_t'(P[k][idx]);

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int sig_ref(longint x);
    longint ax, s;
    ax = (x < 0) ? -x : x;
    if (ax >= 20480)     s = 4096;
    else if (ax >= 9728) s = ax / 32 + 3456;
    else if (ax >= 4096) s = ax / 8 + 2560;
    else                 s = ax / 4 + 2048;
    return int'((x < 0) ? 4096 - s : s);
  endfunction
  function automatic int emul(int a, int b);
    return sat16((longint'(a) * b) >>> 12);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (y_valid) begin
    checks++;
    if (int'(y_data) != S[4][y_idx]) begin failures++; $display("y[%0d] = %0d", y_idx, y_data); end
    ngot++;
  end

  task automatic pass(ew_e j, int len);
    int cyc;
    @(negedge clk);
    job = j; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != len + 2) begin failures++; $display("pass %0d took %0d cycles", j, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < NH; e++) cst[e] = 0;
    for (int k = 0; k < NPRM; k++) for (int e = 0; e < NH; e++) P[k][e] = int'($urandom % 8193) - 4096;
    for (int step = 0; step < 2; step++) begin
      for (int g = 0; g < 5; g++) for (int e = 0; e < NH; e++) S[g][e] = int'($urandom % 32769) - 16384;
      zero_state = (step == 0);
      // reference
      for (int e = 0; e < NH; e++) begin
        int ig, fg, gg, og, cn;
        ig = sig_ref(sat16(longint'(S[0][e]) + emul(P[P_WIC][e], cst[e]) + P[P_BI][e]));
        fg = sig_ref(sat16(longint'(S[1][e]) + emul(P[P_WFC][e], cst[e]) + P[P_BF][e]));
        gg = sig_ref(sat16(longint'(S[2][e]) + P[P_BC][e]));
        cn = sat16((longint'(fg) * cst[e] + longint'(gg) * ig) >>> 12);
        og = sig_ref(sat16(longint'(S[3][e]) + emul(P[P_WOC][e], cn) + P[P_BO][e]));
        mref[e] = emul(og, sat16(2 * longint'(sig_ref(2 * longint'(cn))) - 4096));
        cst[e] = cn;
      end
      pass(EW_I, NH); pass(EW_F, NH); pass(EW_G, NH); pass(EW_O, NH);
      for (int e = 0; e < NH; e++) begin
        m_raddr = $clog2(NH)'(e);
        #1;
        checks++;
        if (int'(m_rdata) != mref[e]) begin failures++; $display("step %0d m[%0d] = %0d exp %0d", step, e, m_rdata, mref[e]); end
      end
      ngot = 0;
      pass(EW_Y, NY);
      checks++;
      if (ngot != NY) begin failures++; $display("y stream length %0d", ngot); end
      zero_state = 0;
      for (int e = 0; e < NY; e++) begin
        y_raddr = $clog2(NY)'(e);
        #1;
        checks++;
        if (int'(y_rdata) != S[4][e]) begin failures++; $display("y buffer [%0d]", e); end
      end
    end
    // zero_state forces y_{t-1} to zero
    zero_state = 1; y_raddr = '0; #1;
    checks++;
    if (y_rdata != '0) begin failures++; $display("zero_state ignored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
