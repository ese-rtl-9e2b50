// Self-checking test of ese_controller against models of the loader and the channels that
// answer after random delays. Checked over three time steps:
//   - products are issued in the order W_ix, W_ir, W_fx, W_fr, W_cx, W_cr, W_ox, W_or, W_ym with
//     buffer half k mod 2, act-buffer bank (k/2) mod 2 and a clear on the first of each pair;
//   - matrices are requested in the same order, into half k mod 2, and never before product k-2
//     has finished; product k never starts before matrix k is loaded;
//   - element-wise pass g starts only after both products of gate g, a pair's first product only
//     after pass g-2, and W_ym only after the o/m pass;
//   - done follows the fifth pass, zero_state follows new_seq, and loads and element-wise passes
//     overlap products at least once.
// The product order checked here is this design's gate-by-gate order (see ese_controller).
module tb_ese_controller;
  import ese_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, new_seq = 0, busy, done, zero_state;
  logic ld_req_valid, ld_bank, ld_last = 0, loading;
  mat_e ld_req_mat;
  logic sp_start, sp_wbank, sp_abank, sp_clear, sp_done_all, sp_running;
  mat_e sp_mat;
  logic ew_start, ew_abank, ew_done_all, ew_running;
  ew_e ew_job;

  ese_controller dut (.*);
  always #5 clk = ~clk;

  int n_loaded, n_sp_issued, n_sp_done, n_ew_issued, n_ew_done;
  int n_ldov = 0, n_ewov = 0;
  int sp_timer = 0, ew_timer = 0, ld_timer = 0;
  bit sp_busy_m = 0, ew_busy_m = 0, ld_busy_m = 0;

  assign sp_done_all = !sp_busy_m;
  assign ew_done_all = !ew_busy_m;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gate_of(int k);
    return (k == 8) ? 4 : k / 2;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // loader model
    ld_last <= 1'b0;
    if (ld_req_valid) begin
      checks += 3;
      if (int'(ld_req_mat) != n_loaded) begin failures++; $display("load order: %0d", ld_req_mat); end
      if (ld_bank != n_loaded[0]) begin failures++; $display("load half"); end
      if (n_sp_done < n_loaded - 1) begin failures++; $display("load %0d before product %0d done", n_loaded, n_loaded - 2); end
      ld_busy_m <= 1; ld_timer <= 5 + int'($urandom % 60);
    end else if (ld_busy_m) begin
      if (ld_timer == 0) begin ld_busy_m <= 0; ld_last <= 1'b1; n_loaded <= n_loaded + 1; end
      else ld_timer <= ld_timer - 1;
    end
    // SpMV model
    if (sp_start) begin
      int k, g;
      k = n_sp_issued; g = gate_of(k);
      checks += 6;
      if (int'(sp_mat) != k) begin failures++; $display("product order %0d vs %0d", sp_mat, k); end
      if (sp_wbank != k[0]) begin failures++; $display("product half"); end
      if (sp_abank != g[0]) begin failures++; $display("act bank"); end
      if (sp_clear != (k == 8 || k % 2 == 0)) begin failures++; $display("clear flag"); end
      if (n_loaded <= k) begin failures++; $display("product %0d before its matrix", k); end
      if ((k == 8 && n_ew_done < 4) || (k < 8 && k % 2 == 0 && g >= 2 && n_ew_done < g - 1)) begin
        failures++; $display("product %0d overwrites an unread bank", k);
      end
      n_sp_issued <= n_sp_issued + 1;
      sp_busy_m <= 1; sp_timer <= 5 + int'($urandom % 80);
    end else if (sp_busy_m) begin
      if (sp_timer == 0) begin sp_busy_m <= 0; n_sp_done <= n_sp_done + 1; end
      else sp_timer <= sp_timer - 1;
    end
    // element-wise model
    if (ew_start) begin
      int g;
      g = n_ew_issued;
      checks += 3;
      if (int'(ew_job) != g) begin failures++; $display("pass order"); end
      if (ew_abank != g[0]) begin failures++; $display("pass bank"); end
      if (n_sp_done < ((g == 4) ? 9 : 2 * g + 2)) begin failures++; $display("pass %0d before its products", g); end
      n_ew_issued <= n_ew_issued + 1;
      ew_busy_m <= 1; ew_timer <= 5 + int'($urandom % 80);
    end else if (ew_busy_m) begin
      if (ew_timer == 0) begin ew_busy_m <= 0; n_ew_done <= n_ew_done + 1; end
      else ew_timer <= ew_timer - 1;
    end
    if (ld_busy_m && sp_busy_m) n_ldov++;
    if (ew_busy_m && sp_busy_m) n_ewov++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      n_loaded = 0; n_sp_issued = 0; n_sp_done = 0; n_ew_issued = 0; n_ew_done = 0;
      @(negedge clk);
      start = 1; new_seq = (t == 0);
      @(negedge clk);
      start = 0; new_seq = 0;
      checks++;
      if (zero_state != (t == 0)) begin failures++; $display("zero_state"); end
      while (!done) @(negedge clk);
      checks += 3;
      if (n_ew_done != 5) begin failures++; $display("done after %0d passes", n_ew_done); end
      if (n_sp_done != 9) begin failures++; $display("done after %0d products", n_sp_done); end
      if (n_loaded != 9) begin failures++; $display("done after %0d loads", n_loaded); end
      @(negedge clk);
    end
    checks += 2;
    if (n_ldov == 0) begin failures++; $display("loads never overlapped products"); end
    if (n_ewov == 0) begin failures++; $display("passes never overlapped products"); end
    $display("overlap cycles: load %0d, element-wise %0d", n_ldov, n_ewov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
