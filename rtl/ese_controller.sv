// ESE controller: schedules one LSTM time step over all channels.
//
// The step consists of nine sparse products, computed in this order (matrix k, k = 0..8):
//   W_ix x, W_ir y | W_fx x, W_fr y | W_cx x, W_cr y | W_ox x, W_or y | W_ym m
// Each pair accumulates into one act-buffer bank (gate g = k/2 uses bank g mod 2, the first
// product of a pair clears it), and five element-wise passes (i, f, g/c, o/m, y) follow the pairs.
// Three activities overlap, each waiting only for what it really depends on:
//   loader  : matrix k is streamed into pointer/weight half k mod 2 once product k-2 is done
//             (ld_req_* asks the memory side for the matrix, ld_last ends it);
//   SpMV    : product k starts once matrix k is loaded and its act-buffer bank has been read out
//             by the element-wise pass of gate g-2; W_ym m also waits for m_t (pass o/m);
//   element-wise : pass g starts once both products of gate g are done.
// So matrix k+1 is fetched while product k runs, and the element-wise pass of one gate runs
// while the products of the next gate are computed.
// start (with new_seq to take c_{t-1} = y_{t-1} = 0) begins a step; done pulses at its end.
// This ordering groups the products by gate, which two act-buffer banks require; the data-fetch
// order printed in the schedule (all W_*x first, then all W_*r) would need more banks.
// rst_n is the asynchronous reset and also disables the assertion below; lint reports this
// double use (SYNCASYNCNET), which is intended.
module ese_controller
  import ese_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       new_seq,
  output logic       busy,
  output logic       done,
  output logic       zero_state,
  // loader
  output logic       ld_req_valid,
  output mat_e       ld_req_mat,
  output logic       ld_bank,
  input  logic       ld_last,
  output logic       loading,
  // SpMV jobs
  output logic       sp_start,
  output mat_e       sp_mat,
  output logic       sp_wbank,
  output logic       sp_abank,
  output logic       sp_clear,
  input  logic       sp_done_all,
  output logic       sp_running,
  // element-wise jobs
  output logic       ew_start,
  output ew_e        ew_job,
  output logic       ew_abank,
  input  logic       ew_done_all,
  output logic       ew_running
);
  logic [3:0] lk;      // matrices fully loaded
  logic [3:0] sk;      // products issued
  logic [3:0] sdone;   // products completed
  logic [2:0] ek;      // element-wise passes issued
  logic [2:0] edone;   // element-wise passes completed
  logic       can_load, can_sp, can_ew;
  logic [2:0] sk_gate;
  logic [2:0] ew_need_ok;

  // gate of product k
  function automatic logic [2:0] gate_of(input logic [3:0] k);
    return (k >= 4'd8) ? 3'd4 : 3'(k >> 1);
  endfunction

  always_comb begin
    sk_gate    = gate_of(sk);
    can_load   = busy && !loading && !ld_req_valid && (lk < 4'(NMAT)) && (lk <= sdone + 4'd1);
    ew_need_ok = (sk == 4'd8) ? 3'd4 : ((sk_gate == 3'd0) ? 3'd0 : sk_gate - 3'd1);
    can_sp     = busy && !sp_running && !sp_start && (sk < 4'(NMAT)) && (lk > sk) && (edone >= ew_need_ok);
    can_ew     = busy && !ew_running && !ew_start && (ek < 3'd5) &&
                 (sdone >= ((ek == 3'd4) ? 4'd9 : 4'({ek, 1'b0}) + 4'd2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; zero_state <= 1'b0;
      lk <= '0; sk <= '0; sdone <= '0; ek <= '0; edone <= '0;
      ld_req_valid <= 1'b0; ld_req_mat <= M_IX; ld_bank <= 1'b0; loading <= 1'b0;
      sp_start <= 1'b0; sp_mat <= M_IX; sp_wbank <= 1'b0; sp_abank <= 1'b0; sp_clear <= 1'b0;
      sp_running <= 1'b0;
      ew_start <= 1'b0; ew_job <= EW_I; ew_abank <= 1'b0; ew_running <= 1'b0;
    end else begin
      done         <= 1'b0;
      ld_req_valid <= 1'b0;
      sp_start     <= 1'b0;
      ew_start     <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        zero_state <= new_seq;
        lk <= '0; sk <= '0; sdone <= '0; ek <= '0; edone <= '0;
      end else if (busy) begin
        // loader
        if (can_load) begin
          ld_req_valid <= 1'b1;
          ld_req_mat   <= mat_e'(lk);
          ld_bank      <= lk[0];
          loading      <= 1'b1;
        end
        if (loading && ld_last) begin
          loading <= 1'b0;
          lk      <= lk + 1'b1;
        end
        // SpMV
        if (can_sp) begin
          sp_start   <= 1'b1;
          sp_mat     <= mat_e'(sk);
          sp_wbank   <= sk[0];
          sp_abank   <= sk_gate[0];
          sp_clear   <= (sk == 4'd8) || !sk[0];
          sp_running <= 1'b1;
          sk         <= sk + 1'b1;
        end
        if (sp_running && !sp_start && sp_done_all) begin
          sp_running <= 1'b0;
          sdone      <= sdone + 1'b1;
        end
        // element-wise
        if (can_ew) begin
          ew_start   <= 1'b1;
          ew_job     <= ew_e'(ek);
          ew_abank   <= ek[0];
          ew_running <= 1'b1;
          ek         <= ek + 1'b1;
        end
        if (ew_running && !ew_start && ew_done_all) begin
          ew_running <= 1'b0;
          edone      <= edone + 1'b1;
          if (edone == 3'd4) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // A load request is only made for a half whose previous product has finished.
  a_load_bank_free: assert property (@(posedge clk) disable iff (!rst_n)
    ld_req_valid |-> !(sp_running && sp_wbank == ld_bank));
endmodule
