// End-to-end test of ese_top at reduced size: 2 channels of 4 PEs, an LSTM with 12 inputs,
// 128 cells and 16 outputs, three time steps (the first from zero state). See ese_tb_core for
// what is driven and checked.
// Sizes are reduced to keep the run short; the full-size run is tb_ese_top_full.
module tb_ese_top;
  import ese_pkg::*;
  localparam int NCH = 2, NPE = 4, NX = 12, NY = 16, NH = 128, WDEPTH = 1024;
  logic                      clk, rst_n, in_we, in_sel, start, new_seq, busy, done;
  logic [$clog2(NCH)-1:0]    in_ch, out_ch;
  prm_e                      in_kind;
  logic [$clog2(NH)-1:0]     in_addr;
  act_t                      in_data, out_data;
  logic [$clog2(NY)-1:0]     out_addr;
  logic                      ld_req_valid, ld_valid, ld_is_ptr, ld_last;
  mat_e                      ld_req_mat;
  logic [$clog2(WDEPTH)-1:0] ld_addr;
  logic [ENT_W-1:0]          ld_data [NPE];
  logic                      ev_stall, ev_pad, ev_load_overlap, ev_ew_overlap;
  logic [NPE-1:0]            ev_issue;

  ese_top #(.NCH(NCH), .NPE(NPE), .NX(NX), .NY(NY), .NH(NH), .WDEPTH(WDEPTH), .QDEPTH(4)) dut (.*);
  ese_tb_core #(.NCH(NCH), .NPE(NPE), .NX(NX), .NY(NY), .NH(NH), .WDEPTH(WDEPTH),
                .NSTEP(3), .DENS(12)) core (.*);
endmodule
