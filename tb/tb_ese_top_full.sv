// End-to-end test of ese_top at its default (full) size: 32 channels of 32 PEs running one
// time step of the 153-input, 1024-cell, 512-output LSTM with about 11 percent non-zero
// weights, for a batch of 32 frames. See ese_tb_core for what is driven and checked.
// All ese_top parameters are left at their defaults, the sizes of the evaluated network.
module tb_ese_top_full;
  import ese_pkg::*;
  localparam int NCH = NCH_DEF, NPE = NPE_DEF, NX = NX_DEF, NY = NY_DEF, NH = NH_DEF;
  localparam int WDEPTH = WDEPTH_DEF;
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

  ese_top dut (.*);
  ese_tb_core #(.NCH(NCH), .NPE(NPE), .NX(NX), .NY(NY), .NH(NH), .WDEPTH(WDEPTH),
                .NSTEP(1), .DENS(11)) core (.*);
endmodule
