// ESE accelerator top: NCH LSTM channels with NPE PEs each, the ESE controller, the input
// and output buffers, and the broadcast load path for the sparse matrices.
//
// Operation of one time step:
//   1. The host writes x_t of every channel and (once) the peephole/bias vectors into the
//      input buffer (in_*), then pulses start (new_seq for the first frame of a sequence).
//   2. The controller requests the nine matrices one by one (ld_req_valid/ld_req_mat). The
//      memory side answers each request with a stream of beats: first the column pointers
//      (ld_is_ptr = 1, ld_addr = column), then the entries (ld_is_ptr = 0, ld_addr = entry
//      address), each beat carrying one 16-bit word for each of the NPE PEs; ld_last marks the
//      final beat. The beats are broadcast to all channels, which run the same matrices on
//      different inputs (a batch of NCH frames).
//   3. done pulses when all channels hold y_t in the output buffer (out_* read port).
// The ev_* outputs pulse on the mechanisms of the design: ActQueue back-pressure, padding
// entries, a matrix load overlapping a product, and an element-wise pass overlapping a product;
// ev_issue shows which PEs of channel 0 take an entry in a cycle (for utilisation counts).
// Lint notes: the issue flags of channels other than 0 are left unread on purpose (all channels
// run the same matrices, so channel 0 is representative).
// Sizes default to the evaluated LSTM (153 inputs, 1024 cells, 512 outputs), 32 PEs per
// channel and 32 channels; the load interface and buffer formats are this design's choice.
module ese_top
  import ese_pkg::*;
#(
  parameter int NCH    = NCH_DEF,
  parameter int NPE    = NPE_DEF,
  parameter int NX     = NX_DEF,
  parameter int NY     = NY_DEF,
  parameter int NH     = NH_DEF,
  parameter int WDEPTH = WDEPTH_DEF,
  parameter int QDEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host: input buffer writes
  input  logic                      in_we,
  input  logic                      in_sel,
  input  logic [$clog2(NCH)-1:0]    in_ch,
  input  prm_e                      in_kind,
  input  logic [$clog2(NH)-1:0]     in_addr,
  input  act_t                      in_data,
  // host: control
  input  logic                      start,
  input  logic                      new_seq,
  output logic                      busy,
  output logic                      done,
  // host: output buffer reads
  input  logic [$clog2(NCH)-1:0]    out_ch,
  input  logic [$clog2(NY)-1:0]     out_addr,
  output act_t                      out_data,
  // memory side: matrix stream
  output logic                      ld_req_valid,
  output mat_e                      ld_req_mat,
  input  logic                      ld_valid,
  input  logic                      ld_is_ptr,
  input  logic [$clog2(WDEPTH)-1:0] ld_addr,
  input  logic [ENT_W-1:0]          ld_data [NPE],
  input  logic                      ld_last,
  // monitoring
  output logic                      ev_stall,
  output logic                      ev_pad,
  output logic                      ev_load_overlap,
  output logic                      ev_ew_overlap,
  output logic [NPE-1:0]            ev_issue
);
  logic       zero_state, ld_bank, loading;
  logic       sp_start, sp_wbank, sp_abank, sp_clear, sp_running;
  mat_e       sp_mat;
  logic       ew_start, ew_abank, ew_running;
  ew_e        ew_job;
  logic [NCH-1:0] sp_done, ew_done, stall_c, pad_c;

  ese_controller u_ctrl (
    .clk, .rst_n, .start, .new_seq, .busy, .done, .zero_state,
    .ld_req_valid, .ld_req_mat, .ld_bank, .ld_last(ld_valid && ld_last), .loading,
    .sp_start, .sp_mat, .sp_wbank, .sp_abank, .sp_clear, .sp_done_all(&sp_done), .sp_running,
    .ew_start, .ew_job, .ew_abank, .ew_done_all(&ew_done), .ew_running
  );

  logic [$clog2(NX)-1:0] x_raddr [NCH];
  act_t                  x_rdata [NCH];
  logic [$clog2(NH)-1:0] p_raddr [NCH];
  act_t                  p_rdata [NCH][NPRM];
  logic [NCH-1:0]        y_valid;
  logic [$clog2(NY)-1:0] y_idx   [NCH];
  act_t                  y_data  [NCH];

  input_buffer #(.NCH(NCH), .NX(NX), .NH(NH)) u_ibuf (
    .clk, .we(in_we), .sel(in_sel), .ch(in_ch), .kind(in_kind), .addr(in_addr), .data(in_data),
    .x_raddr, .x_rdata, .p_raddr, .p_rdata
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [NPE-1:0] issue_c, padv_c;
    ese_channel #(.NPE(NPE), .NX(NX), .NY(NY), .NH(NH), .WDEPTH(WDEPTH), .QDEPTH(QDEPTH)) u_ch (
      .clk, .rst_n,
      .ld_we_ptr(ld_valid && loading && ld_is_ptr), .ld_we_ent(ld_valid && loading && !ld_is_ptr),
      .ld_bank, .ld_addr, .ld_data,
      .sp_start, .sp_mat, .sp_wbank, .sp_abank, .sp_clear, .sp_done(sp_done[c]),
      .ew_start, .ew_job, .ew_abank, .ew_done(ew_done[c]), .zero_state,
      .x_raddr(x_raddr[c]), .x_rdata(x_rdata[c]), .p_raddr(p_raddr[c]), .p_rdata(p_rdata[c]),
      .y_valid(y_valid[c]), .y_idx(y_idx[c]), .y_data(y_data[c]),
      .ev_stall(stall_c[c]), .ev_issue(issue_c), .ev_pad(padv_c)
    );
    assign pad_c[c] = |padv_c;
    if (c == 0) begin : g_mon
      assign ev_issue = issue_c;
    end
  end

  output_buffer #(.NCH(NCH), .NY(NY)) u_obuf (
    .clk, .we(y_valid), .waddr(y_idx), .wdata(y_data), .rch(out_ch), .raddr(out_addr), .rdata(out_data)
  );

  assign ev_stall        = |stall_c;
  assign ev_pad          = |pad_c;
  assign ev_load_overlap = loading && ld_valid && sp_running;
  assign ev_ew_overlap   = ew_running && sp_running;
endmodule
