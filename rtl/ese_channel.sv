// Channel: one complete LSTM engine (ActQueue, NPE PEs, Assemble, element-wise unit).
//
// A channel computes the LSTM of one input stream; all channels share the sparse matrices
// loaded over the broadcast load bus and run the same schedule on their own data.
// SpMV job (sp_start with sp_mat, sp_wbank, sp_abank, sp_clear): the feeder streams the source
// vector of the matrix (x_t for W_*x, y_{t-1} for W_*r, m_t for W_ym) into the ActQueue, one
// element per cycle while no FIFO is full, and starts all PEs on the matrix's column count.
// sp_done rises once the feeder has sent every element and every PE is idle.
// Element-wise job (ew_start, ew_job, ew_abank): the element-wise unit walks the vector,
// reading the SpMV result from act-buffer bank ew_abank through Assemble.
// Both job kinds may run at the same time on different act-buffer banks.
// Load bus: ld_we_ptr / ld_we_ent with ld_bank and ld_addr write one word per PE per cycle.
// The element-wise unit's busy pin is left open: ew_done carries the same information.
// The block structure (ActQueue, PEs, Assemble, element-wise row) follows the reference
// architecture; the job handshakes and the feeder are this design's own.
module ese_channel
  import ese_pkg::*;
#(
  parameter int NPE    = NPE_DEF,
  parameter int NX     = NX_DEF,
  parameter int NY     = NY_DEF,
  parameter int NH     = NH_DEF,
  parameter int WDEPTH = WDEPTH_DEF,
  parameter int QDEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // load bus
  input  logic                      ld_we_ptr,
  input  logic                      ld_we_ent,
  input  logic                      ld_bank,
  input  logic [$clog2(WDEPTH)-1:0] ld_addr,
  input  logic [ENT_W-1:0]          ld_data [NPE],
  // SpMV job
  input  logic                      sp_start,
  input  mat_e                      sp_mat,
  input  logic                      sp_wbank,
  input  logic                      sp_abank,
  input  logic                      sp_clear,
  output logic                      sp_done,
  // element-wise job
  input  logic                      ew_start,
  input  ew_e                       ew_job,
  input  logic                      ew_abank,
  output logic                      ew_done,
  input  logic                      zero_state,
  // x_t and parameter read ports into the input buffer
  output logic [$clog2(NX)-1:0]     x_raddr,
  input  act_t                      x_rdata,
  output logic [$clog2(NH)-1:0]     p_raddr,
  input  act_t                      p_rdata [NPRM],
  // y_t towards the output buffer
  output logic                      y_valid,
  output logic [$clog2(NY)-1:0]     y_idx,
  output act_t                      y_data,
  // activity, for monitoring
  output logic                      ev_stall,
  output logic [NPE-1:0]            ev_issue,
  output logic [NPE-1:0]            ev_pad
);
  localparam int ROWS = NH / NPE;
  localparam int HW   = $clog2(NH);

  // ---------------- feeder ----------------
  src_e        src;
  logic        feeding;
  logic [HW:0] fcnt, flen;
  logic [HW:0] job_ncols;
  act_t        fdata, m_rdata, y_rdata;
  logic        q_ready;

  always_comb begin
    unique case (sp_mat)
      M_IX, M_FX, M_CX, M_OX: job_ncols = (HW+1)'(NX);
      M_YM:                   job_ncols = (HW+1)'(NH);
      default:                job_ncols = (HW+1)'(NY);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feeding <= 1'b0;
      fcnt    <= '0;
      flen    <= '0;
      src     <= SRC_X;
    end else if (sp_start) begin
      feeding <= 1'b1;
      fcnt    <= '0;
      flen    <= job_ncols;
      unique case (sp_mat)
        M_IX, M_FX, M_CX, M_OX: src <= SRC_X;
        M_YM:                   src <= SRC_M;
        default:                src <= SRC_Y;
      endcase
    end else if (feeding && q_ready) begin
      if (fcnt == flen - 1'b1) feeding <= 1'b0;
      fcnt <= fcnt + 1'b1;
    end
  end

  assign x_raddr = $clog2(NX)'(fcnt);
  always_comb begin
    unique case (src)
      SRC_X:   fdata = x_rdata;
      SRC_Y:   fdata = y_rdata;
      default: fdata = m_rdata;
    endcase
  end

  // ---------------- ActQueue ----------------
  act_t           q_dout [NPE];
  logic [NPE-1:0] q_empty, q_pop;

  act_queue #(.NPE(NPE), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .clr(sp_start),
    .in_valid(feeding), .in_data(fdata), .in_ready(q_ready),
    .pop(q_pop), .dout(q_dout), .empty(q_empty), .stall(ev_stall)
  );

  // ---------------- PEs ----------------
  logic          ew_bank_q;
  logic [HW-1:0] ew_idx;
  act_t          s_val;
  logic [NPE-1:0]            pe_done;
  logic [$clog2(ROWS)-1:0]   rd_row;
  acc_t                      rd_data [NPE];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    ese_pe #(.ROWS(ROWS), .NCOL(NH), .WDEPTH(WDEPTH)) u_pe (
      .clk, .rst_n,
      .ld_we_ptr, .ld_we_ent, .ld_bank, .ld_addr, .ld_data(ld_data[p]),
      .start(sp_start), .ncols(job_ncols), .wbank(sp_wbank), .abank(sp_abank), .clear(sp_clear),
      .done(pe_done[p]),
      .fifo_empty(q_empty[p]), .fifo_dout(q_dout[p]), .fifo_pop(q_pop[p]),
      .rd_bank(ew_bank_q), .rd_row, .rd_data(rd_data[p]),
      .issue(ev_issue[p]), .issue_pad(ev_pad[p])
    );
  end

  assign sp_done = &pe_done && !feeding && !sp_start;

  // ---------------- Assemble + element-wise ----------------

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ew_bank_q <= 1'b0;
    else if (ew_start) ew_bank_q <= ew_abank;
  end

  assemble #(.NPE(NPE), .ROWS(ROWS)) u_asm (
    .idx(ew_idx), .rd_row, .rd_data, .y(s_val)
  );

  assign p_raddr = ew_idx;

  ew_unit #(.NH(NH), .NY(NY)) u_ew (
    .clk, .rst_n, .start(ew_start), .job(ew_job), .zero_state, .done(ew_done), .busy(),
    .idx(ew_idx), .s_val, .prm(p_rdata),
    .m_raddr(fcnt[HW-1:0]), .m_rdata,
    .y_raddr($clog2(NY)'(fcnt)), .y_rdata,
    .y_valid, .y_idx, .y_data
  );
endmodule
