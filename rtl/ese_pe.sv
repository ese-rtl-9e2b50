// PE: one processing element of a channel (PtrRead -> SpmatRead -> SpMV -> Accu -> Act Buffer).
//
// The rows of every matrix are interleaved over the PEs: global row r belongs to PE r mod NPE,
// as local row r / NPE. The PE holds its slice of the matrix in column-compressed form and walks
// the columns in order. For each column it pops the column's activation from its ActQueue FIFO,
// reads the column's entry range from the pointer buffer and issues one entry per cycle
// (weight, activation, local row) to the multiply-accumulate pipeline. The pop of the next
// column happens in the same cycle as the last entry of the current one, so a column with k
// entries costs k cycles and an empty column one cycle. Padding entries (w = 0) only advance
// the row position.
//
// Job interface: start (one cycle) with ncols, wbank (half of the pointer/weight buffers),
// abank (act-buffer bank) and clear (start the bank from zero). done is high when the PE is idle
// and its pipeline empty. Loading: ld_* writes the pointer or weight half not in use.
// Act-buffer results are read through rd_bank/rd_row/rd_data.
// The interleaved rows, the broadcast activation, one non-zero per cycle and the double-buffered
// pointer, weight and act buffers follow the reference architecture; the entry format, the
// end-pointer convention, padding and the cost of an empty column are this design's choices.
module ese_pe
  import ese_pkg::*;
#(
  parameter int ROWS   = NH_DEF / NPE_DEF,
  parameter int NCOL   = NH_DEF,
  parameter int WDEPTH = WDEPTH_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // loading
  input  logic                      ld_we_ptr,
  input  logic                      ld_we_ent,
  input  logic                      ld_bank,
  input  logic [$clog2(WDEPTH)-1:0] ld_addr,
  input  logic [ENT_W-1:0]          ld_data,
  // job
  input  logic                      start,
  input  logic [$clog2(NCOL):0]     ncols,
  input  logic                      wbank,
  input  logic                      abank,
  input  logic                      clear,
  output logic                      done,
  // activation FIFO
  input  logic                      fifo_empty,
  input  act_t                      fifo_dout,
  output logic                      fifo_pop,
  // act buffer read
  input  logic                      rd_bank,
  input  logic [$clog2(ROWS)-1:0]   rd_row,
  output acc_t                      rd_data,
  // activity, for monitoring
  output logic                      issue,
  output logic                      issue_pad
);
  localparam int CW = $clog2(NCOL);
  localparam int PW = $clog2(WDEPTH) + 1;
  localparam int RW = $clog2(ROWS);

  logic          running, col_active, job_wbank, job_abank;
  logic [CW:0]   col_idx, job_ncols;
  logic [PW-1:0] rd_ptr, end_ptr, beg, fin;
  logic [RW:0]   row_pos;
  act_t          a_reg;
  entry_t        ent;
  logic          is_pad, have_entry, last, want_next, acc_busy;
  logic [RW+IDX_W:0] row;

  ptr_read #(.NCOL(NCOL), .WDEPTH(WDEPTH)) u_ptr (
    .clk, .we(ld_we_ptr), .wbank(ld_bank), .waddr(ld_addr[CW-1:0]), .wdata(PW'(ld_data)),
    .rbank(job_wbank), .col(col_idx[CW-1:0]), .beg, .fin
  );

  spmat_read #(.WDEPTH(WDEPTH)) u_spmat (
    .clk, .we(ld_we_ent), .wbank(ld_bank), .waddr(ld_addr), .wdata(ld_data),
    .rbank(job_wbank), .raddr(rd_ptr[PW-2:0]), .ent, .is_pad
  );

  always_comb begin
    have_entry = col_active && (rd_ptr != end_ptr);
    last       = have_entry && (rd_ptr + 1'b1 == end_ptr);
    row        = (RW+IDX_W+1)'(row_pos) + (RW+IDX_W+1)'(ent.rel);
    want_next  = running && (col_idx < job_ncols) && (!col_active || !have_entry || last);
    fifo_pop   = want_next && !fifo_empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      col_active <= 1'b0;
      col_idx    <= '0;
      job_ncols  <= '0;
      job_wbank  <= 1'b0;
      job_abank  <= 1'b0;
      rd_ptr     <= '0;
      end_ptr    <= '0;
      row_pos    <= '0;
      a_reg      <= '0;
    end else if (start) begin
      running    <= 1'b1;
      col_active <= 1'b0;
      col_idx    <= '0;
      job_ncols  <= ncols;
      job_wbank  <= wbank;
      job_abank  <= abank;
      rd_ptr     <= '0;
      end_ptr    <= '0;
    end else if (running) begin
      if (have_entry) begin
        rd_ptr  <= rd_ptr + 1'b1;
        row_pos <= (RW+1)'(row + 1'b1);
      end
      if (fifo_pop) begin
        a_reg      <= fifo_dout;
        rd_ptr     <= beg;
        end_ptr    <= fin;
        row_pos    <= '0;
        col_active <= 1'b1;
        col_idx    <= col_idx + 1'b1;
      end else if (!have_entry || last) begin
        col_active <= 1'b0;
        if (col_idx == job_ncols) running <= 1'b0;
      end
    end
  end

  assign issue     = have_entry;
  assign issue_pad = have_entry && is_pad;
  assign done      = !running && !acc_busy && !start;

  spmv_accu #(.ROWS(ROWS)) u_mac (
    .clk, .rst_n,
    .clr(start && clear), .clr_bank(abank),
    .in_valid(have_entry), .in_bank(job_abank), .in_a(a_reg), .in_w(ent.w), .in_row(row[RW-1:0]),
    .busy(acc_busy),
    .rd_bank, .rd_row, .rd_data
  );
endmodule
