// ActQueue: activation broadcast queue of one channel.
//
// Every activation of the input vector (x_t, y_{t-1} or m_t, in column order) is written into
// one FIFO per PE in the same cycle; each PE pops its own FIFO when it starts the next column.
// A PE whose columns hold few non-zeros can thus run up to DEPTH columns ahead of a slower one,
// which absorbs short-term load imbalance between PEs. in_ready is low (a stall) while any FIFO
// is full. clr empties all FIFOs. One FIFO per PE follows the architecture figure; the depth is
// this design's choice. The FIFOs' fill counts are not needed and their pins are left open.
module act_queue
  import ese_pkg::*;
#(
  parameter int NPE   = NPE_DEF,
  parameter int DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           in_valid,
  input  act_t           in_data,
  output logic           in_ready,
  input  logic [NPE-1:0] pop,
  output act_t           dout  [NPE],
  output logic [NPE-1:0] empty,
  output logic           stall      // in_valid held back by a full FIFO
);
  logic [NPE-1:0] full;
  assign in_ready = ~|full;
  assign stall    = in_valid && !in_ready;

  for (genvar p = 0; p < NPE; p++) begin : g_fifo
    sync_fifo #(.W(ACT_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .clr,
      .push  (in_valid && in_ready),
      .din   (in_data),
      .pop   (pop[p]),
      .dout  (dout[p]),
      .full  (full[p]),
      .empty (empty[p]),
      .count ()
    );
  end
endmodule
