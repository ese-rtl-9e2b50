// PtrRead: double-buffered column pointer memory of one PE.
//
// Each half holds, for the PE's slice of one sparse matrix, the end address (exclusive) of every
// column's entries in the weight buffer; column j's entries are [end(j-1), end(j)) with
// end(-1) = 0. One half is read by the running SpMV while the loader writes the next matrix's
// pointers into the other half, overlapping memory transfer with computation.
// Write: we/wbank/waddr/wdata, one pointer per cycle. Read: col/rbank give beg and fin
// combinationally (distributed-RAM style read). The pointer format is this design's choice.
module ptr_read
  import ese_pkg::*;
#(
  parameter int NCOL   = NH_DEF,
  parameter int WDEPTH = WDEPTH_DEF
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic                      wbank,
  input  logic [$clog2(NCOL)-1:0]   waddr,
  input  logic [$clog2(WDEPTH):0]   wdata,
  input  logic                      rbank,
  input  logic [$clog2(NCOL)-1:0]   col,
  output logic [$clog2(WDEPTH):0]   beg,
  output logic [$clog2(WDEPTH):0]   fin
);
  localparam int PW = $clog2(WDEPTH) + 1;
  logic [PW-1:0] mem [2][NCOL];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][waddr] <= wdata;
  end

  always_comb begin
    fin = mem[rbank][col];
    beg = (col == '0) ? '0 : mem[rbank][col - 1'b1];
  end
endmodule
