// SpmatRead: double-buffered weight memory of one PE.
//
// Each half holds the PE's entries of one sparse matrix in column order. An entry is 16 bits,
// {rel, w}: rel counts the zero rows skipped (within this PE's rows) since the previous entry of
// the same column, w is the 12-bit weight. A gap longer than 15 rows is bridged by a padding
// entry with w = 0 and rel = 15. One half is read by the running SpMV while the loader fills the
// other. Write: we/wbank/waddr/wdata. Read: rbank/raddr give the decoded entry combinationally,
// plus is_pad for a padding entry. The encoding is this design's choice.
module spmat_read
  import ese_pkg::*;
#(
  parameter int WDEPTH = WDEPTH_DEF
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic                      wbank,
  input  logic [$clog2(WDEPTH)-1:0] waddr,
  input  logic [ENT_W-1:0]          wdata,
  input  logic                      rbank,
  input  logic [$clog2(WDEPTH)-1:0] raddr,
  output entry_t                    ent,
  output logic                      is_pad
);
  logic [ENT_W-1:0] mem [2][WDEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][waddr] <= wdata;
  end

  always_comb begin
    ent    = entry_t'(mem[rbank][raddr]);
    is_pad = (ent.w == '0) && (ent.rel == '1);
  end
endmodule
