// Output Buffer: holds the output y_t of every channel until the host reads it.
//
// Each channel writes its y_t stream (one element per cycle, all channels in parallel) through
// its own write port; the host reads any (channel, index) combinationally.
// The reference only names this buffer; its organisation is this design's choice.
module output_buffer
  import ese_pkg::*;
#(
  parameter int NCH = NCH_DEF,
  parameter int NY  = NY_DEF
) (
  input  logic                   clk,
  input  logic [NCH-1:0]         we,
  input  logic [$clog2(NY)-1:0]  waddr [NCH],
  input  act_t                   wdata [NCH],
  input  logic [$clog2(NCH)-1:0] rch,
  input  logic [$clog2(NY)-1:0]  raddr,
  output act_t                   rdata
);
  act_t mem [NCH][NY];
  always_ff @(posedge clk) begin
    for (int c = 0; c < NCH; c++)
      if (we[c]) mem[c][waddr[c]] <= wdata[c];
  end
  assign rdata = mem[rch][raddr];
endmodule
