// Assemble: gathers the SpMV result vector of a channel from its PEs.
//
// Row r of a matrix lives in PE r mod NPE as local row r / NPE. For the vector index idx this
// unit drives the local row to every PE's act-buffer read port, selects PE idx mod NPE and
// converts its Q22 accumulator to a Q3.12 activation (arithmetic shift, saturation).
// Combinational; one element per cycle is read by the element-wise unit.
// The interleaved row mapping follows the reference architecture; the single combinational read
// per cycle and the conversion shift are this design's choices.
module assemble
  import ese_pkg::*;
#(
  parameter int NPE  = NPE_DEF,
  parameter int ROWS = NH_DEF / NPE_DEF
) (
  input  logic [$clog2(NPE*ROWS)-1:0] idx,
  output logic [$clog2(ROWS)-1:0]     rd_row,
  input  acc_t                        rd_data [NPE],
  output act_t                        y
);
  localparam int IW = $clog2(NPE*ROWS);
  localparam int SW = (NPE > 1) ? $clog2(NPE) : 1;
  logic [SW-1:0] pe_sel;
  acc_t          v;
  always_comb begin
    rd_row = $clog2(ROWS)'(idx / IW'(NPE));
    pe_sel = SW'(idx % IW'(NPE));
    v      = rd_data[pe_sel];
    y      = sat_act(48'(v >>> WGT_FRAC));
  end
endmodule
