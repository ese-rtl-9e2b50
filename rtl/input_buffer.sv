// Input Buffer: on-chip store for the data a time step reads besides the sparse matrices.
//
// Region 0 holds the input frame x_t of every channel (NCH x NX); region 1 holds the seven
// per-element parameter vectors shared by all channels (peephole diagonals W_ic, W_fc, W_oc
// and biases b_i, b_f, b_c, b_o, NH each). The host writes one word per cycle (we, sel, ch or
// kind, addr, data). Every channel has its own combinational read port for x and one for the
// parameter vectors, which returns all seven values of an element at once.
// The reference only names this buffer; what it holds and how it is addressed are this design's
// choices.
module input_buffer
  import ese_pkg::*;
#(
  parameter int NCH = NCH_DEF,
  parameter int NX  = NX_DEF,
  parameter int NH  = NH_DEF
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic                   sel,          // 0: x_t, 1: parameter vector
  input  logic [$clog2(NCH)-1:0] ch,
  input  prm_e                   kind,
  input  logic [$clog2(NH)-1:0]  addr,
  input  act_t                   data,
  input  logic [$clog2(NX)-1:0]  x_raddr [NCH],
  output act_t                   x_rdata [NCH],
  input  logic [$clog2(NH)-1:0]  p_raddr [NCH],
  output act_t                   p_rdata [NCH][NPRM]
);
  act_t xmem [NCH][NX];
  act_t pmem [NPRM][NH];

  always_ff @(posedge clk) begin
    if (we && !sel) xmem[ch][$clog2(NX)'(addr)] <= data;
    if (we &&  sel) pmem[kind][addr] <= data;
  end

  for (genvar c = 0; c < NCH; c++) begin : g_rd
    assign x_rdata[c] = xmem[c][x_raddr[c]];
    for (genvar k = 0; k < NPRM; k++) begin : g_prm
      assign p_rdata[c][k] = pmem[k][p_raddr[c]];
    end
  end
endmodule
