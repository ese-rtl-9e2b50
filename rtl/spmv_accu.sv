// SpMV + Accu + Act Buffer of one PE.
//
// Stage 1 (SpMV) registers the product a*w of an activation (Q3.12) and a weight (Q1.10) as a
// Q22 value. Stage 2 (Accu) adds it to the accumulator of its row in one of two act-buffer
// banks; a row not yet written since the bank was cleared reads as zero, so clearing a bank
// takes one cycle. While the SpMV fills one bank, the element-wise unit reads the other through
// the read port (rd_bank/rd_row, combinational), so the two halves of the LSTM overlap.
// Latency from in_valid to the updated accumulator is 2 cycles; one product per cycle.
// busy is high while a product is in flight. The two-stage split is this design's choice.
module spmv_accu
  import ese_pkg::*;
#(
  parameter int ROWS = NH_DEF / NPE_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,       // clear bank clr_bank
  input  logic                    clr_bank,
  input  logic                    in_valid,
  input  logic                    in_bank,
  input  act_t                    in_a,
  input  wgt_t                    in_w,
  input  logic [$clog2(ROWS)-1:0] in_row,
  output logic                    busy,
  input  logic                    rd_bank,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  output acc_t                    rd_data
);
  localparam int RW = $clog2(ROWS);
  acc_t            acc  [2][ROWS];
  logic [ROWS-1:0] wrtn [2];

  logic           s1_valid, s1_bank;
  logic [RW-1:0]  s1_row;
  acc_t           s1_prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_bank  <= 1'b0;
      s1_row   <= '0;
      s1_prod  <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_bank  <= in_bank;
      s1_row   <= in_row;
      s1_prod  <= acc_t'(in_a) * acc_t'(in_w);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wrtn[0] <= '0;
      wrtn[1] <= '0;
    end else begin
      if (s1_valid) wrtn[s1_bank][s1_row] <= 1'b1;
      if (clr)      wrtn[clr_bank] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid)
      acc[s1_bank][s1_row] <= (wrtn[s1_bank][s1_row] ? acc[s1_bank][s1_row] : '0) + s1_prod;
  end

  assign busy    = s1_valid;
  assign rd_data = wrtn[rd_bank][rd_row] ? acc[rd_bank][rd_row] : '0;
endmodule
