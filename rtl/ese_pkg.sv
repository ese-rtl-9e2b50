// Shared types and constants of the sparse-LSTM engine.
//
// Number formats (this design's choice; only the weight width of 12 bits comes from the
// quantization study): activations, cell state, biases and peephole weights are 16-bit signed
// Q3.12; SpMV weights are 12-bit signed Q1.10; products and accumulators are Q22 in 32 bits.
// A compressed weight entry is 16 bits: {4-bit relative row index, 12-bit weight}.
// Linted on its own, the package reports its constants as unused; the modules use them.
package ese_pkg;
  localparam int ACT_W    = 16;
  localparam int ACT_FRAC = 12;
  localparam int WGT_W    = 12;
  localparam int WGT_FRAC = 10;
  localparam int IDX_W    = 4;
  localparam int ENT_W    = IDX_W + WGT_W;
  localparam int ACC_W    = 32;

  // Full-size configuration
  localparam int NCH_DEF    = 32;
  localparam int NPE_DEF    = 32;
  localparam int NX_DEF     = 153;
  localparam int NY_DEF     = 512;
  localparam int NH_DEF     = 1024;
  localparam int WDEPTH_DEF = 4096;

  typedef logic signed [ACT_W-1:0] act_t;
  typedef logic signed [WGT_W-1:0] wgt_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  typedef struct packed {
    logic [IDX_W-1:0] rel;   // zeros skipped before this entry in the PE's column slice
    wgt_t             w;
  } entry_t;

  // The nine sparse matrices, in the order the controller computes them.
  typedef enum logic [3:0] {
    M_IX = 4'd0, M_IR = 4'd1, M_FX = 4'd2, M_FR = 4'd3, M_CX = 4'd4,
    M_CR = 4'd5, M_OX = 4'd6, M_OR = 4'd7, M_YM = 4'd8
  } mat_e;
  localparam int NMAT = 9;

  // Source vector streamed into the ActQueue.
  typedef enum logic [1:0] {SRC_X = 2'd0, SRC_Y = 2'd1, SRC_M = 2'd2} src_e;

  // Element-wise passes.
  typedef enum logic [2:0] {EW_I = 3'd0, EW_F = 3'd1, EW_G = 3'd2, EW_O = 3'd3, EW_Y = 3'd4} ew_e;

  // Per-element parameter vectors (peephole diagonals and biases).
  typedef enum logic [2:0] {
    P_WIC = 3'd0, P_WFC = 3'd1, P_WOC = 3'd2, P_BI = 3'd3, P_BF = 3'd4, P_BC = 3'd5, P_BO = 3'd6
  } prm_e;
  localparam int NPRM = 7;

  function automatic act_t sat_act(input logic signed [47:0] v);
    if (v > 48'sd32767)       return act_t'(16'sh7fff);
    else if (v < -48'sd32768) return act_t'(16'sh8000);
    else                      return act_t'(v[ACT_W-1:0]);
  endfunction
endpackage
