// xgb_pkg: types and constants shared by the XGBoost inference accelerator.
//
// A tree node is one 64-bit word laid out as in the exported model format:
//   [63:57] reserved, [56] leaf flag (1 = leaf, 0 = decision node),
//   [55:48] feature index, [47:40] index of the right child,
//   [39:32] reserved, [31:0] threshold (decision node) or leaf value (leaf).
// The left child of node i is always node i+1 (pre-order depth-first layout),
// so it is not stored. Thresholds, leaf values, features and predictions are
// IEEE-754 single-precision numbers (the number format is this design's choice;
// the node format only fixes the 32-bit field).
package xgb_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    logic [6:0] rsvd_hi;     // [63:57]
    logic       leaf;        // [56]
    logic [7:0] feat_idx;    // [55:48]
    logic [7:0] right_idx;   // [47:40]
    logic [7:0] rsvd_lo;     // [39:32]
    fp32_t      value;       // [31:0]
  } node_t;


  // AXI response codes
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // AXI-Lite register byte offsets (control region)
  localparam logic [7:0] REG_CTRL    = 8'h00;  // W: bit0 start (self-clearing), bit1 bank
  localparam logic [7:0] REG_STATUS  = 8'h04;  // R: bit0 busy, bit1 done
  localparam logic [7:0] REG_NFEAT   = 8'h08;  // RW: features per inference
  localparam logic [7:0] REG_NINFER  = 8'h0C;  // RW: inferences in the burst
  localparam logic [7:0] REG_NTREES  = 8'h10;  // R: number of parallel trees built
  localparam logic [7:0] REG_CYCLES  = 8'h14;  // R: clock cycles taken by the last burst

endpackage
