// feature_regs_pp: ping-pong feature registers shared by all trees.
//
// Two banks of N_FEATURES fp32 registers. The trees read every feature of the
// active bank (rd_bank) in parallel, so no memory port limits how many trees
// run at once, while the controller fills the other bank, one feature per
// clock, with the next feature vector taken from the feature memory. Writes
// land at the clock edge (wr_en, wr_bank, wr_idx, wr_data); the outputs are a
// plain multiplexer of the selected bank, so they change in the cycle rd_bank
// changes. All registers reset to +0. Registers with two banks follow the
// document; the one-word-per-clock fill is this design's choice.
module feature_regs_pp
  import xgb_pkg::*;
#(
  parameter int unsigned N_FEATURES = 256,
  localparam int unsigned FW        = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [FW-1:0] wr_idx,
  input  fp32_t         wr_data,
  input  logic          rd_bank,
  output fp32_t         feats [N_FEATURES]
);
  fp32_t bank0 [N_FEATURES];
  fp32_t bank1 [N_FEATURES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_FEATURES; i++) begin
        bank0[i] <= '0;
        bank1[i] <= '0;
      end
    end else if (wr_en && 32'(wr_idx) < N_FEATURES) begin
      if (wr_bank) bank1[wr_idx] <= wr_data;
      else         bank0[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    for (int i = 0; i < N_FEATURES; i++)
      feats[i] = rd_bank ? bank1[i] : bank0[i];
  end
endmodule
