// fp_adder_tree: pipelined fp32 sum of the leaf values of all trees.
//
// The prediction of a boosted ensemble is the sum of one leaf value per tree.
// The N_IN inputs are padded with +0 up to the next power of two and added
// pairwise in a balanced binary tree of fp32_add units with a register after
// every level, so a new set of leaf values can enter every clock. The result
// leaves LEVELS = ceil(log2(N_IN)) clocks after in_valid, together with the
// tag (the inference number) that entered with it. Only the valid/tag
// pipeline is reset. The document accumulates the trees one after another;
// the balanced order, which can round differently in the last bit, is this
// design's choice.
module fp_adder_tree
  import xgb_pkg::*;
#(
  parameter int unsigned N_IN   = 512,
  parameter int unsigned TAG_W  = 10,
  localparam int unsigned LEVELS = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned P      = 1 << LEVELS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  fp32_t            in_data [N_IN],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fp32_t            out_data
);
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned W = P >> (l + 1);   // adders in this level
    fp32_t            d_in  [2*W];
    logic             v_in;
    logic [TAG_W-1:0] t_in;
    fp32_t            sum_c [W];
    fp32_t            q     [W];
    logic             q_vld;
    logic [TAG_W-1:0] q_tag;

    if (l == 0) begin : g_first
      always_comb begin
        for (int i = 0; i < 2*W; i++)
          d_in[i] = (i < N_IN) ? in_data[i] : '0;
      end
      assign v_in = in_valid;
      assign t_in = in_tag;
    end else begin : g_next
      assign d_in = g_lvl[l-1].q;
      assign v_in = g_lvl[l-1].q_vld;
      assign t_in = g_lvl[l-1].q_tag;
    end

    for (genvar i = 0; i < W; i++) begin : g_add
      fp32_add u_add (.a(d_in[2*i]), .b(d_in[2*i+1]), .y(sum_c[i]));
    end

    always_ff @(posedge clk) q <= sum_c;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q_vld <= 1'b0;
        q_tag <= '0;
      end else begin
        q_vld <= v_in;
        q_tag <= t_in;
      end
    end
  end

  assign out_valid = g_lvl[LEVELS-1].q_vld;
  assign out_tag   = g_lvl[LEVELS-1].q_tag;
  assign out_data  = g_lvl[LEVELS-1].q[0];
endmodule
