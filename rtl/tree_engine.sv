// tree_engine: walks one decision tree from the root to a leaf.
//
// This is the per-tree datapath of the forest. On a start pulse it reads the
// root (node 0) from its node memory. Each following cycle it looks at the
// node word that came back: for a decision node it compares the selected
// feature with the threshold (fp32 "<") and immediately requests the next
// node, index+1 (left child, stored right after its parent in pre-order) when
// the feature is smaller, otherwise the stored right-child index. For a leaf
// it latches the leaf value and raises done. The next address is formed
// combinationally from the memory output, so the engine visits one node per
// clock: a leaf at depth k (root depth 0) is reached k+1 node reads after
// start and done is high k+2 cycles after the start pulse. done and
// leaf_value hold until the next start. The features come from the shared
// feature registers and must stay stable while busy.
//
// A step limit of N_NODES reads guards against a malformed model (a right
// index that points backwards would loop); when it trips the engine finishes
// with leaf value +0 and err set. The guard, the error flag and the
// one-node-per-cycle schedule are this design's choices; the traversal itself
// follows the document's procedure. The document's listing leaves the loop
// when the node flag is NOT set, while its node format defines flag 1 as
// "leaf"; this engine stops at flag 1.
module tree_engine
  import xgb_pkg::*;
#(
  parameter int unsigned N_NODES    = 256,
  parameter int unsigned N_FEATURES = 256,
  localparam int unsigned AW        = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fp32_t         feats [N_FEATURES],
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  node_t         mem_rdata,
  output logic          busy,
  output logic          done,
  output logic          err,
  output fp32_t         leaf_value
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e          state;
  logic [AW-1:0]   cur_idx;
  logic [AW:0]     steps;
  fp32_t           feat_sel;
  logic            go_left;
  logic [AW-1:0]   next_idx;
  logic            limit;

  // feature selected by the node; an index past the feature set reads +0
  always_comb begin
    feat_sel = '0;
    if (32'(mem_rdata.feat_idx) < N_FEATURES)
      feat_sel = feats[mem_rdata.feat_idx];
  end

  fp32_lt u_cmp (.a(feat_sel), .b(mem_rdata.value), .lt(go_left));

  always_comb begin
    next_idx  = go_left ? cur_idx + AW'(1) : AW'(mem_rdata.right_idx);
    limit     = (steps >= (AW+1)'(N_NODES));
    mem_re    = 1'b0;
    mem_raddr = '0;
    if (start) begin
      mem_re    = 1'b1;
      mem_raddr = '0;
    end else if (state == S_RUN && !mem_rdata.leaf && !limit) begin
      mem_re    = 1'b1;
      mem_raddr = next_idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur_idx    <= '0;
      steps      <= '0;
      done       <= 1'b0;
      err        <= 1'b0;
      leaf_value <= '0;
    end else if (start) begin
      state   <= S_RUN;
      cur_idx <= '0;
      steps   <= (AW+1)'(1);
      done    <= 1'b0;
      err     <= 1'b0;
    end else if (state == S_RUN) begin
      if (mem_rdata.leaf) begin
        leaf_value <= mem_rdata.value;
        done       <= 1'b1;
        state      <= S_DONE;
      end else if (limit) begin
        leaf_value <= '0;
        err        <= 1'b1;
        done       <= 1'b1;
        state      <= S_DONE;
      end else begin
        cur_idx <= next_idx;
        steps   <= steps + 1'b1;
      end
    end
  end

  assign busy = (state == S_RUN);
endmodule
