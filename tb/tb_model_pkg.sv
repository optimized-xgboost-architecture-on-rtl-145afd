// tb_model_pkg: random decision-tree models and a software reference for
// the testbenches.
//
// gen_tree builds a random binary tree directly in pre-order depth-first
// layout (left child at index+1, right child index stored in the parent)
// with an explicit stack, bounded in depth and node count, using the 64-bit
// node word: {7'b0, leaf, feature[7:0], right[7:0], 8'b0, value[31:0]}.
// eval_tree walks such a tree for one feature vector with a double-precision
// comparison and returns the index of the leaf reached and its depth.
// sum_tree adds leaf values pairwise in the balanced order of the hardware
// adder tree, each addition rounded by the reference adder of tb_fp_pkg.
package tb_model_pkg;
  import tb_fp_pkg::*;

  function automatic logic [63:0] mk_node(input logic leaf, input int feat,
                                          input int right, input logic [31:0] value);
    return {7'd0, leaf, 8'(feat), 8'(right), 8'd0, value};
  endfunction

  // random feature / threshold value: moderate magnitude, either sign
  function automatic logic [31:0] rand_val();
    return rand_fp(124, 129);
  endfunction

  task automatic gen_tree(ref logic [63:0] nodes[$], input int max_nodes,
                          input int max_depth, input int n_feat, input int leaf_pct);
    int stk_idx[$];
    int stk_dep[$];
    int depth, idx, p;
    bit make_leaf;
    nodes.delete();
    depth = 0;
    forever begin
      idx = nodes.size();
      make_leaf = (depth >= max_depth) ||
                  (idx + 2 + stk_idx.size() + 1 > max_nodes) ||
                  (depth > 0 && int'($urandom % 100) < leaf_pct);
      if (make_leaf) begin
        nodes.push_back(mk_node(1'b1, 0, 0, rand_fp(118, 124)));
        if (stk_idx.size() == 0) break;
        p = stk_idx.pop_back();
        depth = stk_dep.pop_back() + 1;
        nodes[p][47:40] = 8'(nodes.size());
      end else begin
        nodes.push_back(mk_node(1'b0, int'($urandom % n_feat), 0, rand_val()));
        stk_idx.push_back(idx);
        stk_dep.push_back(depth);
        depth++;
      end
    end
  endtask

  task automatic eval_tree(const ref logic [63:0] nodes[$], const ref logic [31:0] feats[],
                           output int leaf_idx, output int depth);
    int i;
    i = 0;
    depth = 0;
    while (!nodes[i][56]) begin
      if (fp2real(feats[nodes[i][55:48]]) < fp2real(nodes[i][31:0])) i = i + 1;
      else i = int'(nodes[i][47:40]);
      depth++;
    end
    leaf_idx = i;
  endtask

  function automatic logic [31:0] sum_tree(const ref logic [31:0] v[]);
    logic [31:0] cur[$];
    logic [31:0] nxt[$];
    int p;
    p = 1;
    while (p < v.size()) p = p * 2;
    for (int i = 0; i < p; i++) cur.push_back(i < v.size() ? v[i] : 32'd0);
    while (cur.size() > 1) begin
      nxt.delete();
      for (int i = 0; i < cur.size(); i += 2) nxt.push_back(ref_add(cur[i], cur[i+1]));
      cur = nxt;
    end
    return cur[0];
  endfunction
endpackage
