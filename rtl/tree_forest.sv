// tree_forest: the inference core, N_TREES decision trees working in parallel.
//
// Each tree has its own node memory (tree_node_mem) and traversal engine
// (tree_engine), so all trees fetch a node in the same clock. All engines
// read the features from the ping-pong feature registers (feature_regs_pp)
// and start together; when the last one reaches its leaf, the leaf values go
// into a pipelined fp32 adder tree whose result, the prediction, is written
// to the ping-pong prediction memory. The ping-pong feature memory holds the
// feature vectors of a burst; forest_ctrl sequences the burst and overlaps
// loading the next feature vector with traversing the current one.
//
// Ports: a node write port (tree number, node number, 64-bit node word) to
// load the model; a write port into the feature memory and a read port from
// the prediction memory, each with a bank bit, for the host; and the burst
// command (start, bank, n_feat, n_infer) with busy, done, err and the cycle
// count of the last burst. err is set when any tree hit the step limit during
// the burst (a malformed model).
//
// Timing per inference, once the burst runs: traversal takes depth+2 clocks
// after the trees start, the sum log2(N_TREES) clocks more, and a new vector
// can start one clock after the previous traversal ended if its registers
// are loaded (n_feat+2 clocks after the fill began).
// The defaults (512 trees of 256 nodes, 8-bit feature index) follow the
// document; the memory depths are this design's choice.
module tree_forest
  import xgb_pkg::*;
#(
  parameter int unsigned N_TREES    = 512,
  parameter int unsigned N_NODES    = 256,
  parameter int unsigned N_FEATURES = 256,
  parameter int unsigned FMEM_DEPTH = 4096,
  parameter int unsigned PMEM_DEPTH = 1024,
  localparam int unsigned TW  = (N_TREES > 1) ? $clog2(N_TREES) : 1,
  localparam int unsigned NAW = (N_NODES > 1) ? $clog2(N_NODES) : 1,
  localparam int unsigned FW  = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1,
  localparam int unsigned NFW = $clog2(N_FEATURES + 1),
  localparam int unsigned FAW = (FMEM_DEPTH > 1) ? $clog2(FMEM_DEPTH) : 1,
  localparam int unsigned PAW = (PMEM_DEPTH > 1) ? $clog2(PMEM_DEPTH) : 1,
  localparam int unsigned NIW = $clog2(PMEM_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // model loading
  input  logic           node_we,
  input  logic [TW-1:0]  node_tree,
  input  logic [NAW-1:0] node_addr,
  input  node_t          node_wdata,
  // feature memory, host side
  input  logic           fmem_we,
  input  logic           fmem_wbank,
  input  logic [FAW-1:0] fmem_waddr,
  input  fp32_t          fmem_wdata,
  // prediction memory, host side
  input  logic           pmem_re,
  input  logic           pmem_rbank,
  input  logic [PAW-1:0] pmem_raddr,
  output fp32_t          pmem_rdata,
  // burst command and status
  input  logic           start,
  input  logic           bank,
  input  logic [NFW-1:0] n_feat,
  input  logic [NIW-1:0] n_infer,
  output logic           busy,
  output logic           done,
  output logic           err,
  output logic [31:0]    cycles
);
  logic           mem_bank;
  logic           fmem_re;
  logic [FAW-1:0] fmem_raddr;
  fp32_t          fmem_rdata;
  logic           freg_we, freg_bank;
  logic [FW-1:0]  freg_idx;
  logic           tree_start, tree_bank, trees_done;
  logic           sum_valid, res_valid;
  logic [PAW-1:0] sum_tag, res_tag;
  fp32_t          res_data;
  logic           pmem_we;
  logic [PAW-1:0] pmem_waddr;

  fp32_t          feats [N_FEATURES];
  fp32_t          leaf  [N_TREES];
  logic [N_TREES-1:0] t_done, t_err;

  forest_ctrl #(
    .N_FEATURES(N_FEATURES), .FMEM_DEPTH(FMEM_DEPTH), .PMEM_DEPTH(PMEM_DEPTH)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .bank, .n_feat, .n_infer, .busy, .done, .cycles, .mem_bank,
    .fmem_re, .fmem_raddr,
    .freg_we, .freg_bank, .freg_idx,
    .tree_start, .tree_bank, .trees_done,
    .sum_valid, .sum_tag, .res_valid, .res_tag,
    .pmem_we, .pmem_waddr
  );

  pingpong_ram #(.WIDTH(32), .DEPTH(FMEM_DEPTH)) u_fmem (
    .clk,
    .wr_en(fmem_we), .wr_bank(fmem_wbank), .wr_addr(fmem_waddr), .wr_data(fmem_wdata),
    .rd_en(fmem_re), .rd_bank(mem_bank), .rd_addr(fmem_raddr), .rd_data(fmem_rdata)
  );

  feature_regs_pp #(.N_FEATURES(N_FEATURES)) u_fregs (
    .clk, .rst_n,
    .wr_en(freg_we), .wr_bank(freg_bank), .wr_idx(freg_idx), .wr_data(fmem_rdata),
    .rd_bank(tree_bank), .feats
  );

  for (genvar t = 0; t < N_TREES; t++) begin : g_tree
    logic           re;
    logic [NAW-1:0] raddr;
    node_t          rdata;

    tree_node_mem #(.N_NODES(N_NODES)) u_mem (
      .clk,
      .we(node_we && node_tree == TW'(t)), .waddr(node_addr), .wdata(node_wdata),
      .re, .raddr, .rdata
    );

    tree_engine #(.N_NODES(N_NODES), .N_FEATURES(N_FEATURES)) u_eng (
      .clk, .rst_n, .start(tree_start), .feats,
      .mem_re(re), .mem_raddr(raddr), .mem_rdata(rdata),
      .busy(), .done(t_done[t]), .err(t_err[t]), .leaf_value(leaf[t])
    );
  end

  assign trees_done = &t_done;

  fp_adder_tree #(.N_IN(N_TREES), .TAG_W(PAW)) u_sum (
    .clk, .rst_n,
    .in_valid(sum_valid), .in_tag(sum_tag), .in_data(leaf),
    .out_valid(res_valid), .out_tag(res_tag), .out_data(res_data)
  );

  pingpong_ram #(.WIDTH(32), .DEPTH(PMEM_DEPTH)) u_pmem (
    .clk,
    .wr_en(pmem_we), .wr_bank(mem_bank), .wr_addr(pmem_waddr), .wr_data(res_data),
    .rd_en(pmem_re), .rd_bank(pmem_rbank), .rd_addr(pmem_raddr), .rd_data(pmem_rdata)
  );

  // sticky per burst: any tree that tripped its step limit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               err <= 1'b0;
    else if (start && !busy)  err <= 1'b0;
    else if (sum_valid)       err <= err | (|t_err);
  end
endmodule
