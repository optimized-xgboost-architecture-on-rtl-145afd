// tb_tree_engine: self-checking test of the single-tree traversal engine.
//
// The engine is connected to a tree_node_mem. Random trees (depth up to 8,
// up to 256 nodes) are loaded and evaluated for random feature vectors; the
// leaf value must match the software walk and done must rise exactly
// depth+2 clocks after start (one node per clock). A degenerate one-leaf
// tree and a malformed tree whose right index loops back are also checked
// (the latter must end with err and leaf value +0 after N_NODES reads).
module tb_tree_engine;
  import xgb_pkg::*;
  import tb_fp_pkg::*;
  import tb_model_pkg::*;

  localparam int NN = 256, NF = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  fp32_t feats [NF];
  logic mem_re, busy, done, err;
  logic [7:0] mem_raddr;
  node_t mem_rdata;
  fp32_t leaf_value;
  logic we = 1'b0;
  logic [7:0] waddr = '0;
  node_t wdata = '0;
  int checks = 0, failures = 0;

  tree_node_mem #(.N_NODES(NN)) u_mem (.clk, .we, .waddr, .wdata,
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));
  tree_engine #(.N_NODES(NN), .N_FEATURES(NF)) dut (.clk, .rst_n, .start, .feats,
    .mem_re, .mem_raddr, .mem_rdata, .busy, .done, .err, .leaf_value);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic load(const ref logic [63:0] nodes[$]);
    foreach (nodes[i]) begin
      @(negedge clk); we = 1'b1; waddr = 8'(i); wdata = node_t'(nodes[i]);
    end
    @(negedge clk); we = 1'b0;
  endtask

  // start, wait for done, return latency in clocks
  task automatic run(output int lat);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] nodes[$];
    logic [31:0] fv[];
    int leaf, depth, lat;
    fv = new[NF];
    for (int i = 0; i < NF; i++) feats[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 60; t++) begin
      gen_tree(nodes, NN, 8, NF, (t % 3) * 15);
      load(nodes);
      for (int k = 0; k < 40; k++) begin
        for (int i = 0; i < NF; i++) begin fv[i] = rand_val(); feats[i] = fv[i]; end
        eval_tree(nodes, fv, leaf, depth);
        run(lat);
        checks++;
        if (leaf_value !== nodes[leaf][31:0] || err)
          fail($sformatf("tree %0d: leaf %h expected %h", t, leaf_value, nodes[leaf][31:0]));
        checks++;
        if (lat != depth + 2) fail($sformatf("latency %0d for depth %0d", lat, depth));
      end
    end

    // single leaf
    nodes.delete();
    nodes.push_back(mk_node(1'b1, 0, 0, 32'h40490FDB));
    load(nodes);
    run(lat);
    checks++;
    if (leaf_value !== 32'h40490FDB || lat != 2) fail("single leaf");

    // malformed: node 0 decision whose right child is itself, always taken
    nodes.delete();
    nodes.push_back(mk_node(1'b0, 0, 0, 32'hFF800000));   // feat < -inf never true
    load(nodes);
    run(lat);
    checks++;
    if (!err || leaf_value !== 32'h0 || lat != NN + 1)
      fail($sformatf("loop guard: err=%b lat=%0d", err, lat));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
