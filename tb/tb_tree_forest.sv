// tb_tree_forest: self-checking test of the inference core.
//
// Eight trees of up to 256 nodes (depth up to 8) over 16 features. Models
// are loaded through the node port, feature vectors written to the feature
// memory, bursts started on either bank, and every prediction read back
// from the prediction memory is compared bit for bit with the software
// reference (tree walks plus pairwise reference sum). A single-inference
// burst must take exactly n_feat + depth + log2(N_TREES) + 5 clocks, depth
// being the deepest leaf reached. A malformed tree must raise err. The
// trees test features 0..2 only, so every burst (3 to 16 features per
// vector) feeds them fully.
module tb_tree_forest;
  import xgb_pkg::*;
  import tb_fp_pkg::*;
  import tb_model_pkg::*;

  localparam int NT = 8, NN = 256, NF = 16, FD = 256, PD = 32, LEV = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic node_we = 0;
  logic [2:0] node_tree = '0;
  logic [7:0] node_addr = '0;
  node_t node_wdata = '0;
  logic fmem_we = 0, fmem_wbank = 0;
  logic [7:0] fmem_waddr = '0;
  fp32_t fmem_wdata = '0;
  logic pmem_re = 0, pmem_rbank = 0;
  logic [4:0] pmem_raddr = '0;
  fp32_t pmem_rdata;
  logic start = 0, bank = 0;
  logic [4:0] n_feat = 5'd1;
  logic [5:0] n_infer = '0;
  logic busy, done, err;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  logic [63:0] model [NT][$];
  logic [31:0] feat [2][FD];

  tree_forest #(.N_TREES(NT), .N_NODES(NN), .N_FEATURES(NF), .FMEM_DEPTH(FD), .PMEM_DEPTH(PD))
    dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endtask

  task automatic load_tree(input int t);
    foreach (model[t][i]) begin
      @(negedge clk);
      node_we = 1; node_tree = 3'(t); node_addr = 8'(i); node_wdata = node_t'(model[t][i]);
    end
    @(negedge clk); node_we = 0;
  endtask

  // reference prediction of inference i of bank b; also the deepest leaf
  task automatic reference(input int b, input int i, input int nf, output logic [31:0] p,
                           output int dmax);
    logic [31:0] fv[];
    logic [31:0] lv[];
    int leaf, d;
    fv = new[NF]; lv = new[NT];
    for (int f = 0; f < NF; f++) fv[f] = (f < nf) ? feat[b][i * nf + f] : 32'd0;
    dmax = 0;
    for (int t = 0; t < NT; t++) begin
      eval_tree(model[t], fv, leaf, d);
      lv[t] = model[t][leaf][31:0];
      if (d > dmax) dmax = d;
    end
    p = sum_tree(lv);
  endtask

  task automatic burst(input int b, input int nf, input int ni, input bit check_time);
    logic [31:0] p;
    int dmax, dm;
    for (int w = 0; w < FD; w++) begin
      feat[b][w] = rand_val();
      @(negedge clk); fmem_we = 1; fmem_wbank = 1'(b); fmem_waddr = 8'(w); fmem_wdata = feat[b][w];
    end
    @(negedge clk); fmem_we = 0;
    n_feat = 5'(nf); n_infer = 6'(ni); bank = 1'(b); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    dm = 0;
    for (int i = 0; i < ni; i++) begin
      reference(b, i, nf, p, dmax);
      if (dmax > dm) dm = dmax;
      pmem_re = 1; pmem_rbank = 1'(b); pmem_raddr = 5'(i);
      @(negedge clk); pmem_re = 0;
      checks++;
      if (pmem_rdata !== p) fail($sformatf("bank %0d inference %0d: %h expected %h", b, i, pmem_rdata, p));
    end
    if (check_time) begin
      checks++;
      if (cycles != nf + dm + LEV + 5)
        fail($sformatf("single inference took %0d clocks, expected %0d", cycles, nf + dm + LEV + 5));
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      gen_tree(model[t], NN, 8, 3, 10 * (t % 4));  // trees use features 0..2
      load_tree(t);
    end
    burst(0, 8, 20, 0);
    burst(1, 13, 16, 0);
    burst(0, 3, 32, 0);
    for (int k = 0; k < 6; k++) burst(k % 2, 3 + int'($urandom % (NF - 2)), 1, 1);
    checks++;
    if (err) fail("err without a malformed tree");
    // malformed tree 5: root always goes right to itself
    model[5].delete();
    model[5].push_back(mk_node(1'b0, 0, 0, 32'hFF800000));
    load_tree(5);
    @(negedge clk); n_infer = 1; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (!err) fail("err not raised by a looping tree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
