// tb_xgb_harness: end-to-end test of the accelerator through its AXI ports.
//
// Shared by the reduced-size and the full-size testbench. It plays the host:
//  1. generates a random forest (NT trees, depth up to 8, at most MAXN nodes
//     each, testing features 0..5) and loads it node by node over AXI4-Lite;
//  2. runs four workloads with 8, 13, 15 and 6 features per vector and
//     NI0..NI3 vectors, split into bursts that fit the memories. Bursts
//     alternate between the two banks; the feature vectors of the next burst
//     are written over AXI4 into the free bank while the current burst runs;
//  3. reads every prediction back over AXI4 and compares it bit for bit with
//     the software reference (tree walks, pairwise reference sum);
//  4. checks the CYCLES register of single-vector bursts against
//     n_feat + depth + log2(NT) + 5 clocks;
//  5. checks a refused register write (SLVERR) and the step-limit error of a
//     looping tree.
// It counts how often each mechanism happened (bank 0 and bank 1 bursts,
// host writes during a burst, trees waiting for a register fill, a fill
// waiting for the trees, SLVERR, err) and fails on any that never did.
// FULL=1 instantiates the top with its default parameters; the other
// parameters must then match those defaults.
module tb_xgb_harness #(
  parameter bit FULL = 1'b0,
  parameter int NT   = 16,
  parameter int NN   = 256,
  parameter int NF   = 256,
  parameter int FD   = 512,
  parameter int PD   = 64,
  parameter int MAXN = 64,
  parameter int NI0  = 10,
  parameter int NI1  = 6,
  parameter int NI2  = 40,
  parameter int NI3  = 8,
  parameter longint WATCHDOG = 4000000
);
  import xgb_pkg::*;
  import tb_fp_pkg::*;
  import tb_model_pkg::*;

  localparam int TW   = $clog2(NT);
  localparam int NAW  = $clog2(NN);
  localparam int FAW  = $clog2(FD);
  localparam int PAW  = $clog2(PD);
  localparam int LAW  = TW + NAW + 4;
  localparam int XAW  = ((FAW > PAW) ? FAW : PAW) + 4;
  localparam int LEV  = $clog2(NT);
  localparam int MODEL_NF = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  // AXI4-Lite
  logic [LAW-1:0] l_awaddr = '0, l_araddr = '0;
  logic l_awvalid = 0, l_wvalid = 0, l_bready = 0, l_arvalid = 0, l_rready = 0;
  logic l_awready, l_wready, l_bvalid, l_arready, l_rvalid;
  logic [31:0] l_wdata = '0, l_rdata;
  logic [3:0] l_wstrb = 4'hF;
  logic [1:0] l_bresp, l_rresp;
  // AXI4
  logic [3:0] x_awid = '0, x_arid = '0, x_bid, x_rid;
  logic [XAW-1:0] x_awaddr = '0, x_araddr = '0;
  logic [7:0] x_awlen = '0, x_arlen = '0;
  logic [2:0] x_awsize = 3'd2, x_arsize = 3'd2;
  logic [1:0] x_awburst = 2'b01, x_arburst = 2'b01, x_bresp, x_rresp;
  logic x_awvalid = 0, x_wvalid = 0, x_wlast = 0, x_bready = 0, x_arvalid = 0, x_rready = 0;
  logic x_awready, x_wready, x_bvalid, x_arready, x_rvalid, x_rlast;
  logic [31:0] x_wdata = '0, x_rdata;
  logic [3:0] x_wstrb = 4'hF;
  logic done_o;
  // internal probes
  logic p_busy, p_tree_wait, p_fill_wait;

  int checks = 0, failures = 0;
  int n_bank0 = 0, n_bank1 = 0, n_wr_busy = 0, n_tree_wait = 0, n_fill_wait = 0;
  int n_slverr = 0, n_err = 0, n_pred = 0;
  logic [63:0] model [NT][$];

  if (FULL) begin : g_dut
    xgb_accel_top u_dut (
      .clk, .rst_n,
      .s_axil_awaddr(l_awaddr), .s_axil_awvalid(l_awvalid), .s_axil_awready(l_awready),
      .s_axil_wdata(l_wdata), .s_axil_wstrb(l_wstrb), .s_axil_wvalid(l_wvalid),
      .s_axil_wready(l_wready), .s_axil_bresp(l_bresp), .s_axil_bvalid(l_bvalid),
      .s_axil_bready(l_bready), .s_axil_araddr(l_araddr), .s_axil_arvalid(l_arvalid),
      .s_axil_arready(l_arready), .s_axil_rdata(l_rdata), .s_axil_rresp(l_rresp),
      .s_axil_rvalid(l_rvalid), .s_axil_rready(l_rready),
      .s_axi_awid(x_awid), .s_axi_awaddr(x_awaddr), .s_axi_awlen(x_awlen),
      .s_axi_awsize(x_awsize), .s_axi_awburst(x_awburst), .s_axi_awvalid(x_awvalid),
      .s_axi_awready(x_awready), .s_axi_wdata(x_wdata), .s_axi_wstrb(x_wstrb),
      .s_axi_wlast(x_wlast), .s_axi_wvalid(x_wvalid), .s_axi_wready(x_wready),
      .s_axi_bid(x_bid), .s_axi_bresp(x_bresp), .s_axi_bvalid(x_bvalid),
      .s_axi_bready(x_bready), .s_axi_arid(x_arid), .s_axi_araddr(x_araddr),
      .s_axi_arlen(x_arlen), .s_axi_arsize(x_arsize), .s_axi_arburst(x_arburst),
      .s_axi_arvalid(x_arvalid), .s_axi_arready(x_arready), .s_axi_rid(x_rid),
      .s_axi_rdata(x_rdata), .s_axi_rresp(x_rresp), .s_axi_rlast(x_rlast),
      .s_axi_rvalid(x_rvalid), .s_axi_rready(x_rready), .done(done_o)
    );
  end else begin : g_dut
    xgb_accel_top #(.N_TREES(NT), .N_NODES(NN), .N_FEATURES(NF), .FMEM_DEPTH(FD),
                    .PMEM_DEPTH(PD)) u_dut (
      .clk, .rst_n,
      .s_axil_awaddr(l_awaddr), .s_axil_awvalid(l_awvalid), .s_axil_awready(l_awready),
      .s_axil_wdata(l_wdata), .s_axil_wstrb(l_wstrb), .s_axil_wvalid(l_wvalid),
      .s_axil_wready(l_wready), .s_axil_bresp(l_bresp), .s_axil_bvalid(l_bvalid),
      .s_axil_bready(l_bready), .s_axil_araddr(l_araddr), .s_axil_arvalid(l_arvalid),
      .s_axil_arready(l_arready), .s_axil_rdata(l_rdata), .s_axil_rresp(l_rresp),
      .s_axil_rvalid(l_rvalid), .s_axil_rready(l_rready),
      .s_axi_awid(x_awid), .s_axi_awaddr(x_awaddr), .s_axi_awlen(x_awlen),
      .s_axi_awsize(x_awsize), .s_axi_awburst(x_awburst), .s_axi_awvalid(x_awvalid),
      .s_axi_awready(x_awready), .s_axi_wdata(x_wdata), .s_axi_wstrb(x_wstrb),
      .s_axi_wlast(x_wlast), .s_axi_wvalid(x_wvalid), .s_axi_wready(x_wready),
      .s_axi_bid(x_bid), .s_axi_bresp(x_bresp), .s_axi_bvalid(x_bvalid),
      .s_axi_bready(x_bready), .s_axi_arid(x_arid), .s_axi_araddr(x_araddr),
      .s_axi_arlen(x_arlen), .s_axi_arsize(x_arsize), .s_axi_arburst(x_arburst),
      .s_axi_arvalid(x_arvalid), .s_axi_arready(x_arready), .s_axi_rid(x_rid),
      .s_axi_rdata(x_rdata), .s_axi_rresp(x_rresp), .s_axi_rlast(x_rlast),
      .s_axi_rvalid(x_rvalid), .s_axi_rready(x_rready), .done(done_o)
    );
  end

  // burst-controller state seen from outside, to count stalls
  assign p_busy      = g_dut.u_dut.u_forest.u_ctrl.busy;
  assign p_tree_wait = p_busy && !g_dut.u_dut.u_forest.u_ctrl.running &&
                       !g_dut.u_dut.u_forest.u_ctrl.full[g_dut.u_dut.u_forest.u_ctrl.comp_bank] &&
                       (g_dut.u_dut.u_forest.u_ctrl.comp_cnt < g_dut.u_dut.u_forest.u_ctrl.n_infer);
  assign p_fill_wait = p_busy && !g_dut.u_dut.u_forest.u_ctrl.filling &&
                       !g_dut.u_dut.u_forest.u_ctrl.wr_pend &&
                       g_dut.u_dut.u_forest.u_ctrl.full[g_dut.u_dut.u_forest.u_ctrl.fill_bank] &&
                       (g_dut.u_dut.u_forest.u_ctrl.load_cnt < g_dut.u_dut.u_forest.u_ctrl.n_infer);

  always #4 clk = ~clk;    // 125 MHz in the reference implementation

  always @(posedge clk) if (rst_n) begin
    if (p_tree_wait) n_tree_wait++;
    if (p_fill_wait) n_fill_wait++;
    if (x_wvalid && x_wready && p_busy) n_wr_busy++;
  end

  task automatic fail(input string m);
    failures++;
    if (failures < 12) $display("FAIL %s", m);
  endtask

  // ---------------- AXI4-Lite host tasks ----------------
  task automatic lw(input longint a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    l_awaddr = LAW'(a); l_awvalid = 1; l_wdata = d; l_wvalid = 1;
    #1;
    while (!(l_awready && l_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    l_awvalid = 0; l_wvalid = 0; l_bready = 1;
    #1;
    while (!l_bvalid) begin @(negedge clk); #1; end
    resp = l_bresp;
    @(negedge clk);
    l_bready = 0;
  endtask

  task automatic lr(input longint a, output logic [31:0] d);
    @(negedge clk);
    l_araddr = LAW'(a); l_arvalid = 1;
    #1;
    while (!l_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    l_arvalid = 0; l_rready = 1;
    #1;
    while (!l_rvalid) begin @(negedge clk); #1; end
    d = l_rdata;
    if (l_rresp != RESP_OKAY) fail("register read error");
    @(negedge clk);
    l_rready = 0;
  endtask

  task automatic lw_ok(input longint a, input logic [31:0] d);
    logic [1:0] r;
    lw(a, d, r);
    checks++;
    if (r != RESP_OKAY) fail($sformatf("register write %h refused", a));
  endtask

  // ---------------- AXI4 host tasks ----------------
  task automatic xw(input longint a, const ref logic [31:0] d[], input int first, input int len);
    @(negedge clk);
    x_awaddr = XAW'(a); x_awlen = 8'(len - 1); x_awburst = 2'b01; x_awvalid = 1;
    #1;
    while (!x_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    x_awvalid = 0;
    for (int i = 0; i < len; i++) begin
      x_wvalid = 1; x_wdata = d[first + i]; x_wlast = (i == len - 1);
      #1;
      while (!x_wready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    x_wvalid = 0; x_wlast = 0; x_bready = 1;
    #1;
    while (!x_bvalid) begin @(negedge clk); #1; end
    checks++;
    if (x_bresp != RESP_OKAY) fail("feature write refused");
    @(negedge clk);
    x_bready = 0;
  endtask

  task automatic xr(input longint a, input int len, ref logic [31:0] d[], input int first);
    int i;
    @(negedge clk);
    x_araddr = XAW'(a); x_arlen = 8'(len - 1); x_arburst = 2'b01; x_arvalid = 1;
    #1;
    while (!x_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    x_arvalid = 0; x_rready = 1;
    i = 0;
    while (i < len) begin
      #1;
      if (x_rvalid) begin
        d[first + i] = x_rdata;
        if (x_rresp != RESP_OKAY) fail("prediction read error");
        i++;
      end
      @(negedge clk);
    end
    x_rready = 0;
  endtask

  // write a bank's feature words, in bursts of up to 256 beats
  task automatic write_features(input int b, const ref logic [31:0] f[]);
    for (int w = 0; w < f.size(); w += 256)
      xw((longint'(b) << (FAW + 2)) | (longint'(w) << 2), f, w,
         (f.size() - w > 256) ? 256 : f.size() - w);
  endtask

  task automatic read_predictions(input int b, input int n, ref logic [31:0] p[]);
    p = new[n];
    for (int w = 0; w < n; w += 256)
      xr((longint'(1) << (XAW - 1)) | (longint'(b) << (PAW + 2)) | (longint'(w) << 2),
         (n - w > 256) ? 256 : n - w, p, w);
  endtask

  // ---------------- reference model ----------------
  task automatic reference(const ref logic [31:0] f[], input int i, input int nf,
                           output logic [31:0] p, output int dmax);
    logic [31:0] fv[];
    logic [31:0] lv[];
    int leaf, d;
    fv = new[NF]; lv = new[NT];
    for (int k = 0; k < NF; k++) fv[k] = (k < nf) ? f[i * nf + k] : 32'd0;
    dmax = 0;
    for (int t = 0; t < NT; t++) begin
      eval_tree(model[t], fv, leaf, d);
      lv[t] = model[t][leaf][31:0];
      if (d > dmax) dmax = d;
    end
    p = sum_tree(lv);
  endtask

  task automatic load_tree(input int t);
    foreach (model[t][i]) begin
      lw_ok((longint'(1) << (LAW - 1)) | (longint'(t * NN + i) << 3), model[t][i][31:0]);
      lw_ok((longint'(1) << (LAW - 1)) | (longint'(t * NN + i) << 3) | 4, model[t][i][63:32]);
    end
  endtask

  task automatic wait_done();
    logic [31:0] s;
    do lr(longint'(REG_STATUS), s); while (!s[1]);
  endtask

  task automatic check_burst(const ref logic [31:0] f[], input int b, input int nf, input int ni,
                             input bit timed);
    logic [31:0] p[];
    logic [31:0] e, cyc;
    int dmax, dm;
    read_predictions(b, ni, p);
    dm = 0;
    for (int i = 0; i < ni; i++) begin
      reference(f, i, nf, e, dmax);
      if (dmax > dm) dm = dmax;
      checks++;
      n_pred++;
      if (p[i] !== e) fail($sformatf("bank %0d vector %0d: %h expected %h", b, i, p[i], e));
    end
    if (timed) begin
      lr(longint'(REG_CYCLES), cyc);
      checks++;
      if (cyc != 32'(nf + dm + LEV + 5))
        fail($sformatf("single vector took %0d clocks, expected %0d", cyc, nf + dm + LEV + 5));
    end
  endtask

  function automatic void make_features(ref logic [31:0] f[], input int n);
    f = new[n];
    foreach (f[i]) f[i] = rand_val();
  endfunction

  // run one workload: ni vectors of nf features, in bursts alternating banks
  task automatic workload(input int nf, input int ni, inout int bank);
    int per, left, cur, nxt;
    logic [31:0] fc[], fn[];
    per = FD / nf;
    if (per > PD) per = PD;
    left = ni;
    cur = (left > per) ? per : left;
    make_features(fc, cur * nf);
    write_features(bank, fc);
    while (left > 0) begin
      lw_ok(longint'(REG_NFEAT), 32'(nf));
      lw_ok(longint'(REG_NINFER), 32'(cur));
      lw_ok(longint'(REG_CTRL), {30'd0, 1'(bank), 1'b1});
      if (bank == 0) n_bank0++; else n_bank1++;
      left -= cur;
      nxt = (left > per) ? per : left;
      if (nxt > 0) begin          // fill the other bank while this burst runs
        make_features(fn, nxt * nf);
        write_features(1 - bank, fn);
      end
      wait_done();
      check_burst(fc, bank, nf, cur, 1'b0);
      bank = 1 - bank;
      cur = nxt;
      fc = fn;
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] r;
    logic [31:0] d;
    logic [31:0] f1[];
    int bank;
    repeat (4) @(negedge clk);
    rst_n = 1;
    lr(longint'(REG_NTREES), d);
    checks++;
    if (d != 32'(NT)) fail("NTREES");
    for (int t = 0; t < NT; t++) begin
      gen_tree(model[t], MAXN, 8, MODEL_NF, 5 * (t % 5));
      load_tree(t);
    end
    $display("model loaded: %0d trees", NT);
    // refused write
    lw(longint'(REG_NFEAT), 32'(NF + 1), r);
    checks++;
    if (r == RESP_SLVERR) n_slverr++; else fail("out-of-range NFEAT accepted");
    // the four workloads (features per vector as in the evaluated datasets)
    bank = 0;
    workload(8,  NI0, bank);
    workload(13, NI1, bank);
    workload(15, NI2, bank);
    workload(6,  NI3, bank);
    $display("workloads done: %0d predictions checked", n_pred);
    // single-vector bursts: exact latency
    for (int k = 0; k < 4; k++) begin
      int nf;
      nf = MODEL_NF + int'($urandom % 20);
      make_features(f1, nf);
      write_features(k % 2, f1);
      lw_ok(longint'(REG_NFEAT), 32'(nf));
      lw_ok(longint'(REG_NINFER), 32'd1);
      lw_ok(longint'(REG_CTRL), {30'd0, 1'(k % 2), 1'b1});
      wait_done();
      check_burst(f1, k % 2, nf, 1, 1'b1);
    end
    lr(longint'(REG_STATUS), d);
    checks++;
    if (d[2]) fail("err without a malformed tree");
    // looping tree: step-limit error, that tree contributes +0
    model[0].delete();
    model[0].push_back(mk_node(1'b0, 0, 0, 32'hFF800000));
    load_tree(0);
    model[0][0] = mk_node(1'b1, 0, 0, 32'h0);     // what the hardware then returns
    make_features(f1, 8);
    write_features(0, f1);
    lw_ok(longint'(REG_NFEAT), 32'd8);
    lw_ok(longint'(REG_NINFER), 32'd1);
    lw_ok(longint'(REG_CTRL), 32'b01);
    wait_done();
    lr(longint'(REG_STATUS), d);
    checks++;
    if (d[2]) n_err++; else fail("err not raised");
    check_burst(f1, 0, 8, 1, 1'b0);

    $display("mechanisms: bank0 bursts=%0d bank1 bursts=%0d host writes during burst=%0d",
             n_bank0, n_bank1, n_wr_busy);
    $display("            trees waiting for fill=%0d clk, fill waiting for trees=%0d clk",
             n_tree_wait, n_fill_wait);
    $display("            SLVERR=%0d step-limit errors=%0d", n_slverr, n_err);
    if (n_bank0 == 0) fail("no burst on bank 0");
    if (n_bank1 == 0) fail("no burst on bank 1");
    if (n_wr_busy == 0) fail("no host write during a burst");
    if (n_tree_wait == 0) fail("trees never waited for a fill");
    if (n_fill_wait == 0) fail("a fill never waited for the trees");
    if (n_slverr == 0) fail("no refused write");
    if (n_err == 0) fail("no step-limit error");
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
