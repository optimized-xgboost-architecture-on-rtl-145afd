// tb_axil_ctrl: self-checking test of the AXI4-Lite control slave.
//
// Uses 8 trees of 256 nodes. Checks register write/read-back, range checks
// with SLVERR, the start pulse (one clock, suppressed while busy), status
// and cycle read-out, the two-word node write (the low word alone must not
// write, the high word must write the full node to the right tree and
// address), partial-strobe refusal, node-region reads, and that responses
// are held under back-pressure.
module tb_axil_ctrl;
  import xgb_pkg::*;
  localparam int NT = 8, NN = 256, NF = 256, PD = 1024;
  localparam int AW = 3 + 8 + 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic [1:0] s_bresp, s_rresp;
  logic start, bank;
  logic [8:0] n_feat;
  logic [10:0] n_infer;
  logic busy = 0, done = 0, err = 0;
  logic [31:0] cycles = 32'd1234;
  logic node_we;
  logic [2:0] node_tree;
  logic [7:0] node_addr;
  node_t node_wdata;
  int checks = 0, failures = 0, starts = 0, node_writes = 0;
  logic [63:0] last_node;
  int last_tree, last_addr;

  axil_ctrl #(.N_TREES(NT), .N_NODES(NN), .N_FEATURES(NF), .PMEM_DEPTH(PD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (start) starts++;
    if (node_we) begin
      node_writes++; last_node <= node_wdata; last_tree <= node_tree; last_addr <= node_addr;
    end
  end

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want, input string m);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", m, got, want);
    end
  endtask

  task automatic wr(input logic [AW-1:0] a, input logic [31:0] d, output logic [1:0] resp,
                    input int bp = 0);
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    repeat (bp) begin
      @(negedge clk);
      checks++;
      if (!s_bvalid) begin failures++; $display("FAIL bvalid dropped"); end
    end
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    resp = s_bresp;
    @(negedge clk);
    s_bready = 0;
  endtask

  task automatic rd(input logic [AW-1:0] a, output logic [31:0] d, output logic [1:0] resp,
                    input int bp = 0);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 0;
    repeat (bp) @(negedge clk);
    s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata; resp = s_rresp;
    @(negedge clk);
    s_rready = 0;
  endtask

  function automatic logic [AW-1:0] node_a(input int t, input int n, input int hi);
    return AW'((1 << (AW - 1)) | (t * NN + n) * 8 + hi * 4);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] r;
    logic [31:0] d;
    logic [63:0] nd;
    int t, n, w0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(AW'(REG_NFEAT), d, r);  expect_eq(d, 1, "NFEAT reset");
    wr(AW'(REG_NFEAT), 13, r, 2); expect_eq(r, RESP_OKAY, "NFEAT write resp");
    rd(AW'(REG_NFEAT), d, r, 3);  expect_eq(d, 13, "NFEAT readback");
    expect_eq(n_feat, 13, "n_feat port");
    wr(AW'(REG_NFEAT), 0, r);   expect_eq(r, RESP_SLVERR, "NFEAT 0 refused");
    wr(AW'(REG_NFEAT), 257, r); expect_eq(r, RESP_SLVERR, "NFEAT 257 refused");
    expect_eq(n_feat, 13, "n_feat kept");
    wr(AW'(REG_NINFER), 1024, r); expect_eq(r, RESP_OKAY, "NINFER 1024");
    expect_eq(n_infer, 1024, "n_infer port");
    wr(AW'(REG_NINFER), 1025, r); expect_eq(r, RESP_SLVERR, "NINFER 1025 refused");
    wr(AW'(REG_STATUS), 1, r); expect_eq(r, RESP_SLVERR, "STATUS read-only");
    rd(AW'(REG_NTREES), d, r); expect_eq(d, NT, "NTREES");
    rd(AW'(REG_CYCLES), d, r); expect_eq(d, 1234, "CYCLES");
    busy = 1; done = 0; err = 1;
    rd(AW'(REG_STATUS), d, r); expect_eq(d, 32'b101, "STATUS busy/err");
    busy = 0; done = 1; err = 0;
    rd(AW'(REG_STATUS), d, r); expect_eq(d, 32'b010, "STATUS done");
    // start pulse
    w0 = starts;
    wr(AW'(REG_CTRL), 32'b11, r);
    expect_eq(starts - w0, 1, "one start pulse");
    expect_eq(bank, 1, "bank bit");
    busy = 1;
    wr(AW'(REG_CTRL), 32'b01, r);
    expect_eq(starts - w0, 1, "start ignored while busy");
    busy = 0;
    // node writes
    for (int k = 0; k < 50; k++) begin
      t = int'($urandom % NT); n = int'($urandom % NN);
      nd = {$urandom, $urandom};
      w0 = node_writes;
      wr(node_a(t, n, 0), nd[31:0], r);
      expect_eq(node_writes - w0, 0, "low word does not write");
      wr(node_a(t, n, 1), nd[63:32], r);
      @(negedge clk);
      expect_eq(node_writes - w0, 1, "high word writes");
      expect_eq(last_node, nd, "node word");
      expect_eq(last_tree, t, "node tree");
      expect_eq(last_addr, n, "node address");
    end
    rd(node_a(1, 2, 0), d, r); expect_eq(r, RESP_SLVERR, "node read refused");
    s_wstrb = 4'h3;
    w0 = node_writes;
    wr(node_a(1, 2, 1), 32'h5, r); expect_eq(r, RESP_SLVERR, "partial strobe refused");
    expect_eq(node_writes - w0, 0, "partial strobe writes nothing");
    s_wstrb = 4'hF;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
