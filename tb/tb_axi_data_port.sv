// tb_axi_data_port: self-checking test of the AXI4 data slave.
//
// Uses 256-word feature banks and 64-word prediction banks. Random INCR
// write bursts (1..32 beats, random wvalid gaps) into both feature banks are
// compared word by word with a model; a FIXED burst must write one word
// only. Prediction reads are served from a memory model with a one-clock
// read; random INCR read bursts with random rready back-pressure must
// return the right words, RLAST on the last beat and the request ID.
// Writes to the prediction region, reads of the feature region, WRAP bursts
// and partial strobes must answer SLVERR.
module tb_axi_data_port;
  import xgb_pkg::*;
  localparam int FD = 256, PD = 64, IDW = 4;
  localparam int AW = 8 + 4;
  localparam int R = AW - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [IDW-1:0] s_awid = '0, s_arid = '0, s_bid, s_rid;
  logic [AW-1:0] s_awaddr = '0, s_araddr = '0;
  logic [7:0] s_awlen = '0, s_arlen = '0;
  logic [2:0] s_awsize = 3'd2, s_arsize = 3'd2;
  logic [1:0] s_awburst = 2'b01, s_arburst = 2'b01, s_bresp, s_rresp;
  logic s_awvalid = 0, s_wvalid = 0, s_wlast = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid, s_rlast;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic fmem_we, fmem_wbank, pmem_re, pmem_rbank;
  logic [7:0] fmem_waddr;
  logic [5:0] pmem_raddr;
  fp32_t fmem_wdata, pmem_rdata;

  logic [31:0] fmem [2][FD];
  logic [31:0] fmodel [2][FD];
  logic [31:0] pmem [2][PD];
  int checks = 0, failures = 0;

  axi_data_port #(.FMEM_DEPTH(FD), .PMEM_DEPTH(PD), .ID_W(IDW)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (fmem_we) fmem[fmem_wbank][fmem_waddr] <= fmem_wdata;
    if (pmem_re) pmem_rdata <= pmem[pmem_rbank][pmem_raddr];
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string m);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", m, got, want);
    end
  endtask

  task automatic wburst(input logic [AW-1:0] a, input int len, input logic [1:0] burst,
                        input logic [31:0] d[], input logic [IDW-1:0] id, output logic [1:0] resp);
    @(negedge clk);
    s_awaddr = a; s_awlen = 8'(len - 1); s_awburst = burst; s_awid = id; s_awvalid = 1;
    while (!s_awready) @(negedge clk);
    @(negedge clk);
    s_awvalid = 0;
    for (int i = 0; i < len; i++) begin
      while ($urandom % 4 == 0) begin s_wvalid = 0; @(negedge clk); end
      s_wvalid = 1; s_wdata = d[i]; s_wlast = (i == len - 1);
      while (!s_wready) @(negedge clk);
      @(negedge clk);
    end
    s_wvalid = 0; s_wlast = 0;
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    resp = s_bresp;
    expect_eq(32'(s_bid), 32'(id), "BID");
    @(negedge clk);
    s_bready = 0;
  endtask

  task automatic rburst(input logic [AW-1:0] a, input int len, input logic [1:0] burst,
                        input logic [IDW-1:0] id, output logic [31:0] d[], output logic [1:0] resp);
    int i;
    d = new[len];
    @(negedge clk);
    s_araddr = a; s_arlen = 8'(len - 1); s_arburst = burst; s_arid = id; s_arvalid = 1;
    while (!s_arready) @(negedge clk);
    @(negedge clk);
    s_arvalid = 0;
    i = 0;
    resp = RESP_OKAY;
    while (i < len) begin
      s_rready = ($urandom % 3 != 0);
      #1;
      if (s_rvalid && s_rready) begin
        d[i] = s_rdata;
        if (s_rresp != RESP_OKAY) resp = s_rresp;
        expect_eq(32'(s_rlast), 32'(i == len - 1), "RLAST");
        expect_eq(32'(s_rid), 32'(id), "RID");
        i++;
      end
      @(negedge clk);
    end
    s_rready = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d[];
    logic [1:0] r;
    int b, w, len;
    for (int bb = 0; bb < 2; bb++) for (int i = 0; i < FD; i++) begin
      fmem[bb][i] = 0; fmodel[bb][i] = 0;
    end
    for (int bb = 0; bb < 2; bb++) for (int i = 0; i < PD; i++) pmem[bb][i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // feature write bursts
    for (int k = 0; k < 60; k++) begin
      b = int'($urandom % 2); len = 1 + int'($urandom % 32);
      w = int'($urandom % (FD - len + 1));
      d = new[len];
      foreach (d[i]) begin d[i] = $urandom; fmodel[b][w + i] = d[i]; end
      wburst(AW'((b << 10) | (w << 2)), len, 2'b01, d, 4'(k), r);
      expect_eq(r, RESP_OKAY, "write resp");
    end
    // FIXED burst writes the last beat to one word
    d = new[4];
    foreach (d[i]) d[i] = $urandom;
    fmodel[0][7] = d[3];
    wburst(AW'(7 << 2), 4, 2'b00, d, 4'd3, r);
    expect_eq(r, RESP_OKAY, "fixed resp");
    for (int bb = 0; bb < 2; bb++) for (int i = 0; i < FD; i++)
      expect_eq(fmem[bb][i], fmodel[bb][i], $sformatf("feature bank %0d word %0d", bb, i));
    // refusals on the write side
    d = new[2]; d[0] = 1; d[1] = 2;
    wburst(AW'((1 << R) | 8), 2, 2'b01, d, 4'd1, r);
    expect_eq(r, RESP_SLVERR, "write to prediction region");
    wburst(AW'(0), 2, 2'b10, d, 4'd1, r);
    expect_eq(r, RESP_SLVERR, "WRAP write");
    s_wstrb = 4'h1;
    wburst(AW'(16), 1, 2'b01, d, 4'd1, r);
    s_wstrb = 4'hF;
    expect_eq(r, RESP_SLVERR, "partial strobe");
    expect_eq(fmem[0][4], fmodel[0][4], "partial strobe wrote nothing");
    expect_eq(fmem[0][0], fmodel[0][0], "refused bursts wrote nothing");
    // prediction read bursts
    for (int k = 0; k < 60; k++) begin
      b = int'($urandom % 2); len = 1 + int'($urandom % 16);
      w = int'($urandom % (PD - len + 1));
      rburst(AW'((1 << R) | (b << 8) | (w << 2)), len, 2'b01, 4'(k), d, r);
      expect_eq(r, RESP_OKAY, "read resp");
      for (int i = 0; i < len; i++)
        expect_eq(d[i], pmem[b][w + i], $sformatf("prediction bank %0d word %0d", b, w + i));
    end
    rburst(AW'((1 << R) | (5 << 2)), 3, 2'b00, 4'd2, d, r);
    for (int i = 0; i < 3; i++) expect_eq(d[i], pmem[0][5], "fixed read");
    rburst(AW'(8), 2, 2'b01, 4'd2, d, r);
    expect_eq(r, RESP_SLVERR, "read of feature region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
