// xgb_accel_top: XGBoost (gradient-boosted tree ensemble) inference
// accelerator, as it sits behind a PCIe-to-AXI bridge.
//
// A host loads a trained model (one 64-bit word per tree node, N_NODES nodes
// per tree, N_TREES trees) through the AXI4-Lite port, writes a burst of
// feature vectors into the ping-pong feature memory through the AXI4 port,
// starts the burst with one register write, waits for STATUS.done and reads
// the predictions back through the AXI4 port. All trees traverse the same
// feature vector at the same time; the prediction is the fp32 sum of their
// leaf values. See axil_ctrl and axi_data_port for the two address maps and
// tree_forest for the core and its timing.
//
// The PCIe endpoint, the PCIe/AXI bridge and the DMA engine are not part of
// this RTL: both AXI slave ports are brought out for them. The clock is a
// single domain (125 MHz in the reference implementation), reset is
// asynchronous and active low. The structure (per-tree node memories,
// ping-pong feature memory and registers, AXI-Lite for the model and control,
// AXI4 for features and predictions) follows the document; widths, depths
// and the address maps are this design's choices.
module xgb_accel_top
  import xgb_pkg::*;
#(
  parameter int unsigned N_TREES    = 512,
  parameter int unsigned N_NODES    = 256,
  parameter int unsigned N_FEATURES = 256,
  parameter int unsigned FMEM_DEPTH = 4096,
  parameter int unsigned PMEM_DEPTH = 1024,
  parameter int unsigned ID_W       = 4,
  localparam int unsigned TW       = (N_TREES > 1) ? $clog2(N_TREES) : 1,
  localparam int unsigned NAW      = (N_NODES > 1) ? $clog2(N_NODES) : 1,
  localparam int unsigned FAW      = (FMEM_DEPTH > 1) ? $clog2(FMEM_DEPTH) : 1,
  localparam int unsigned PAW      = (PMEM_DEPTH > 1) ? $clog2(PMEM_DEPTH) : 1,
  localparam int unsigned AXIL_AW  = TW + NAW + 4,
  localparam int unsigned AXI_AW   = ((FAW > PAW) ? FAW : PAW) + 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave: control registers and model loading
  input  logic [AXIL_AW-1:0] s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [31:0]        s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [AXIL_AW-1:0] s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [31:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // AXI4 slave: feature vectors in, predictions out
  input  logic [ID_W-1:0]    s_axi_awid,
  input  logic [AXI_AW-1:0]  s_axi_awaddr,
  input  logic [7:0]         s_axi_awlen,
  input  logic [2:0]         s_axi_awsize,
  input  logic [1:0]         s_axi_awburst,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wlast,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [ID_W-1:0]    s_axi_bid,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [ID_W-1:0]    s_axi_arid,
  input  logic [AXI_AW-1:0]  s_axi_araddr,
  input  logic [7:0]         s_axi_arlen,
  input  logic [2:0]         s_axi_arsize,
  input  logic [1:0]         s_axi_arburst,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [ID_W-1:0]    s_axi_rid,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rlast,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  // burst finished (level, same as STATUS.done), for an interrupt line
  output logic               done
);
  localparam int unsigned NFW = $clog2(N_FEATURES + 1);
  localparam int unsigned NIW = $clog2(PMEM_DEPTH + 1);

  logic           start, bank, busy, err;
  logic [NFW-1:0] n_feat;
  logic [NIW-1:0] n_infer;
  logic [31:0]    cycles;
  logic           node_we;
  logic [TW-1:0]  node_tree;
  logic [NAW-1:0] node_addr;
  node_t          node_wdata;
  logic           fmem_we, fmem_wbank;
  logic [FAW-1:0] fmem_waddr;
  fp32_t          fmem_wdata;
  logic           pmem_re, pmem_rbank;
  logic [PAW-1:0] pmem_raddr;
  fp32_t          pmem_rdata;

  axil_ctrl #(
    .N_TREES(N_TREES), .N_NODES(N_NODES), .N_FEATURES(N_FEATURES), .PMEM_DEPTH(PMEM_DEPTH)
  ) u_axil (
    .clk, .rst_n,
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready), .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp),
    .s_rvalid(s_axil_rvalid), .s_rready(s_axil_rready),
    .start, .bank, .n_feat, .n_infer, .busy, .done, .err, .cycles,
    .node_we, .node_tree, .node_addr, .node_wdata
  );

  axi_data_port #(
    .FMEM_DEPTH(FMEM_DEPTH), .PMEM_DEPTH(PMEM_DEPTH), .ID_W(ID_W)
  ) u_axi (
    .clk, .rst_n,
    .s_awid(s_axi_awid), .s_awaddr(s_axi_awaddr), .s_awlen(s_axi_awlen),
    .s_awsize(s_axi_awsize), .s_awburst(s_axi_awburst), .s_awvalid(s_axi_awvalid),
    .s_awready(s_axi_awready), .s_wdata(s_axi_wdata), .s_wstrb(s_axi_wstrb),
    .s_wlast(s_axi_wlast), .s_wvalid(s_axi_wvalid), .s_wready(s_axi_wready),
    .s_bid(s_axi_bid), .s_bresp(s_axi_bresp), .s_bvalid(s_axi_bvalid),
    .s_bready(s_axi_bready), .s_arid(s_axi_arid), .s_araddr(s_axi_araddr),
    .s_arlen(s_axi_arlen), .s_arsize(s_axi_arsize), .s_arburst(s_axi_arburst),
    .s_arvalid(s_axi_arvalid), .s_arready(s_axi_arready), .s_rid(s_axi_rid),
    .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp), .s_rlast(s_axi_rlast),
    .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
    .fmem_we, .fmem_wbank, .fmem_waddr, .fmem_wdata,
    .pmem_re, .pmem_rbank, .pmem_raddr, .pmem_rdata
  );

  tree_forest #(
    .N_TREES(N_TREES), .N_NODES(N_NODES), .N_FEATURES(N_FEATURES),
    .FMEM_DEPTH(FMEM_DEPTH), .PMEM_DEPTH(PMEM_DEPTH)
  ) u_forest (
    .clk, .rst_n,
    .node_we, .node_tree, .node_addr, .node_wdata,
    .fmem_we, .fmem_wbank, .fmem_waddr, .fmem_wdata,
    .pmem_re, .pmem_rbank, .pmem_raddr, .pmem_rdata,
    .start, .bank, .n_feat, .n_infer, .busy, .done, .err, .cycles
  );
endmodule
