// axil_ctrl: AXI4-Lite slave for control and model loading.
//
// The low-bandwidth traffic of the accelerator goes over AXI4-Lite (32-bit
// data): the burst registers and the tree node words. Address map (bytes):
//   bit NODE_BIT = 0 : control registers
//     0x00 CTRL    W  bit0 = start a burst (ignored while busy), bit1 = bank
//     0x04 STATUS  R  bit0 busy, bit1 done (cleared by start), bit2 err
//     0x08 NFEAT   RW features per inference, 1..N_FEATURES
//     0x0C NINFER  RW inferences per burst, 0..PMEM_DEPTH
//     0x10 NTREES  R  number of parallel trees
//     0x14 CYCLES  R  clocks taken by the last burst
//   bit NODE_BIT = 1 : node memories, write only. Byte offset
//     (tree*N_NODES + node)*8 + 0 holds node bits [31:0] and is only latched;
//     offset +4 holds bits [63:32] and writes the whole 64-bit node.
// A write with a partial strobe, a write of an out-of-range NFEAT or NINFER, a read of the node region and
// a write to a read-only register answer SLVERR and change nothing; other
// unmapped control addresses read 0. Write address and data are taken
// together (awready = wready, both high only when both valid arrive), the
// response follows one clock later; a read answers one clock after arvalid.
// One transaction of each kind is in flight at a time. Loading nodes and
// controlling the core over AXI-Lite follows the document; the register map
// and the two-word node write are this design's choices.
module axil_ctrl
  import xgb_pkg::*;
#(
  parameter int unsigned N_TREES    = 512,
  parameter int unsigned N_NODES    = 256,
  parameter int unsigned N_FEATURES = 256,
  parameter int unsigned PMEM_DEPTH = 1024,
  localparam int unsigned TW       = (N_TREES > 1) ? $clog2(N_TREES) : 1,
  localparam int unsigned NAW      = (N_NODES > 1) ? $clog2(N_NODES) : 1,
  localparam int unsigned NFW      = $clog2(N_FEATURES + 1),
  localparam int unsigned NIW      = $clog2(PMEM_DEPTH + 1),
  localparam int unsigned NODE_BIT = TW + NAW + 3,
  localparam int unsigned ADDR_W   = NODE_BIT + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // to the core
  output logic              start,
  output logic              bank,
  output logic [NFW-1:0]    n_feat,
  output logic [NIW-1:0]    n_infer,
  input  logic              busy,
  input  logic              done,
  input  logic              err,
  input  logic [31:0]       cycles,
  output logic              node_we,
  output logic [TW-1:0]     node_tree,
  output logic [NAW-1:0]    node_addr,
  output node_t             node_wdata
);
  logic        wr_fire, rd_fire;
  logic [31:0] node_lo;
  logic [7:0]  woff, roff;

  assign wr_fire   = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_fire;
  assign s_wready  = wr_fire;
  assign rd_fire   = s_arvalid && !s_rvalid;
  assign s_arready = rd_fire;
  assign woff      = s_awaddr[7:0];
  assign roff      = s_araddr[7:0];

  // write channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid   <= 1'b0;
      s_bresp    <= RESP_OKAY;
      start      <= 1'b0;
      bank       <= 1'b0;
      n_feat     <= NFW'(1);
      n_infer    <= '0;
      node_lo    <= '0;
      node_we    <= 1'b0;
      node_tree  <= '0;
      node_addr  <= '0;
      node_wdata <= '0;
    end else begin
      start   <= 1'b0;
      node_we <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        s_bresp  <= RESP_OKAY;
        if (s_wstrb != 4'hF) begin
          s_bresp <= RESP_SLVERR;          // partial-word writes are refused
        end else if (s_awaddr[NODE_BIT]) begin
          if (!s_awaddr[2]) begin
            node_lo <= s_wdata;
          end else begin
            node_we    <= 1'b1;
            node_tree  <= s_awaddr[NAW+3 +: TW];
            node_addr  <= s_awaddr[3 +: NAW];
            node_wdata <= node_t'({s_wdata, node_lo});
          end
        end else begin
          unique case (woff)
            REG_CTRL: begin
              bank <= s_wdata[1];
              if (s_wdata[0] && !busy) start <= 1'b1;
            end
            REG_NFEAT:
              if (s_wdata != 0 && s_wdata <= N_FEATURES) n_feat <= NFW'(s_wdata);
              else s_bresp <= RESP_SLVERR;
            REG_NINFER:
              if (s_wdata <= PMEM_DEPTH) n_infer <= NIW'(s_wdata);
              else s_bresp <= RESP_SLVERR;
            default: s_bresp <= RESP_SLVERR;
          endcase
        end
      end
    end
  end

  // read channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rresp  <= RESP_OKAY;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_fire) begin
        s_rvalid <= 1'b1;
        s_rresp  <= RESP_OKAY;
        s_rdata  <= '0;
        if (s_araddr[NODE_BIT]) begin
          s_rresp <= RESP_SLVERR;
        end else begin
          case (roff)
            REG_CTRL:   s_rdata <= {30'd0, bank, 1'b0};
            REG_STATUS: s_rdata <= {29'd0, err, done, busy};
            REG_NFEAT:  s_rdata <= 32'(n_feat);
            REG_NINFER: s_rdata <= 32'(n_infer);
            REG_NTREES: s_rdata <= 32'(N_TREES);
            REG_CYCLES: s_rdata <= cycles;
            default:    s_rdata <= '0;
          endcase
        end
      end
    end
  end

  // AXI rule: a response, once valid, holds until accepted
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid && $stable(s_bresp));
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
