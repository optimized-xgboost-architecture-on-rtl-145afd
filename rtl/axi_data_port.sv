// axi_data_port: AXI4 (full) slave for the bulk data of the accelerator.
//
// Feature vectors are written, and predictions read, in bursts over AXI4
// with 32-bit data, one fp32 number per beat. Address map (bytes), with
// R = ADDR_W-1 the region bit:
//   bit R = 0 : feature memory, write only; bit R-1 (= FAW+2) selects the
//               bank, bits [FAW+1:2] the word.
//   bit R = 1 : prediction memory, read only; bit PAW+2 selects the bank,
//               bits [PAW+1:2] the word.
// INCR and FIXED bursts of up to 256 beats are served; a WRAP burst, a
// partial write strobe, a write to the prediction region or a read of the
// feature region is answered SLVERR (and writes nothing / returns 0). Writes
// stream one beat per clock; reads take two clocks per beat because the
// prediction memory is read synchronously, one word at a time. One write
// and one read burst can be in progress at the same time, each in its own
// state machine; IDs are returned unchanged. The split of traffic between
// AXI4 and AXI4-Lite follows the document; the address map, the single
// outstanding burst per direction and the refusals are this design's
// choices.
module axi_data_port
  import xgb_pkg::*;
#(
  parameter int unsigned FMEM_DEPTH = 4096,
  parameter int unsigned PMEM_DEPTH = 1024,
  parameter int unsigned ID_W       = 4,
  localparam int unsigned FAW    = (FMEM_DEPTH > 1) ? $clog2(FMEM_DEPTH) : 1,
  localparam int unsigned PAW    = (PMEM_DEPTH > 1) ? $clog2(PMEM_DEPTH) : 1,
  localparam int unsigned ADDR_W = ((FAW > PAW) ? FAW : PAW) + 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // write address
  input  logic [ID_W-1:0]   s_awid,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic [7:0]        s_awlen,
  input  logic [2:0]        s_awsize,
  input  logic [1:0]        s_awburst,
  input  logic              s_awvalid,
  output logic              s_awready,
  // write data
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wlast,
  input  logic              s_wvalid,
  output logic              s_wready,
  // write response
  output logic [ID_W-1:0]   s_bid,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  // read address
  input  logic [ID_W-1:0]   s_arid,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic [7:0]        s_arlen,
  input  logic [2:0]        s_arsize,
  input  logic [1:0]        s_arburst,
  input  logic              s_arvalid,
  output logic              s_arready,
  // read data
  output logic [ID_W-1:0]   s_rid,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rlast,
  output logic              s_rvalid,
  input  logic              s_rready,
  // feature memory write port
  output logic              fmem_we,
  output logic              fmem_wbank,
  output logic [FAW-1:0]    fmem_waddr,
  output fp32_t             fmem_wdata,
  // prediction memory read port (data one clock after pmem_re)
  output logic              pmem_re,
  output logic              pmem_rbank,
  output logic [PAW-1:0]    pmem_raddr,
  input  fp32_t             pmem_rdata
);
  localparam int unsigned R = ADDR_W - 1;
  localparam logic [1:0] BURST_FIXED = 2'b00, BURST_INCR = 2'b01;

  // ---------------- write side ----------------
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  wstate_e         wstate;
  logic [R-1:0]    waddr;       // byte address within the region
  logic            wregion, wfixed, wbad;

  assign s_awready = (wstate == W_IDLE);
  assign s_wready  = (wstate == W_DATA);
  assign s_bvalid  = (wstate == W_RESP);
  assign s_bresp   = wbad ? RESP_SLVERR : RESP_OKAY;

  always_comb begin
    fmem_we    = (wstate == W_DATA) && s_wvalid && !wregion && !wbad && (s_wstrb == 4'hF);
    fmem_wbank = waddr[FAW+2];
    fmem_waddr = waddr[FAW+1:2];
    fmem_wdata = s_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate  <= W_IDLE;
      waddr   <= '0;
      wregion <= 1'b0;
      wfixed  <= 1'b0;
      wbad    <= 1'b0;
      s_bid   <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (s_awvalid) begin
          wstate  <= W_DATA;
          waddr   <= s_awaddr[R-1:0];
          wregion <= s_awaddr[R];
          wfixed  <= (s_awburst == BURST_FIXED);
          wbad    <= s_awaddr[R] || !(s_awburst == BURST_FIXED || s_awburst == BURST_INCR);
          s_bid   <= s_awid;
        end
        W_DATA: if (s_wvalid) begin
          if (s_wstrb != 4'hF) wbad <= 1'b1;
          if (!wfixed) waddr <= waddr + R'(4);
          if (s_wlast) wstate <= W_RESP;
        end
        W_RESP: if (s_bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_REQ, R_DATA} rstate_e;
  rstate_e         rstate;
  logic [R-1:0]    raddr;
  logic [7:0]      rlen, rbeat;
  logic            rfixed, rbad;

  assign s_arready  = (rstate == R_IDLE);
  assign s_rvalid   = (rstate == R_DATA);
  assign s_rlast    = (rbeat == rlen);
  assign s_rresp    = rbad ? RESP_SLVERR : RESP_OKAY;
  assign s_rdata    = rbad ? 32'd0 : pmem_rdata;
  assign pmem_re    = (rstate == R_REQ) && !rbad;
  assign pmem_rbank = raddr[PAW+2];
  assign pmem_raddr = raddr[PAW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_IDLE;
      raddr  <= '0;
      rlen   <= '0;
      rbeat  <= '0;
      rfixed <= 1'b0;
      rbad   <= 1'b0;
      s_rid  <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (s_arvalid) begin
          rstate <= R_REQ;
          raddr  <= s_araddr[R-1:0];
          rlen   <= s_arlen;
          rbeat  <= '0;
          rfixed <= (s_arburst == BURST_FIXED);
          rbad   <= !s_araddr[R] || !(s_arburst == BURST_FIXED || s_arburst == BURST_INCR);
          s_rid  <= s_arid;
        end
        R_REQ: rstate <= R_DATA;
        R_DATA: if (s_rready) begin
          if (s_rlast) begin
            rstate <= R_IDLE;
          end else begin
            rstate <= R_REQ;
            rbeat  <= rbeat + 8'd1;
            if (!rfixed) raddr <= raddr + R'(4);
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // AXI rules on the slave's outputs
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid && $stable(s_bid));
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata) && $stable(s_rlast));
endmodule
