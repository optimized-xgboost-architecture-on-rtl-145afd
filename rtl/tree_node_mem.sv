// tree_node_mem: the dedicated node memory of one decision tree.
//
// Every tree of the forest owns one of these so that all trees can fetch a
// node in the same cycle. It holds N_NODES 64-bit node words (xgb_pkg::node_t)
// in pre-order depth-first order, node 0 being the root. It is a simple
// dual-port RAM: one write port, used by the host to load the model, and one
// read port, used by the tree engine. The read is synchronous: the word at
// raddr appears on rdata one clock after re is high, and rdata holds while re
// is low (block-RAM behaviour). The RAM contents are not reset.
// 256 nodes of 64 bits per tree follow the document; the port arrangement is
// this design's choice.
module tree_node_mem
  import xgb_pkg::*;
#(
  parameter int unsigned N_NODES = 256,
  localparam int unsigned AW     = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  node_t         wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output node_t         rdata
);
  node_t mem [N_NODES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
