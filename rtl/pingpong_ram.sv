// pingpong_ram: two-bank ("ping-pong") memory.
//
// Used twice in the accelerator: as the feature memory, written by the host
// through the AXI4 port and read by the burst controller, and as the
// prediction memory, written by the controller and read by the host. The
// bank bit is the top address bit of each port, so the host can fill (or
// drain) one bank while the core works on the other; which bank the core uses
// is chosen per burst. Each bank holds DEPTH words of WIDTH bits. Write and
// read ports are independent; the read is synchronous (data one clock after
// rd_en, held while rd_en is low). Contents are not reset. Two banks follow
// the document; the depth is this design's choice.
module pingpong_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic             wr_bank,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic             rd_bank,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_addr}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_bank, rd_addr}];
  end
endmodule
