// tb_tree_node_mem: self-checking test of one tree's node memory.
//
// Fills all 256 words with random 64-bit patterns, reads them back in random
// order and checks the one-clock read latency, that rdata holds while re is
// low, and that a write and a read of different words in the same clock do
// not disturb each other.
module tb_tree_node_mem;
  import xgb_pkg::*;
  localparam int NN = 256;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  node_t wdata = '0, rdata;
  logic [63:0] model [NN];
  int checks = 0, failures = 0;

  tree_node_mem #(.N_NODES(NN)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    for (int i = 0; i < NN; i++) begin
      model[i] = {$urandom, $urandom};
      @(negedge clk); we = 1'b1; waddr = 8'(i); wdata = node_t'(model[i]);
    end
    @(negedge clk); we = 1'b0;
    for (int k = 0; k < 1000; k++) begin
      a = int'($urandom % NN);
      re = 1'b1; raddr = 8'(a);
      @(negedge clk);
      re = 1'b0;
      expect_eq(rdata, model[a], "read");
      raddr = 8'(a ^ 1);
      @(negedge clk);
      expect_eq(rdata, model[a], "hold");
    end
    // simultaneous write and read of different words
    for (int k = 0; k < 200; k++) begin
      a = int'($urandom % NN);
      b = (a + 1 + int'($urandom % (NN - 1))) % NN;
      model[b] = {$urandom, $urandom};
      we = 1'b1; waddr = 8'(b); wdata = node_t'(model[b]);
      re = 1'b1; raddr = 8'(a);
      @(negedge clk);
      we = 1'b0; re = 1'b0;
      expect_eq(rdata, model[a], "read during write");
      re = 1'b1; raddr = 8'(b);
      @(negedge clk);
      re = 1'b0;
      expect_eq(rdata, model[b], "written word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
