// tb_fp32_lt: self-checking test of the fp32 "<" comparator.
//
// Signed zeros, NaNs, infinities and random pairs (including equal values
// and pairs of opposite sign) are compared against the ordering of the
// double-precision values of the operands.
module tb_fp32_lt;
  import tb_fp_pkg::*;
  logic clk = 1'b0;
  logic [31:0] a, b;
  logic lt;
  int checks = 0, failures = 0;

  fp32_lt dut (.a(a), .b(b), .lt(lt));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] x, input logic [31:0] z, input logic exp_lt);
    a = x; b = z;
    #1;
    checks++;
    if (lt !== exp_lt) begin
      failures++;
      if (failures < 10) $display("FAIL %h < %h gave %b", x, z, lt);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z;
    check(32'h00000000, 32'h80000000, 1'b0);  // +0 < -0
    check(32'h80000000, 32'h00000000, 1'b0);  // -0 < +0
    check(32'hBF800000, 32'h3F800000, 1'b1);  // -1 < 1
    check(32'h3F800000, 32'hBF800000, 1'b0);
    check(32'hC0000000, 32'hBF800000, 1'b1);  // -2 < -1
    check(32'hBF800000, 32'hC0000000, 1'b0);
    check(32'h3F800000, 32'h3F800000, 1'b0);  // equal
    check(32'h7FC00000, 32'h3F800000, 1'b0);  // NaN
    check(32'h3F800000, 32'h7FC00000, 1'b0);
    check(32'h3F800000, 32'h7F800000, 1'b1);  // 1 < inf
    check(32'hFF800000, 32'hBF800000, 1'b1);  // -inf < -1
    for (int i = 0; i < 20000; i++) begin
      x = rand_fp(1, 254);
      case (i % 4)
        0: z = rand_fp(1, 254);
        1: z = x;
        2: z = x ^ 32'h8000_0000;
        default: begin z = x; z[3:0] = 4'($urandom); end
      endcase
      check(x, z, fp2real(x) < fp2real(z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
