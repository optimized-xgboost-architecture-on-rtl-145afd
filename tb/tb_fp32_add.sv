// tb_fp32_add: self-checking test of the fp32 adder.
//
// Directed cases (exact sums, cancellation to +0, rounding ties to even,
// carry-out on rounding, overflow to infinity, infinities and NaN) and
// random operands of both signs whose exponents differ by up to 40 are
// compared bit for bit with the double-precision reference of tb_fp_pkg.
module tb_fp32_add;
  import tb_fp_pkg::*;
  logic clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] x, input logic [31:0] z, input logic [31:0] exp_y);
    a = x; b = z;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z;
    int ex, ez;
    // directed
    check(32'h3F800000, 32'h3F800000, 32'h40000000);   // 1 + 1 = 2
    check(32'h3FC00000, 32'h40000000, 32'h40600000);   // 1.5 + 2 = 3.5
    check(32'h3F800000, 32'hBF800000, 32'h00000000);   // 1 - 1 = +0
    check(32'h40400000, 32'hC0000000, 32'h3F800000);   // 3 - 2 = 1
    check(32'h3F800000, 32'h33800000, 32'h3F800000);   // 1 + 2^-24: tie, stays even
    check(32'h3F800001, 32'h33800000, 32'h3F800002);   // tie, rounds up to even
    check(32'h3F7FFFFF, 32'h33800000, 32'h3F800000);   // rounding carries out
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 32'h7F800000);   // overflow to +inf
    check(32'h7F800000, 32'h3F800000, 32'h7F800000);   // inf + 1
    check(32'h7F800000, 32'hFF800000, 32'h7FC00000);   // inf - inf = NaN
    check(32'h7FC00001, 32'h3F800000, 32'h7FC00000);   // NaN in
    check(32'h00000000, 32'hBF000000, 32'hBF000000);   // 0 + -0.5
    check(32'h80000000, 32'h80000000, 32'h80000000);   // -0 + -0 = -0
    check(32'h00400000, 32'h3F800000, 32'h3F800000);   // subnormal reads as 0
    check(32'h3F800000, 32'hBF7FFFFF, 32'h33800000);   // massive cancellation
    // random: same binade range, sign mixed
    for (int i = 0; i < 20000; i++) begin
      ex = 100 + int'($urandom % 50);
      ez = ex - 20 + int'($urandom % 41);
      x = rand_fp(ex, ex);
      z = rand_fp(ez, ez);
      check(x, z, ref_add(x, z));
    end
    // random: close magnitudes of opposite sign (cancellation)
    for (int i = 0; i < 5000; i++) begin
      x = rand_fp(120, 130);
      z = x ^ 32'h8000_0000;
      z[7:0] = 8'($urandom);
      check(x, z, ref_add(x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
