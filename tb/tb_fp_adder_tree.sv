// tb_fp_adder_tree: self-checking test of the pipelined leaf-value adder.
//
// Runs with 12 inputs (padded to 16, four levels). Random leaf sets are
// pushed one per clock, with gaps, and each output must carry the tag it
// entered with, arrive exactly LEVELS clocks later and equal the pairwise
// reference sum. A set with one non-zero value and a set summing to zero
// are also checked.
module tb_fp_adder_tree;
  import xgb_pkg::*;
  import tb_fp_pkg::*;
  import tb_model_pkg::*;

  localparam int N = 12, TW = 8, LEV = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [TW-1:0] in_tag = '0;
  fp32_t in_data [N];
  logic out_valid;
  logic [TW-1:0] out_tag;
  fp32_t out_data;
  int checks = 0, failures = 0;
  logic [31:0] exp_sum [256];
  int sent_cyc [256];
  int cyc = 0, n_out = 0, n_in = 0;

  fp_adder_tree #(.N_IN(N), .TAG_W(TW)) dut (.clk, .rst_n, .in_valid, .in_tag, .in_data,
    .out_valid, .out_tag, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    n_out++;
    if (out_data !== exp_sum[out_tag] || cyc - sent_cyc[out_tag] != LEV) begin
      failures++;
      if (failures < 10) $display("FAIL tag %0d: %h expected %h, latency %0d", out_tag,
                                  out_data, exp_sum[out_tag], cyc - sent_cyc[out_tag]);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(const ref logic [31:0] v[]);
    for (int i = 0; i < N; i++) in_data[i] = v[i];
    exp_sum[n_in] = sum_tree(v);
    in_valid = 1'b1;
    in_tag = TW'(n_in);
    sent_cyc[n_in] = cyc;
    n_in++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    logic [31:0] v[];
    v = new[N];
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < N; i++) v[i] = rand_fp(115, 130);
      push(v);
      if (k % 7 == 3) repeat (2) @(negedge clk);
    end
    for (int i = 0; i < N; i++) v[i] = '0;
    v[N-1] = 32'h3F800000;
    push(v);
    for (int i = 0; i < N; i++) v[i] = (i % 2) ? 32'hC0400000 : 32'h40400000;
    push(v);
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL %0d outputs for %0d inputs", n_out, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
