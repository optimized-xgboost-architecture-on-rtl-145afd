// tb_forest_ctrl: self-checking test of the burst controller.
//
// The controller is surrounded by simple models: a feature memory with a
// one-clock read, the two feature-register banks, a tree array that reports
// done a random number of clocks after start, and an adder tree with a
// three-clock latency. When the trees start, the model checks that the bank
// they use holds exactly the feature vector of the inference whose tag then
// enters the adder; every tag must be written back once, done must rise
// once all are written, and a burst of zero inferences must finish at once.
// Bursts with few and many features per inference make both the trees wait
// for a fill and a fill wait for the trees; both must be seen.
module tb_forest_ctrl;
  localparam int NF = 16, FD = 256, PD = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, bank = 1'b0;
  logic [4:0] n_feat = 5'd1;
  logic [6:0] n_infer = '0;
  logic busy, done, mem_bank;
  logic [31:0] cycles;
  logic fmem_re;
  logic [7:0] fmem_raddr;
  logic freg_we, freg_bank;
  logic [3:0] freg_idx;
  logic tree_start, tree_bank, trees_done;
  logic sum_valid, res_valid;
  logic [5:0] sum_tag, res_tag;
  logic pmem_we;
  logic [5:0] pmem_waddr;

  logic [31:0] fmem [2][FD];
  logic [31:0] fmem_q;
  logic [31:0] regs [2][NF];
  int tree_cnt = 0;
  logic [31:0] snap_sum;
  logic [2:0] sv_pipe;
  logic [5:0] tag_pipe [3];
  int wr_count [PD];
  int checks = 0, failures = 0;
  int tree_wait = 0, fill_wait = 0;
  int cur_nf = 1, max_lat = 3;
  // testbench view of the register banks and the trees, used to count stalls
  logic full_m [2];
  logic running_m, run_bank_m;
  int loaded_m, started_m;

  forest_ctrl #(.N_FEATURES(NF), .FMEM_DEPTH(FD), .PMEM_DEPTH(PD)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endtask

  function automatic logic [31:0] vec_sum(input int b, input int nf);
    logic [31:0] s = 0;
    for (int i = 0; i < nf; i++) s = s + regs[b][i] * 32'(i + 1);
    return s;
  endfunction
  function automatic logic [31:0] mem_sum(input int mb, input int inf, input int nf);
    logic [31:0] s = 0;
    for (int i = 0; i < nf; i++) s = s + fmem[mb][inf * nf + i] * 32'(i + 1);
    return s;
  endfunction

  // models
  always_ff @(posedge clk) begin
    if (fmem_re) fmem_q <= fmem[mem_bank][fmem_raddr];
    if (freg_we) regs[freg_bank][freg_idx] <= fmem_q;
  end
  always_ff @(posedge clk) begin
    if (tree_start) begin
      tree_cnt <= 1 + int'($urandom % max_lat);
      snap_sum <= vec_sum(int'(tree_bank), cur_nf);
    end else if (tree_cnt > 0) tree_cnt <= tree_cnt - 1;
  end
  assign trees_done = (tree_cnt == 0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sv_pipe <= '0;
    else        sv_pipe <= {sv_pipe[1:0], sum_valid};
  end
  always_ff @(posedge clk) begin
    tag_pipe[0] <= sum_tag; tag_pipe[1] <= tag_pipe[0]; tag_pipe[2] <= tag_pipe[1];
  end
  assign res_valid = sv_pipe[2];
  assign res_tag = tag_pipe[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_m[0] <= 1'b0; full_m[1] <= 1'b0; running_m <= 1'b0; run_bank_m <= 1'b0;
      loaded_m <= 0; started_m <= 0;
    end else begin
      if (start) begin loaded_m <= 0; started_m <= 0; end
      if (freg_we && int'(freg_idx) == cur_nf - 1) begin
        full_m[freg_bank] <= 1'b1;
        loaded_m <= (start ? 0 : loaded_m) + 1;
      end
      if (tree_start) begin
        running_m <= 1'b1; run_bank_m <= tree_bank;
        started_m <= (start ? 0 : started_m) + 1;
      end else if (sum_valid) begin
        running_m <= 1'b0; full_m[run_bank_m] <= 1'b0;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (sum_valid) begin
      checks++;
      if (snap_sum !== mem_sum(int'(mem_bank), int'(sum_tag), cur_nf))
        fail($sformatf("inference %0d traversed wrong features", sum_tag));
    end
    if (pmem_we) wr_count[pmem_waddr]++;
    if (busy && !running_m && !tree_start && started_m < int'(n_infer) && !full_m[0] && !full_m[1])
      tree_wait++;
    if (busy && loaded_m < int'(n_infer) && full_m[0] && full_m[1]) fill_wait++;
  end

  task automatic burst(input int nf, input int ni, input int b, input int lat);
    int t;
    cur_nf = nf; max_lat = lat;
    for (int i = 0; i < PD; i++) wr_count[i] = 0;
    for (int i = 0; i < FD; i++) fmem[b][i] = $urandom;
    @(negedge clk);
    n_feat = 5'(nf); n_infer = 7'(ni); bank = 1'(b); start = 1'b1;
    @(negedge clk); start = 1'b0;
    t = 0;
    while (!done && t < 100000) begin @(negedge clk); t++; end
    checks++;
    if (!done || busy) fail("burst did not finish");
    for (int i = 0; i < PD; i++) begin
      checks++;
      if (wr_count[i] != ((i < ni) ? 1 : 0)) fail($sformatf("tag %0d written %0d times", i, wr_count[i]));
    end
    checks++;
    if (cycles != t) fail($sformatf("cycle count %0d, measured %0d", cycles, t));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    burst(16, 16, 0, 3);     // fill slower than trees: trees wait
    burst(2, 64, 1, 20);     // trees slower than fill: fill waits
    burst(1, 1, 0, 1);
    burst(5, 40, 1, 8);
    burst(16, 10, 1, 16);
    // zero-length burst
    @(negedge clk); n_infer = '0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    checks++;
    if (!done || busy) fail("empty burst");
    checks++;
    if (tree_wait == 0 || fill_wait == 0)
      fail($sformatf("mechanisms not seen: tree_wait=%0d fill_wait=%0d", tree_wait, fill_wait));
    $display("tree waits for fill: %0d clocks, fill waits for trees: %0d clocks", tree_wait, fill_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
