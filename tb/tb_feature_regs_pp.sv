// tb_feature_regs_pp: self-checking test of the ping-pong feature registers.
//
// Uses 16 features. Checks the reset value, then repeatedly fills the
// inactive bank one word per clock while the active bank is read, and
// checks that the outputs show exactly the active bank throughout and the
// new contents once rd_bank switches.
module tb_feature_regs_pp;
  import xgb_pkg::*;
  localparam int NF = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_bank = 1'b0, rd_bank = 1'b0;
  logic [3:0] wr_idx = '0;
  fp32_t wr_data = '0;
  fp32_t feats [NF];
  logic [31:0] model [2][NF];
  int checks = 0, failures = 0;

  feature_regs_pp #(.N_FEATURES(NF)) dut (.clk, .rst_n, .wr_en, .wr_bank, .wr_idx, .wr_data,
    .rd_bank, .feats);

  always #5 clk = ~clk;

  task automatic check_bank(input int b);
    for (int i = 0; i < NF; i++) begin
      checks++;
      if (feats[i] !== model[b][i]) begin
        failures++;
        if (failures < 10) $display("FAIL bank %0d feature %0d: %h expected %h", b, i,
                                    feats[i], model[b][i]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < NF; i++) model[b][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_bank(0);
    rd_bank = 1'b1; #1; check_bank(1);
    for (int r = 0; r < 40; r++) begin
      rd_bank = 1'(r % 2);
      for (int i = 0; i < NF; i++) begin
        wr_en = 1'b1; wr_bank = ~rd_bank; wr_idx = 4'(i); wr_data = $urandom;
        @(negedge clk);
        model[wr_bank][i] = wr_data;
        check_bank(rd_bank);
      end
      wr_en = 1'b0;
      rd_bank = ~rd_bank; #1;
      check_bank(rd_bank);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
