// tb_pingpong_ram: self-checking test of the two-bank memory.
//
// Uses 64 words per bank. Writes both banks with different data, then
// streams one bank out while the other is being rewritten (the ping-pong
// use), checking the one-clock read latency and that the banks are
// independent.
module tb_pingpong_ram;
  localparam int D = 64;
  logic clk = 1'b0;
  logic wr_en = 1'b0, wr_bank = 1'b0, rd_en = 1'b0, rd_bank = 1'b0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] model [2][D];
  int checks = 0, failures = 0;

  pingpong_ram #(.WIDTH(32), .DEPTH(D)) dut (.clk, .wr_en, .wr_bank, .wr_addr, .wr_data,
    .rd_en, .rd_bank, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] nv;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < D; i++) begin
        model[b][i] = $urandom;
        @(negedge clk); wr_en = 1'b1; wr_bank = 1'(b); wr_addr = 6'(i); wr_data = model[b][i];
      end
    @(negedge clk); wr_en = 1'b0;
    for (int r = 0; r < 8; r++) begin
      // read bank r%2 while rewriting the other bank
      for (int i = 0; i < D; i++) begin
        nv = $urandom;
        rd_en = 1'b1; rd_bank = 1'(r % 2); rd_addr = 6'(i);
        wr_en = 1'b1; wr_bank = 1'(~r % 2); wr_addr = 6'(D - 1 - i); wr_data = nv;
        @(negedge clk);
        model[~r % 2][D - 1 - i] = nv;
        checks++;
        if (rd_data !== model[r % 2][i]) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d word %0d: %h expected %h", r % 2, i,
                                      rd_data, model[r % 2][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
