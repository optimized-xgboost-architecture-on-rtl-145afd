// tb_xgb_accel_top: end-to-end test of the accelerator at reduced size
// (16 trees, 256 features, 512-word feature banks, 64-word prediction banks);
// see tb_xgb_harness for what is run and checked.
module tb_xgb_accel_top;
  tb_xgb_harness #(.FULL(1'b0), .NT(16), .NN(256), .NF(256), .FD(512), .PD(64), .MAXN(64),
                   .NI0(40), .NI1(20), .NI2(70), .NI3(30)) u_h ();
endmodule
