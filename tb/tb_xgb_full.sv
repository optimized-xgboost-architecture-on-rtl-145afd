// tb_xgb_full: end-to-end test of the accelerator with every parameter at
// its default (512 trees of 256 nodes, 256 features, 4096-word feature
// banks, 1024-word prediction banks). The four workloads use the test-set
// sizes of the evaluated datasets (20 % of 768, 303, 3000 and 500 records:
// 154, 61, 600 and 100 vectors of 8, 13, 15 and 6 features); see
// tb_xgb_harness for what is run and checked.
module tb_xgb_full;
  tb_xgb_harness #(.FULL(1'b1), .NT(512), .NN(256), .NF(256), .FD(4096), .PD(1024),
                   .MAXN(256), .NI0(154), .NI1(61), .NI2(600), .NI3(100),
                   .WATCHDOG(20000000)) u_h ();
endmodule
