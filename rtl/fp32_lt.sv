// fp32_lt: combinational IEEE-754 single-precision "a < b" comparator.
//
// This is the test made at every decision node: the selected feature is
// compared with the node threshold and the left child is taken when the
// feature is strictly smaller. Numbers are compared in sign-magnitude order,
// so no subtraction is needed: for two non-negative numbers the bit patterns
// order like unsigned integers, for two negative numbers the order reverses.
// +0 and -0 compare equal, and any comparison with a NaN is false (so a NaN
// feature, for example a missing value, goes to the right child). Subnormal
// numbers are compared exactly. Purely combinational, no clock.
module fp32_lt
  import xgb_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output logic  lt
);
  logic a_nan, b_nan, both_zero;
  logic [30:0] ma, mb;

  always_comb begin
    ma        = a[30:0];
    mb        = b[30:0];
    a_nan     = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan     = (b[30:23] == 8'hFF) && (b[22:0] != '0);
    both_zero = (ma == '0) && (mb == '0);
    if (a_nan || b_nan || both_zero)
      lt = 1'b0;
    else if (a[31] != b[31])
      lt = a[31];                 // negative < positive
    else if (!a[31])
      lt = (ma < mb);             // both positive
    else
      lt = (ma > mb);             // both negative
  end
endmodule
