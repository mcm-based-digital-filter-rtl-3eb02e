// mcm_hcub_23_81: multiplier-less multiple constant multiplication of one
// signed input by the constants 23 and 81.
//
// The adder graph is the one found by the cumulative-benefit heuristic
// (HCUB) for the set {23, 81}: both products are built from one shared
// intermediate fundamental, 9x, so the block needs 3 add/sub operations and
// 3 hard-wired shifts instead of the 4 and 4 of a graph without sharing:
//     9x  = (x  << 3) + x
//     81x = (9x << 3) + 9x
//     23x = (x  << 5) - 9x
// Shifts cost no logic; only the three adders are real hardware.
//
// Interface: x is a signed XW-bit sample; p23 and p81 are the exact signed
// products, XW+5 and XW+7 bits wide. Timing: purely combinational, adder
// depth 2 (9x, then 23x and 81x in parallel). The use of 9x as the shared
// term follows the HCUB example; signed arithmetic and full-precision
// outputs are this design's choice.
module mcm_hcub_23_81 #(
  parameter int unsigned XW = 16
) (
  input  logic signed [XW-1:0]   x,
  output logic signed [XW+4:0]   p23,
  output logic signed [XW+6:0]   p81
);
  logic signed [XW+3:0] f9;   // 9x, |9x| < 2^(XW+3)

  always_comb begin
    f9  = (XW+4)'(x) + ((XW+4)'(x) <<< 3);
    p81 = (XW+7)'(f9) + ((XW+7)'(f9) <<< 3);
    p23 = ((XW+5)'(x) <<< 5) - (XW+5)'(f9);
  end
endmodule
