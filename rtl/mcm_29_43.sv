// mcm_29_43: shift-add multiple constant multiplication of one signed input
// by the constants 29 and 43.
//
// Both constants are written from two shared partial products, 3x and 5x,
// so the block takes 4 adders and no multiplier:
//     3x  = (x  << 1) + x
//     5x  = (x  << 2) + x
//     29x = (3x << 3) + 5x
//     43x = (5x << 3) + 3x
// This is the textbook illustration of partial-product sharing in an MCM
// block; it stands beside the filter as a worked example.
//
// Interface: x is a signed XW-bit sample; p29 and p43 are the exact signed
// products, XW+5 and XW+6 bits wide. Timing: combinational, adder depth 2.
// The sharing graph is the usual one for this example; signed arithmetic
// and output widths are this design's choice.
module mcm_29_43 #(
  parameter int unsigned XW = 16
) (
  input  logic signed [XW-1:0] x,
  output logic signed [XW+4:0] p29,
  output logic signed [XW+5:0] p43
);
  logic signed [XW+1:0] f3;   // 3x
  logic signed [XW+2:0] f5;   // 5x

  always_comb begin
    f3  = (XW+2)'(x) + ((XW+2)'(x) <<< 1);
    f5  = (XW+3)'(x) + ((XW+3)'(x) <<< 2);
    p29 = ((XW+5)'(f3) <<< 3) + (XW+5)'(f5);
    p43 = ((XW+6)'(f5) <<< 3) + (XW+6)'(f3);
  end
endmodule
