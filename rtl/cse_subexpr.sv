// cse_subexpr -- the subexpression adders of the CSE multiplier block.
//
// The greedy common subexpression elimination groups the nonzero CSD digits
// of the coefficient set into a few shared patterns. For this coefficient set
// six patterns remain, and each costs exactly one adder here:
//
//   x2 = [1 1] vertical    = x + x[-1]      (same digit in two adjacent taps)
//   x3 = [1 0 1]           = 4x + x   =  5x
//   x5 = [1 0 0 1]         = 8x + x   =  9x
//   x6 = [1 0 0 -1]        = 8x - x   =  7x
//   x8 = [1 0 1 0 1]       = 4*x3 + x = 21x (super-subexpression)
//   x9 = [1 0 1 0 -1]      = 4*x3 - x = 19x (super-subexpression)
//
// Each pattern is produced as an integer aligned to its last (least
// significant) digit; the filter output sum shifts it into place. The super-
// subexpressions reuse x3, so they add one adder each, not two. The pattern
// list and values follow the grouping of the coefficient table; computing x8
// and x9 from x3 (rather than from scratch) is this design's choice, and does
// not lengthen the path beyond two adders.
//
// Interface: x is the current input sample and x_d1 the previous one (the
// vertical pattern spans two taps). Purely combinational, no clock.
module cse_subexpr #(
  parameter int unsigned DATA_W = 16
) (
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] x_d1,
  output logic signed [DATA_W:0]   x2,   // x + x[-1]
  output logic signed [DATA_W+2:0] x3,   // 5x
  output logic signed [DATA_W+3:0] x5,   // 9x
  output logic signed [DATA_W+3:0] x6,   // 7x
  output logic signed [DATA_W+4:0] x8,   // 21x
  output logic signed [DATA_W+4:0] x9    // 19x
);

  always_comb begin
    x2 = (DATA_W+1)'(x) + (DATA_W+1)'(x_d1);
    x3 = ((DATA_W+3)'(x) <<< 2) + (DATA_W+3)'(x);
    x5 = ((DATA_W+4)'(x) <<< 3) + (DATA_W+4)'(x);
    x6 = ((DATA_W+4)'(x) <<< 3) - (DATA_W+4)'(x);
    x8 = ((DATA_W+5)'(x3) <<< 2) + (DATA_W+5)'(x);
    x9 = ((DATA_W+5)'(x3) <<< 2) - (DATA_W+5)'(x);
  end

endmodule
