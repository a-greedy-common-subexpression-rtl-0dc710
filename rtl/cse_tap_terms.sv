// cse_tap_terms -- the realisation adders of the CSE multiplier block: one
// product term per tap of the transposed-form filter.
//
// The greedy grouping expresses the output of taps h0..h5 as shifted, delayed
// subexpressions. Grouped by delay d, the terms that enter the filter chain
// at delay d form T_d:
//
//   T0 = 2^-3 x2 + 2^-5 x6 + 2^-10 x3       (2 adders)
//   T1 = 2^-5 x2 + 2^-7 x6                  (1 adder)
//   T2 = 2^-10 x3                           (shift only)
//   T3 = 2^-4 x8 + 2^-11 x2                 (1 adder)
//   T4 = 2^-4 x9                            (shift only)
//   T5 = 2^-2 x5 + 2^-7 x5                  (1 adder)
//
// i.e. the five realisation adders of the first half. Because x2 = x + x[-1]
// spans two neighbouring taps, T_d is not h_d times x: the x2 part of T_d
// also supplies tap d+1. The mirrored taps h6..h11 (h(11-k) = h(k)) need the
// same patterns grouped the other way round, since a vertical pair at taps
// j, j+1 lands on taps 10-j, 11-j:
//
//   T6  = T5                                (shared)
//   T7  = 2^-4 x9 + 2^-11 x2                (1 adder)
//   T8  = 2^-4 x8                           (shift only)
//   T9  = 2^-5 x2 + 2^-10 x3                (1 adder)
//   T10 = 2^-3 x2 + 2^-7 x6                 (1 adder)
//   T11 = 2^-5 x6 + 2^-10 x3                (1 adder)
//
// 2^-p stands for the digit position p of a pattern's last digit; with the
// coefficients scaled by 2^CoefWl it is a left shift by CoefWl - p. T0..T5
// follow the published grouping; the mirrored T6..T11 are this design's
// derivation. Purely combinational. All terms are OUT_W = DATA_W + OutGrowth
// bits wide, signed. The low bits of a term whose smallest shift is k are
// zero by construction, and t[6] is the same wire as t[5]; synthesis sees
// those output bits as constant or duplicated, which is intended.
module cse_tap_terms
  import fir_cse_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned OUT_W = DATA_W + OutGrowth
) (
  input  logic signed [DATA_W:0]   x2,
  input  logic signed [DATA_W+2:0] x3,
  input  logic signed [DATA_W+3:0] x5,
  input  logic signed [DATA_W+3:0] x6,
  input  logic signed [DATA_W+4:0] x8,
  input  logic signed [DATA_W+4:0] x9,
  output logic signed [OUT_W-1:0]  t [NumTaps]
);

  // Sign-extend a pattern to the output width and move its last digit to
  // position p (1..CoefWl).
  function automatic logic signed [OUT_W-1:0] place(input logic signed [DATA_W+4:0] v,
                                                    input int unsigned p);
    return OUT_W'(v) <<< (CoefWl - p);
  endfunction

  logic signed [DATA_W+4:0] e2, e3, e5, e6;

  always_comb begin
    e2 = (DATA_W+5)'(x2);
    e3 = (DATA_W+5)'(x3);
    e5 = (DATA_W+5)'(x5);
    e6 = (DATA_W+5)'(x6);
    // Taps h0..h5.
    t[0]  = place(e2, 3) + place(e6, 8) + place(e3, 12);  // h0: 3 | 5,-8 | 10,12 (+h1 digit 3)
    t[1]  = place(e2, 5) + place(e6, 10);                 // h1: 5 | 7,-10 (+h2 digit 5)
    t[2]  = place(e3, 12);                                // h2: 10,12
    t[3]  = place(x8, 8) + place(e2, 11);                 // h3: 4,6,8 | 11 (+h4 digit 11)
    t[4]  = place(x9, 8);                                 // h4: 4,6,-8
    t[5]  = place(e5, 5) + place(e5, 10);                 // h5: 2,5 | 7,10
    // Taps h6..h11, the mirror image.
    t[6]  = t[5];                                         // h6 = h5
    t[7]  = place(x9, 8) + place(e2, 11);                 // h7 = h4: 4,6,-8 | 11 (+h8 digit 11)
    t[8]  = place(x8, 8);                                 // h8 = h3: 4,6,8
    t[9]  = place(e2, 5) + place(e3, 12);                 // h9 = h2: 5 | 10,12 (+h10 digit 5)
    t[10] = place(e2, 3) + place(e6, 10);                 // h10 = h1: 3 | 7,-10 (+h11 digit 3)
    t[11] = place(e6, 8) + place(e3, 12);                 // h11 = h0: 5,-8 | 10,12
  end

endmodule
