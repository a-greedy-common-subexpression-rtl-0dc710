// fir12_cse -- 12-tap linear-phase FIR filter whose constant multipliers are
// built from shared CSD subexpressions (greedy common subexpression
// elimination with vertical, horizontal and super-subexpressions).
//
// Coefficients (12-digit CSD, digit p weighs 2^-p; scaled by 2^12 here):
//   h0 = 0 0 1 0 1 0 0 -1 0 1 0 1  =  629
//   h1 = 0 0 1 0 1 0 1 0 0 -1 0 0  =  668
//   h2 = 0 0 0 0 1 0 0 0 0 1 0 1   =  133
//   h3 = 0 0 0 1 0 1 0 1 0 0 1 0   =  338
//   h4 = 0 0 0 1 0 1 0 -1 0 0 1 0  =  306
//   h5 = 0 1 0 0 1 0 1 0 0 1 0 0   = 1188
// and h(11-k) = h(k), so y[n] = sum_{d=0..11} h(d) x[n-d].
//
// Structure (transposed direct form):
//   x_in --+--------------------------> cse_subexpr --> cse_tap_terms --> transposed_chain --> y_out reg
//          +--> x_d1 register ------------^   6 adders      T0..T11          11 adders + 11 regs
// cse_subexpr forms the six shared patterns x2 = x + x[-1], x3, x5, x6, x8
// and x9 (six adders); cse_tap_terms adds shifted patterns into one term per
// tap (five adders for h0..h5, four more for the mirrored h6..h11, whose
// vertical pairs group differently); transposed_chain delays and sums the
// terms. The pattern set and the grouping of h0..h5 follow the published
// coefficient grouping; the transposed arrangement, the mirrored half, the
// integer scaling and the handshake are this design's choices.
//
// Interface and timing. A sample on x_in is taken when in_valid is high; the
// full-precision output y_out (OUT_W = DATA_W + 13 bits; it cannot overflow;
// it is 2^12 times the result with fractional coefficients) appears with
// out_valid at the same clock edge that takes the sample, i.e. one clock of
// latency, and one sample per clock at most. in_valid may stay low for any
// number of cycles between samples: the filter state is frozen and y_out
// holds its value. rst_n is asynchronous, active low, and clears the filter
// state (all past samples zero).
module fir12_cse
  import fir_cse_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned OUT_W = DATA_W + OutGrowth
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_out
);

  // Previous accepted sample, for the vertical pattern x2.
  logic signed [DATA_W-1:0] x_d1;

  logic signed [DATA_W:0]   x2;
  logic signed [DATA_W+2:0] x3;
  logic signed [DATA_W+3:0] x5, x6;
  logic signed [DATA_W+4:0] x8, x9;
  logic signed [OUT_W-1:0]  t [NumTaps];
  logic signed [OUT_W-1:0]  y;

  cse_subexpr #(.DATA_W(DATA_W)) u_subexpr (
    .x(x_in), .x_d1, .x2, .x3, .x5, .x6, .x8, .x9
  );

  cse_tap_terms #(.DATA_W(DATA_W)) u_terms (
    .x2, .x3, .x5, .x6, .x8, .x9, .t
  );

  transposed_chain #(.WIDTH(OUT_W), .TAPS(NumTaps)) u_chain (
    .clk, .rst_n, .en(in_valid), .term(t), .y
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d1      <= '0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_d1  <= x_in;
        y_out <= y;
      end
    end
  end

endmodule
