// transposed_chain -- delay-and-add chain of a transposed-form FIR filter.
//
// The multiplier block delivers one product term per tap, term[d] for tap d
// (d = 0..TAPS-1), all computed from the same input sample. The chain
// registers z[1..TAPS-1] hold partial sums: on each accepted sample
//   z[TAPS-1] <= term[TAPS-1]
//   z[d]      <= term[d] + z[d+1]        (d = 1..TAPS-2)
// and the filter output for the current sample is y = term[0] + z[1]
// (combinational). Term d therefore reaches the output d samples later,
// which gives y[n] = sum_d term_d[n-d]. Each register is followed by one
// structural adder, so the chain adds a single adder to the critical path
// whatever the length of the filter.
//
// en advances the chain by one sample; with en low the partial sums hold.
// rst_n (asynchronous, active low) clears them, which is the rest state of
// the filter. WIDTH must hold the largest partial sum; the caller sizes it.
// The transposed arrangement, the enable and the reset are this design's
// choices.
module transposed_chain #(
  parameter int unsigned WIDTH = 29,
  parameter int unsigned TAPS  = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [WIDTH-1:0] term [TAPS],
  output logic signed [WIDTH-1:0] y
);

  // z[0] is unused; z[d] for d = 1..TAPS-1 is the partial sum d samples ahead.
  logic signed [WIDTH-1:0] z [1:TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 1; d < TAPS; d++) z[d] <= '0;
    end else if (en) begin
      z[TAPS-1] <= term[TAPS-1];
      for (int d = 1; d < TAPS - 1; d++) z[d] <= term[d] + z[d+1];
    end
  end

  assign y = term[0] + z[1];

endmodule
