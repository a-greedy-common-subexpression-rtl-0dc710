// tb_cse_tap_terms -- self-checking test of the per-tap product terms.
//
// The patterns are driven from two sample values (x, x_d1) as plain integer
// multiples (x2 = x + x_d1, x3 = 5x, x5 = 9x, x6 = 7x, x8 = 21x, x9 = 19x),
// without the pattern adder block. Every term is linear in the two samples:
// T_d = A_d x + B_d x_d1. The test
//   1. measures A_d with (x, x_d1) = (1, 0) and B_d with (0, 1);
//   2. checks that A_d + B_(d-1) equals coefficient h_d computed from the CSD
//      digit rows (so every tap gets exactly its coefficient once the
//      transposed chain delays the terms), and that B_11 = 0 (nothing spills
//      past the last tap);
//   3. checks T_d = A_d x + B_d x_d1 for random and extreme samples.
module tb_cse_tap_terms;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned OUT_W  = DATA_W + 13;
  localparam int NTAPS = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W:0]   x2;
  logic signed [DATA_W+2:0] x3;
  logic signed [DATA_W+3:0] x5, x6;
  logic signed [DATA_W+4:0] x8, x9;
  logic signed [OUT_W-1:0]  t [NTAPS];

  cse_tap_terms #(.DATA_W(DATA_W)) dut (.*);

  int csd [6][12] = '{
    '{0, 0, 1, 0, 1, 0, 0, -1, 0, 1, 0, 1},
    '{0, 0, 1, 0, 1, 0, 1, 0, 0, -1, 0, 0},
    '{0, 0, 0, 0, 1, 0, 0, 0, 0, 1, 0, 1},
    '{0, 0, 0, 1, 0, 1, 0, 1, 0, 0, 1, 0},
    '{0, 0, 0, 1, 0, 1, 0, -1, 0, 0, 1, 0},
    '{0, 1, 0, 0, 1, 0, 1, 0, 0, 1, 0, 0}
  };
  longint h [NTAPS], a [NTAPS], b [NTAPS];
  int checks = 0, failures = 0;

  task automatic drive(longint x, longint xd1);
    x2 = (DATA_W+1)'(x + xd1);
    x3 = (DATA_W+3)'(5 * x);
    x5 = (DATA_W+4)'(9 * x);
    x6 = (DATA_W+4)'(7 * x);
    x8 = (DATA_W+5)'(21 * x);
    x9 = (DATA_W+5)'(19 * x);
    @(posedge clk);
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vmax = (longint'(1) <<< (DATA_W - 1)) - 1;
    longint vmin = -(longint'(1) <<< (DATA_W - 1));
    for (int k = 0; k < 6; k++) begin
      h[k] = 0;
      for (int p = 1; p <= 12; p++) h[k] += longint'(csd[k][p-1]) * (longint'(1) <<< (12 - p));
      h[NTAPS-1-k] = h[k];
    end

    drive(1, 0);
    for (int d = 0; d < NTAPS; d++) a[d] = t[d];
    drive(0, 1);
    for (int d = 0; d < NTAPS; d++) b[d] = t[d];

    for (int d = 0; d < NTAPS; d++)
      check($sformatf("coefficient of tap %0d", d), a[d] + ((d > 0) ? b[d-1] : 0), h[d]);
    check("spill past last tap", b[NTAPS-1], 0);

    for (int n = 0; n < 1500; n++) begin
      longint x, xd1;
      case (n)
        0: begin x = vmax; xd1 = vmax; end
        1: begin x = vmin; xd1 = vmin; end
        2: begin x = vmax; xd1 = vmin; end
        default: begin
          x   = longint'($signed(DATA_W'($urandom)));
          xd1 = longint'($signed(DATA_W'($urandom)));
        end
      endcase
      drive(x, xd1);
      for (int d = 0; d < NTAPS; d++)
        check($sformatf("T%0d for x=%0d x_d1=%0d", d, x, xd1), t[d], a[d] * x + b[d] * xd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
