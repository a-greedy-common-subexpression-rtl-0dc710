// tb_cse_subexpr -- self-checking test of the six subexpression adders.
//
// Drives random and corner-case sample pairs (x, x_d1) and compares each
// pattern output with its value written as a plain integer multiple of the
// sample: x2 = x + x_d1, x3 = 5x, x5 = 9x, x6 = 7x, x8 = 21x, x9 = 19x.
// The block is combinational; a small clock only paces the stimulus and
// the watchdog.
module tb_cse_subexpr;
  localparam int unsigned DATA_W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] x, x_d1;
  logic signed [DATA_W:0]   x2;
  logic signed [DATA_W+2:0] x3;
  logic signed [DATA_W+3:0] x5, x6;
  logic signed [DATA_W+4:0] x8, x9;

  int checks = 0;
  int failures = 0;

  cse_subexpr #(.DATA_W(DATA_W)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: x=%0d x_d1=%0d got %0d expected %0d", what, x, x_d1, got, exp);
    end
  endtask

  task automatic apply(longint a, longint b);
    x = DATA_W'(a);
    x_d1 = DATA_W'(b);
    @(posedge clk);
    check("x2", x2, longint'(x) + longint'(x_d1));
    check("x3", x3, 5 * longint'(x));
    check("x5", x5, 9 * longint'(x));
    check("x6", x6, 7 * longint'(x));
    check("x8", x8, 21 * longint'(x));
    check("x9", x9, 19 * longint'(x));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lim_hi = (longint'(1) <<< (DATA_W - 1)) - 1;
    longint lim_lo = -(longint'(1) <<< (DATA_W - 1));
    apply(0, 0);
    apply(1, 0);
    apply(-1, -1);
    apply(lim_hi, lim_hi);
    apply(lim_lo, lim_lo);
    apply(lim_hi, lim_lo);
    repeat (2000) apply($signed($urandom), $signed($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
