// tb_transposed_chain -- self-checking test of the delay-and-add chain.
//
// Drives random term vectors with a random enable. The reference keeps the
// term vectors of the accepted samples; the output for the current sample
// must be sum_d term_d taken from the vector accepted d samples earlier
// (d = 0 is the vector on the inputs now). Checks reset, the frozen state
// while en is low, and the output before every clock edge.
module tb_transposed_chain;
  localparam int unsigned WIDTH = 24;
  localparam int TAPS = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  logic signed [WIDTH-1:0] term [TAPS];
  logic signed [WIDTH-1:0] y;

  transposed_chain #(.WIDTH(WIDTH), .TAPS(TAPS)) dut (.*);

  longint past [TAPS][TAPS];   // past[k][d] = term d of the vector accepted k samples ago (k >= 1)
  int checks = 0, failures = 0, n_hold = 0;

  function automatic longint model();
    longint acc = term[0];
    for (int d = 1; d < TAPS; d++) acc += past[d][d];
    return acc;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    en = 1'b0;
    for (int d = 0; d < TAPS; d++) term[d] = '0;
    for (int k = 0; k < TAPS; k++) for (int d = 0; d < TAPS; d++) past[k][d] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      // Keep the terms small enough that no partial sum wraps.
      for (int d = 0; d < TAPS; d++) term[d] = WIDTH'($signed($urandom) >>> 12);
      #1;
      checks++;
      if (y !== WIDTH'(model())) begin
        failures++;
        $display("FAIL y=%0d expected %0d", y, model());
      end
      @(posedge clk);
      if (en) begin
        for (int k = TAPS - 1; k > 1; k--) past[k] = past[k-1];
        for (int d = 0; d < TAPS; d++) past[1][d] = term[d];
      end else begin
        n_hold++;
      end
    end
    checks++;
    if (n_hold == 0) begin
      failures++;
      $display("FAIL enable never low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
