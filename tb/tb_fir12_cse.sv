// tb_fir12_cse -- end-to-end self-checking test of the 12-tap CSE FIR filter.
//
// The reference model is a plain convolution y[n] = sum_d h(d) x[n-d] whose
// coefficients are computed here from the CSD digit rows of the coefficient
// table (digit p weighs 2^(12-p) in the integer scaling), mirrored for taps
// 6..11. It shares nothing with the shift-and-add structure of the filter.
//
// Phases, each counted as a mechanism that must occur at least once:
//   impulse   - a unit impulse; the outputs must list h0..h5, h5..h0.
//   stall     - in_valid low between samples; history and y_out must hold.
//   burst     - one sample per clock for a long run (full throughput).
//   fullscale - the largest and smallest samples for twelve samples in a
//               row, reaching the extreme output values without overflow.
//   reset     - reset in mid-stream clears the history.
// Every clock also checks the one-cycle latency: out_valid must equal the
// in_valid of the previous clock.
module tb_fir12_cse;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned OUT_W  = DATA_W + 13;
  localparam int NTAPS = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, out_valid;
  logic signed [DATA_W-1:0] x_in;
  logic signed [OUT_W-1:0]  y_out;

  fir12_cse dut (.*);

  // CSD digit rows of h0..h5, digit positions 1..12 left to right.
  int csd [6][12] = '{
    '{0, 0, 1, 0, 1, 0, 0, -1, 0, 1, 0, 1},
    '{0, 0, 1, 0, 1, 0, 1, 0, 0, -1, 0, 0},
    '{0, 0, 0, 0, 1, 0, 0, 0, 0, 1, 0, 1},
    '{0, 0, 0, 1, 0, 1, 0, 1, 0, 0, 1, 0},
    '{0, 0, 0, 1, 0, 1, 0, -1, 0, 0, 1, 0},
    '{0, 1, 0, 0, 1, 0, 1, 0, 0, 1, 0, 0}
  };
  longint h [NTAPS];
  longint hist [NTAPS];   // hist[d] = sample accepted d samples ago (d=0 newest)

  int checks = 0, failures = 0;
  int n_impulse = 0, n_stall = 0, n_burst = 0, n_fullscale = 0, n_reset = 0;
  logic prev_valid = 1'b0;
  longint expected = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  function automatic longint model();
    longint acc = 0;
    for (int d = 0; d < NTAPS; d++) acc += h[d] * hist[d];
    return acc;
  endfunction

  // Latency check on every clock: the edge that takes a sample must raise
  // out_valid, and an edge without a sample must lower it.
  always @(posedge clk) begin
    prev_valid = in_valid && rst_n;
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== prev_valid) fail($sformatf("out_valid=%0b, sample taken at this edge=%0b", out_valid, prev_valid));
    end
  end

  // Present one sample (valid=1) or an idle cycle (valid=0), then check y_out.
  task automatic step(input bit valid, input longint sample);
    longint y_before;
    @(negedge clk);
    in_valid = valid;
    x_in = DATA_W'(sample);
    y_before = y_out;
    if (valid) begin
      for (int d = NTAPS - 1; d > 0; d--) hist[d] = hist[d-1];
      hist[0] = sample;
      expected = model();
    end
    @(posedge clk);
    #2;
    checks++;
    if (valid) begin
      if (y_out !== OUT_W'(expected)) fail($sformatf("y_out=%0d expected %0d", y_out, expected));
    end else begin
      if (y_out !== OUT_W'(y_before)) fail("y_out changed during an idle cycle");
      n_stall++;
    end
  endtask

  task automatic clear_model();
    for (int d = 0; d < NTAPS; d++) hist[d] = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vmax = (longint'(1) <<< (DATA_W - 1)) - 1;
    longint vmin = -(longint'(1) <<< (DATA_W - 1));
    longint hsum = 0;

    for (int k = 0; k < 6; k++) begin
      h[k] = 0;
      for (int p = 1; p <= 12; p++) h[k] += longint'(csd[k][p-1]) * (longint'(1) <<< (12 - p));
      h[NTAPS-1-k] = h[k];
    end
    for (int d = 0; d < NTAPS; d++) hsum += h[d];
    $display("coefficients h0..h5 = %0d %0d %0d %0d %0d %0d", h[0], h[1], h[2], h[3], h[4], h[5]);

    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    clear_model();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Impulse response, one sample per clock.
    for (int n = 0; n < NTAPS + 4; n++) begin
      step(1'b1, (n == 0) ? 1 : 0);
      checks++;
      if (y_out !== OUT_W'((n < NTAPS) ? h[n] : 0)) fail($sformatf("impulse response at %0d", n));
      else n_impulse++;
    end

    // Random samples with random idle gaps.
    repeat (3000) begin
      if ($urandom % 3 == 0) step(1'b0, longint'($signed(DATA_W'($urandom))));
      step(1'b1, longint'($signed(DATA_W'($urandom))));
    end

    // Long burst at full rate.
    for (int n = 0; n < 200; n++) begin
      step(1'b1, longint'($signed(DATA_W'($urandom))));
      n_burst++;
    end

    // Full-scale positive, then full-scale negative.
    repeat (NTAPS) step(1'b1, vmax);
    checks++;
    if (y_out !== OUT_W'(hsum * vmax)) fail("full-scale positive output");
    else n_fullscale++;
    repeat (NTAPS) step(1'b1, vmin);
    checks++;
    if (y_out !== OUT_W'(hsum * vmin)) fail("full-scale negative output");
    else n_fullscale++;

    // Reset in mid-stream, then a fresh impulse response.
    @(negedge clk) rst_n = 1'b0; in_valid = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    clear_model();
    checks++;
    if (y_out !== '0 || out_valid !== 1'b0) fail("reset did not clear the output");
    for (int n = 0; n < NTAPS; n++) begin
      step(1'b1, (n == 0) ? -3 : 0);
      checks++;
      if (y_out !== OUT_W'(-3 * h[n])) fail($sformatf("impulse after reset at %0d", n));
      else if (n == NTAPS - 1) n_reset++;
    end

    $display("mechanisms: impulse=%0d stall=%0d burst=%0d fullscale=%0d reset=%0d",
             n_impulse, n_stall, n_burst, n_fullscale, n_reset);
    checks++;
    if (n_impulse == 0 || n_stall == 0 || n_burst == 0 || n_fullscale == 0 || n_reset == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
