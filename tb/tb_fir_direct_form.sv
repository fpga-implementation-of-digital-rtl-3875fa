// tb_fir_direct_form: self-checking test of the folded direct-form FIR filter.
//
// Three instances are tested: the default one (folded, 37-tap Kaiser
// lowpass), a folded one with the highpass coefficients and an unfolded one
// (FOLDED = 0, one multiplier per tap) with the bandstop coefficients. The testbench keeps its own history of the
// accepted samples and computes y(n) = sum h(k) x(n-k) over all 37 taps,
// unfolded, with h(36-k) = h(k). It checks:
//   * the impulse response, which must equal the coefficient sequence,
//   * the step response at full negative scale (no overflow),
//   * random samples with random gaps in x_valid,
//   * that y_valid follows x_valid by exactly one clock.
module tb_fir_direct_form;

  localparam int unsigned TAPS = 37;
  localparam int unsigned HALF = 19;

  logic               clk = 1'b0;
  logic               reset;
  logic signed [7:0]  x_in;
  logic               x_valid;
  logic signed [29:0] y_lp, y_hp, y_bs;
  logic               v_lp, v_hp, v_bs;
  int checks = 0, failures = 0;

  fir_direct_form dut_lp (
    .clk, .reset, .x_in, .x_valid, .y_out(y_lp), .y_valid(v_lp));

  fir_direct_form #(.COEFS(fir_pkg::COEF_HIGHPASS)) dut_hp (
    .clk, .reset, .x_in, .x_valid, .y_out(y_hp), .y_valid(v_hp));

  fir_direct_form #(.COEFS(fir_pkg::COEF_BANDSTOP), .FOLDED(1'b0)) dut_bs (
    .clk, .reset, .x_in, .x_valid, .y_out(y_bs), .y_valid(v_bs));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // full 37-tap coefficient sequences, unfolded from the stored halves
  int h_lp [TAPS], h_hp [TAPS], h_bs [TAPS];
  int hist [TAPS];            // hist[k] = x(n-k) of the accepted samples
  int exp_lp, exp_hp, exp_bs;
  logic exp_valid;

  function automatic int conv(const ref int h [TAPS], const ref int x [TAPS]);
    int acc = 0;
    for (int k = 0; k < TAPS; k++) acc += h[k] * x[k];
    return acc;
  endfunction

  // Drive one cycle; the expected output is checked on the following cycle.
  task automatic step(logic valid, int sample);
    @(negedge clk);
    x_valid = valid;
    x_in    = 8'(sample);
    @(posedge clk);
    if (valid) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(signed'(8'(sample)));
      exp_lp = conv(h_lp, hist);
      exp_hp = conv(h_hp, hist);
      exp_bs = conv(h_bs, hist);
    end
    exp_valid = valid;
    #1;
    checks += 4;
    if (v_lp !== exp_valid || v_hp !== exp_valid || v_bs !== exp_valid) begin
      failures++;
      $display("FAIL valid: got %b/%b/%b expected %b", v_lp, v_hp, v_bs, exp_valid);
    end
    if (y_bs !== 30'(exp_bs)) begin
      failures++;
      $display("FAIL bandstop (unfolded): y=%0d expected %0d", y_bs, exp_bs);
    end
    if (y_lp !== 30'(exp_lp)) begin
      failures++;
      $display("FAIL lowpass: y=%0d expected %0d", y_lp, exp_lp);
    end
    if (y_hp !== 30'(exp_hp)) begin
      failures++;
      $display("FAIL highpass: y=%0d expected %0d", y_hp, exp_hp);
    end
  endtask

  initial begin
    for (int k = 0; k < HALF; k++) begin
      h_lp[k] = int'(fir_pkg::COEF_LOWPASS[k]);   h_lp[TAPS-1-k] = h_lp[k];
      h_hp[k] = int'(fir_pkg::COEF_HIGHPASS[k]);  h_hp[TAPS-1-k] = h_hp[k];
      h_bs[k] = int'(fir_pkg::COEF_BANDSTOP[k]);  h_bs[TAPS-1-k] = h_bs[k];
    end
    foreach (hist[k]) hist[k] = 0;
    exp_lp = 0; exp_hp = 0; exp_bs = 0;
    reset = 1'b1; x_valid = 1'b0; x_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // impulse of height 1: the output is h(0), h(1), ..., h(36), 0
    step(1'b1, 1);
    checks++;
    if (y_lp !== 30'(h_lp[0])) begin failures++; $display("FAIL impulse h(0)"); end
    for (int k = 1; k <= TAPS; k++) begin
      step(1'b1, 0);
      checks++;
      if (y_hp !== 30'(k < TAPS ? h_hp[k] : 0)) begin
        failures++;
        $display("FAIL impulse highpass k=%0d y=%0d", k, y_hp);
      end
    end
    // full-scale negative step, settles to -128 * sum(h)
    for (int k = 0; k < TAPS + 3; k++) step(1'b1, -128);
    // alternating full-scale input (largest highpass response)
    for (int k = 0; k < TAPS + 3; k++) step(1'b1, (k % 2) ? 127 : -128);
    // random samples, random gaps
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(0, 3) != 0), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
