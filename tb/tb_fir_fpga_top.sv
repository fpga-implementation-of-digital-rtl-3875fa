// tb_fir_fpga_top: end-to-end test of the whole design at its default sizes.
//
// Sample filters. The testbench designs the four Kaiser-window filters itself
// from their specifications (37 taps, Fs = 4096 Hz, 60 dB, band edges of
// fir_pkg's header), with real arithmetic and its own Bessel function, and
// rounds them to Q1.15. It then checks that
//   * the impulse response of each filter equals these coefficients,
//   * every output sample of each filter equals the convolution of the input
//     with them, for three sampled tones (128, 768 and 1600 Hz, amplitude 100)
//     with random idle cycles between samples,
//   * y_valid follows x_valid by one clock,
//   * each filter passes the tones in its passband (peak gain above 0.85)
//     and suppresses those in its stopband (peak gain below 0.03).
// Signal gates. clk runs at 200 MHz; clk1 is set to 20, 80 and 125 MHz and
// each gate output is checked to follow clk1 or stay low according to its
// pass rule.
// Each mechanism (every filter passing and stopping a tone, idle cycles in
// the sample stream, every gate passing and blocking) is counted, and one
// that never happened counts as a failure. Times are in ns.
`timescale 1ns / 1ps
module tb_fir_fpga_top;

  localparam int TAPS = 37;
  localparam real FS  = 4096.0;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0, clk1 = 1'b0, reset;
  logic signed [7:0]  x_in;
  logic               x_valid;
  logic signed [29:0] y [4];
  logic               y_valid;
  logic lowpass, highpass, bandpass, bandreject;
  logic [3:0]  in_band;
  logic [31:0] clk1_mhz;
  real  half1 = 25.0;

  fir_fpga_top dut (
    .clk, .reset, .x_in, .x_valid,
    .y_lowpass(y[0]), .y_highpass(y[1]), .y_bandpass(y[2]), .y_bandstop(y[3]),
    .y_valid,
    .clk1, .lowpass, .highpass, .bandpass, .bandreject, .in_band, .clk1_mhz);

  always #2.5 clk = ~clk;
  always #(half1) clk1 = ~clk1;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ reference filter design
  int h [4][TAPS];

  function automatic real bessel_i0(real x);
    real s = 1.0, ds = 1.0, d = 0.0;
    while (ds > s * 1.0e-12) begin
      d  = d + 2.0;
      ds = ds * x * x / (d * d);
      s  = s + ds;
    end
    return s;
  endfunction

  function automatic int round_q15(real v);
    real t = v * 32768.0;
    return (t >= 0.0) ? $rtoi(t + 0.5) : -$rtoi(-t + 0.5);
  endfunction

  task automatic design_filter(int idx, real fa, real fb, bit stop);
    int  np = (TAPS - 1) / 2;
    real alpha = 0.1102 * (60.0 - 8.7);
    real a, w;
    for (int j = 0; j <= np; j++) begin
      if (j == 0) a = 2.0 * (fb - fa) / FS;
      else a = ($sin(2.0 * PI * j * fb / FS) - $sin(2.0 * PI * j * fa / FS)) / (PI * j);
      if (stop) a = (j == 0) ? 1.0 - a : -a;
      w = bessel_i0(alpha * $sqrt(1.0 - (real'(j) * j) / (real'(np) * np))) / bessel_i0(alpha);
      h[idx][np + j] = round_q15(a * w);
      h[idx][np - j] = h[idx][np + j];
    end
  endtask

  // ------------------------------------------------------- sample stimulus
  int hist [TAPS];
  int expv [4];
  int peak [4];
  int idle_cycles = 0, samples = 0;

  task automatic step(logic valid, int sample);
    @(negedge clk);
    x_valid = valid;
    x_in    = 8'(sample);
    @(posedge clk);
    if (valid) begin
      samples++;
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(signed'(8'(sample)));
      for (int f = 0; f < 4; f++) begin
        expv[f] = 0;
        for (int k = 0; k < TAPS; k++) expv[f] += h[f][k] * hist[k];
      end
    end else idle_cycles++;
    #1;
    checks++;
    if (y_valid !== valid) begin
      failures++;
      $display("FAIL: y_valid=%b one clock after x_valid=%b", y_valid, valid);
    end
    for (int f = 0; f < 4; f++) begin
      checks++;
      if (y[f] !== 30'(expv[f])) begin
        failures++;
        $display("FAIL filter %0d: y=%0d expected %0d", f, y[f], expv[f]);
      end
    end
  endtask

  int passed_tone [4], stopped_tone [4];

  // Sampled tone of frequency ftone (Hz), amplitude 100; the peak output is
  // measured after the delay line has filled.
  task automatic tone(real ftone, bit want_pass [4]);
    int s;
    foreach (peak[f]) peak[f] = 0;
    for (int n = 0; n < 200; n++) begin
      s = $rtoi(100.0 * $sin(2.0 * PI * ftone * n / FS) + 100.5) - 100;
      while ($urandom_range(0, 4) == 0) step(1'b0, $urandom);
      step(1'b1, s);
      if (n >= TAPS + 4)
        for (int f = 0; f < 4; f++) begin
          int m = (y[f] < 0) ? -int'(y[f]) : int'(y[f]);
          if (m > peak[f]) peak[f] = m;
        end
    end
    for (int f = 0; f < 4; f++) begin
      real gain = real'(peak[f]) / (100.0 * 32768.0);
      checks++;
      if (want_pass[f]) begin
        passed_tone[f]++;
        if (gain < 0.85) begin
          failures++;
          $display("FAIL filter %0d: gain %f at %f Hz, passband expected", f, gain, ftone);
        end
      end else begin
        stopped_tone[f]++;
        if (gain > 0.03) begin
          failures++;
          $display("FAIL filter %0d: gain %f at %f Hz, stopband expected", f, gain, ftone);
        end
      end
      $display("tone %6.1f Hz filter %0d gain %f", ftone, f, gain);
    end
  endtask

  // ------------------------------------------------------------ signal gates
  int e1, eo [4];
  logic counting = 1'b0;
  int gate_pass [4], gate_block [4];
  logic [3:0] gate_out;

  assign gate_out = {bandreject, bandpass, highpass, lowpass};

  always @(posedge clk1) if (counting) e1++;
  for (genvar g = 0; g < 4; g++) begin : g_cnt
    always @(posedge gate_out[g]) if (counting) eo[g]++;
  end

  function automatic logic rule(int t, real f);
    case (t)
      0: return f < 50.0;
      1: return f > 100.0;
      2: return f > 50.0 && f < 100.0;
      default: return !(f > 50.0 && f < 100.0);
    endcase
  endfunction

  task automatic gate_test(real f_mhz);
    half1 = 500.0 / f_mhz;
    #2500;
    counting = 1'b1; e1 = 0; foreach (eo[g]) eo[g] = 0;
    #900;
    counting = 1'b0;
    checks++;
    if (clk1_mhz > 32'($rtoi(f_mhz) + 2) || clk1_mhz + 2 < 32'($rtoi(f_mhz))) begin
      failures++;
      $display("FAIL: clk1 measured as %0d MHz at %f MHz", clk1_mhz, f_mhz);
    end
    for (int g = 0; g < 4; g++) begin
      logic want = rule(g, f_mhz);
      checks += 2;
      if (in_band[g] !== want) begin
        failures++;
        $display("FAIL gate %0d at %f MHz: in_band=%b", g, f_mhz, in_band[g]);
      end
      if (want ? (eo[g] + 2 < e1 || eo[g] > e1) : (eo[g] != 0)) begin
        failures++;
        $display("FAIL gate %0d at %f MHz: %0d output edges, %0d input edges", g, f_mhz, eo[g], e1);
      end
      if (want) gate_pass[g]++; else gate_block[g]++;
    end
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    bit p128 [4]  = '{1, 0, 0, 1};
    bit p768 [4]  = '{0, 1, 1, 0};
    bit p1600 [4] = '{0, 1, 0, 1};

    design_filter(0,   0.0,  512.0, 1'b0);   // lowpass
    design_filter(1, 410.0, 2048.0, 1'b0);   // highpass
    design_filter(2, 512.0, 1024.0, 1'b0);   // bandpass
    design_filter(3, 450.0, 1050.0, 1'b1);   // bandstop
    foreach (hist[k]) hist[k] = 0;
    foreach (expv[f]) begin
      expv[f] = 0; passed_tone[f] = 0; stopped_tone[f] = 0;
      gate_pass[f] = 0; gate_block[f] = 0;
    end

    reset = 1'b1; x_valid = 1'b0; x_in = '0;
    #20;
    @(negedge clk) reset = 1'b0;

    // impulse response of all four filters
    step(1'b1, 1);
    for (int k = 1; k <= TAPS; k++) begin
      for (int f = 0; f < 4; f++) begin
        checks++;
        if (y[f] !== 30'(h[f][k-1])) begin
          failures++;
          $display("FAIL filter %0d: impulse response h(%0d)=%0d expected %0d", f, k-1, y[f], h[f][k-1]);
        end
      end
      step(1'b1, 0);
    end

    tone(128.0, p128);
    tone(768.0, p768);
    tone(1600.0, p1600);

    gate_test(20.0);
    gate_test(80.0);
    gate_test(125.0);

    // every mechanism must have happened
    checks++;
    if (idle_cycles == 0) begin failures++; $display("FAIL: no idle cycles in the sample stream"); end
    for (int f = 0; f < 4; f++) begin
      checks += 2;
      if (passed_tone[f] == 0 || stopped_tone[f] == 0) begin
        failures++;
        $display("FAIL filter %0d: passed %0d, stopped %0d tones", f, passed_tone[f], stopped_tone[f]);
      end
      if (gate_pass[f] == 0 || gate_block[f] == 0) begin
        failures++;
        $display("FAIL gate %0d: passed %0d, blocked %0d times", f, gate_pass[f], gate_block[f]);
      end
    end
    $display("samples %0d, idle cycles %0d", samples, idle_cycles);
    $display("tones passed/stopped per filter: %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             passed_tone[0], stopped_tone[0], passed_tone[1], stopped_tone[1],
             passed_tone[2], stopped_tone[2], passed_tone[3], stopped_tone[3]);
    $display("gate passes/blocks per output: %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             gate_pass[0], gate_block[0], gate_pass[1], gate_block[1],
             gate_pass[2], gate_block[2], gate_pass[3], gate_block[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
