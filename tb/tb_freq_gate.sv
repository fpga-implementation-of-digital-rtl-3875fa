// tb_freq_gate: self-checking test of the frequency-selective gate.
//
// One gate of each type (lowpass, highpass, bandpass, bandstop) watches the
// same square wave clk1. The reference clock clk runs at 200 MHz, so each
// measurement window is 1 us and the count equals the frequency of clk1 in
// MHz. clk1 is set in turn to 20, 62.5, 80, 125 and 40 MHz; after each
// change the testbench waits two windows and then checks
//   * the measured count against the frequency (within 2),
//   * each gate's decision against the pass rules (f < 50, f > 100,
//     50 < f < 100, not 50 < f < 100),
//   * over one further window, that a passing gate's output has as many
//     rising edges as clk1 (within 2) and a blocking gate's output none,
//   * that the decisions change exactly at window ends (every 200 clocks).
// Times are in ns.
`timescale 1ns / 1ps
module tb_freq_gate;

  logic clk = 1'b0, clk1 = 1'b0, reset;
  logic [3:0]  sig, pass;
  logic [31:0] freq [4];
  int checks = 0, failures = 0;
  real half1 = 25.0;            // half period of clk1 in ns
  int  passes [4], blocks [4];

  freq_gate #(.FTYPE(fir_pkg::FT_LOWPASS))  g_lp (.clk, .clk1, .reset, .sig_out(sig[0]), .pass(pass[0]), .freq(freq[0]));
  freq_gate #(.FTYPE(fir_pkg::FT_HIGHPASS)) g_hp (.clk, .clk1, .reset, .sig_out(sig[1]), .pass(pass[1]), .freq(freq[1]));
  freq_gate #(.FTYPE(fir_pkg::FT_BANDPASS)) g_bp (.clk, .clk1, .reset, .sig_out(sig[2]), .pass(pass[2]), .freq(freq[2]));
  freq_gate #(.FTYPE(fir_pkg::FT_BANDSTOP)) g_bs (.clk, .clk1, .reset, .sig_out(sig[3]), .pass(pass[3]), .freq(freq[3]));

  always #2.5 clk = ~clk;
  always #(half1) clk1 = ~clk1;

  initial begin
    #60000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rising edges of clk1 and of each gate output, counted over a window
  int e1, es [4];
  logic counting = 1'b0;
  always @(posedge clk1) if (counting) e1++;
  for (genvar g = 0; g < 4; g++) begin : g_cnt
    always @(posedge sig[g]) if (counting) es[g]++;
  end

  // decisions may only change on the clock edge that ends a window
  int clk_cycles = 0;
  logic [3:0] pass_prev = '0;
  always @(posedge clk) begin
    if (reset) clk_cycles = 0;
    else begin
      clk_cycles++;
      #0.1;
      if (pass !== pass_prev) begin
        checks++;
        if (clk_cycles % 200 != 0) begin
          failures++;
          $display("FAIL: decision changed at clock %0d, not a window end", clk_cycles);
        end
      end
      pass_prev = pass;
    end
  end

  function automatic logic rule(int t, real f);
    case (t)
      0: return f < 50.0;
      1: return f > 100.0;
      2: return f > 50.0 && f < 100.0;
      default: return !(f > 50.0 && f < 100.0);
    endcase
  endfunction

  task automatic run_freq(real f_mhz);
    half1 = 500.0 / f_mhz;
    #2000;                      // two windows: settle, then one full window
    @(posedge clk);
    // wait for the next window end, then count over one window
    do @(posedge clk); while (clk_cycles % 200 != 0);
    counting = 1'b1; e1 = 0; foreach (es[g]) es[g] = 0;
    #1000;
    counting = 1'b0;
    for (int g = 0; g < 4; g++) begin
      logic want;
      want = rule(g, f_mhz);
      checks += 3;
      if (freq[g] > 32'($rtoi(f_mhz) + 2) || freq[g] + 2 < 32'($rtoi(f_mhz))) begin
        failures++;
        $display("FAIL gate %0d: measured %0d MHz for %f MHz", g, freq[g], f_mhz);
      end
      if (pass[g] !== want) begin
        failures++;
        $display("FAIL gate %0d at %f MHz: pass=%b expected %b", g, f_mhz, pass[g], want);
      end
      if (want ? (es[g] + 2 < e1 || es[g] > e1) : (es[g] != 0)) begin
        failures++;
        $display("FAIL gate %0d at %f MHz: %0d output edges for %0d input edges", g, f_mhz, es[g], e1);
      end
      if (want) passes[g]++; else blocks[g]++;
    end
  endtask

  initial begin
    foreach (passes[g]) begin passes[g] = 0; blocks[g] = 0; end
    reset = 1'b1;
    #20 reset = 1'b0;
    // the gates stay closed until the first window has ended
    #900;
    checks++;
    if (pass !== 4'b0000 || sig !== 4'b0000) begin
      failures++;
      $display("FAIL: gate open before the first measurement");
    end
    run_freq(20.0);
    run_freq(62.5);
    run_freq(80.0);
    run_freq(125.0);
    run_freq(40.0);
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (passes[g] == 0 || blocks[g] == 0) begin
        failures++;
        $display("FAIL gate %0d: passed %0d times, blocked %0d times", g, passes[g], blocks[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
