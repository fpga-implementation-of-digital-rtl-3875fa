// freq_gate: frequency-selective gate for a square-wave signal.
//
// The input clk1 is a digital square wave whose frequency decides whether it
// reaches the output. The gate counts the rising edges of clk1 during a
// measurement window of MAXFREQ cycles of the reference clock clk. When clk
// runs at MAXFREQ MHz the window lasts 1 us, so the count is the frequency of
// clk1 in MHz. At the end of each window the count is compared with LOWFREQ
// and HIGHFREQ and the pass decision is updated according to FTYPE:
//   FT_LOWPASS   pass if f < LOWFREQ
//   FT_HIGHPASS  pass if f > HIGHFREQ
//   FT_BANDPASS  pass if LOWFREQ < f < HIGHFREQ
//   FT_BANDSTOP  block if LOWFREQ < f < HIGHFREQ, pass otherwise
// While passing, sig_out follows clk1; while blocking, sig_out is held low.
// The pass rules and the generics MAXFREQ = 200, LOWFREQ = 50, HIGHFREQ = 100
// (MHz) are the published ones; the way the frequency is measured is this
// design's own.
//
// Structure: a CNT_W-bit up counter clocked by clk1 (kept also in Gray code),
// a two-flop synchronizer that carries the Gray count into the clk domain,
// a window counter, a subtractor forming the edge count of the last window
// and two less-than comparators. The decision is carried back into the clk1
// domain by two flops on the falling edge of clk1, so that the gate opens and
// closes only while clk1 is low and sig_out has no glitches.
//
// Interface: clk (reference), clk1 (signal under test), reset (asynchronous,
// active high); sig_out (gated clk1), pass (decision, clk domain) and
// freq (edges counted in the last window, clk domain).
// Timing: the first decision is taken MAXFREQ clk cycles after reset; after
// that every MAXFREQ cycles. The counted value may be one or two edges off
// because of the synchronizer. Between reset and the first decision the gate
// is closed.
module freq_gate #(
  parameter fir_pkg::filter_type_e FTYPE = fir_pkg::FT_LOWPASS,
  parameter int unsigned MAXFREQ  = 200,
  parameter int unsigned LOWFREQ  = 50,
  parameter int unsigned HIGHFREQ = 100,
  parameter int unsigned CNT_W    = 32
) (
  input  logic             clk,
  input  logic             clk1,
  input  logic             reset,
  output logic             sig_out,
  output logic             pass,
  output logic [CNT_W-1:0] freq
);

  // ------------------------------------------------------- clk1 domain count
  logic [CNT_W-1:0] bin1, bin1_next, gray1;

  assign bin1_next = bin1 + 1'b1;

  always_ff @(posedge clk1 or posedge reset) begin
    if (reset) begin
      bin1  <= '0;
      gray1 <= '0;
    end else begin
      bin1  <= bin1_next;
      gray1 <= bin1_next ^ (bin1_next >> 1);
    end
  end

  // ----------------------------------------------- synchronizer into clk
  logic [CNT_W-1:0] gray_s1, gray_s2, bin_s;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      gray_s1 <= '0;
      gray_s2 <= '0;
    end else begin
      gray_s1 <= gray1;
      gray_s2 <= gray_s1;
    end
  end

  always_comb begin
    bin_s[CNT_W-1] = gray_s2[CNT_W-1];
    for (int i = CNT_W - 2; i >= 0; i--) bin_s[i] = bin_s[i+1] ^ gray_s2[i];
  end

  // ------------------------------------------------- measurement window
  localparam int unsigned WIN_W = $clog2(MAXFREQ + 1);

  logic [WIN_W-1:0] wcnt;
  logic             win_end;
  logic [CNT_W-1:0] last_bin, edges;
  logic             below_low, below_high, above_low, above_high, pass_next;

  assign win_end = (wcnt == WIN_W'(MAXFREQ - 1));
  assign edges   = bin_s - last_bin;

  // The two comparators of the pass rules.
  assign below_low  = edges < CNT_W'(LOWFREQ);
  assign above_high = CNT_W'(HIGHFREQ) < edges;
  assign above_low  = CNT_W'(LOWFREQ) < edges;
  assign below_high = edges < CNT_W'(HIGHFREQ);

  always_comb begin
    unique case (FTYPE)
      fir_pkg::FT_LOWPASS:  pass_next = below_low;
      fir_pkg::FT_HIGHPASS: pass_next = above_high;
      fir_pkg::FT_BANDPASS: pass_next = above_low && below_high;
      default:              pass_next = !(above_low && below_high);
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      wcnt     <= '0;
      last_bin <= '0;
      freq     <= '0;
      pass     <= 1'b0;
    end else if (win_end) begin
      wcnt     <= '0;
      last_bin <= bin_s;
      freq     <= edges;
      pass     <= pass_next;
    end else begin
      wcnt     <= wcnt + 1'b1;
    end
  end

  // --------------------------------------- glitch-free gate in clk1 domain
  logic en_s1, en_s2;

  always_ff @(negedge clk1 or posedge reset) begin
    if (reset) begin
      en_s1 <= 1'b0;
      en_s2 <= 1'b0;
    end else begin
      en_s1 <= pass;
      en_s2 <= en_s1;
    end
  end

  assign sig_out = clk1 & en_s2;

  initial begin
    assert (MAXFREQ >= 2 && LOWFREQ <= HIGHFREQ)
      else $error("freq_gate: need MAXFREQ >= 2 and LOWFREQ <= HIGHFREQ");
  end

endmodule
