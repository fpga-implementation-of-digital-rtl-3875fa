// fir_fpga_top: the filter set of the design, two parts side by side.
//
// 1. Sample filters. Four 37-tap linear-phase FIR filters in folded direct
//    form (fir_direct_form) share one stream of signed 8-bit samples x_in /
//    x_valid and produce, one clock later, the lowpass, highpass, bandpass and
//    bandstop outputs. Their Kaiser-window coefficients are in fir_pkg.
// 2. Signal gates. Four frequency-selective gates (freq_gate) share the
//    reference clock clk and the square-wave input clk1 and drive the outputs
//    lowpass, highpass, bandpass and bandreject: each output follows clk1 when
//    the frequency of clk1 is in its pass band (below 50 MHz, above 100 MHz,
//    between 50 and 100 MHz, outside 50..100 MHz, for clk = 200 MHz) and is
//    low otherwise. in_band shows the four pass decisions in the same order and
//    clk1_mhz the number of clk1 edges counted in the last 1 us window.
//
// Both parts use clk and the asynchronous, active-high reset. The ports clk,
// clk1, reset and the gate outputs follow the published block diagrams; the
// sample ports and the status outputs are this design's own.
module fir_fpga_top (
  input  logic        clk,
  input  logic        reset,
  // sample filters
  input  logic signed [fir_pkg::DATA_W-1:0] x_in,
  input  logic        x_valid,
  output logic signed [29:0] y_lowpass,
  output logic signed [29:0] y_highpass,
  output logic signed [29:0] y_bandpass,
  output logic signed [29:0] y_bandstop,
  output logic        y_valid,
  // signal gates
  input  logic        clk1,
  output logic        lowpass,
  output logic        highpass,
  output logic        bandpass,
  output logic        bandreject,
  output logic [3:0]  in_band,
  output logic [31:0] clk1_mhz
);

  // y_* width: DATA_W + 1 + COEF_W + clog2(19) = 8 + 1 + 16 + 5 = 30 bits.
  localparam int unsigned ACC_W = fir_pkg::DATA_W + 1 + fir_pkg::COEF_W + $clog2(fir_pkg::HALF);

  initial begin
    assert (ACC_W == 30) else $error("fir_fpga_top: output width must be %0d", ACC_W);
  end

  logic [3:0] vld;

  fir_direct_form #(.COEFS(fir_pkg::COEF_LOWPASS)) u_fir_lp (
    .clk, .reset, .x_in, .x_valid, .y_out(y_lowpass), .y_valid(vld[0]));

  fir_direct_form #(.COEFS(fir_pkg::COEF_HIGHPASS)) u_fir_hp (
    .clk, .reset, .x_in, .x_valid, .y_out(y_highpass), .y_valid(vld[1]));

  fir_direct_form #(.COEFS(fir_pkg::COEF_BANDPASS)) u_fir_bp (
    .clk, .reset, .x_in, .x_valid, .y_out(y_bandpass), .y_valid(vld[2]));

  fir_direct_form #(.COEFS(fir_pkg::COEF_BANDSTOP)) u_fir_bs (
    .clk, .reset, .x_in, .x_valid, .y_out(y_bandstop), .y_valid(vld[3]));

  // The four filters see the same strobe, so their valid outputs are equal.
  assign y_valid = vld[0];

  always_comb begin
    assert (reset || vld == {4{vld[0]}}) else $error("fir_fpga_top: filter valids differ");
  end

  // All four gates measure the same clk1 with identical counters; the lowpass
  // gate's count is brought out and the others must agree with it.
  logic [31:0] count_hp, count_bp, count_bs;

  always_comb begin
    assert (reset || (count_hp == clk1_mhz && count_bp == clk1_mhz && count_bs == clk1_mhz))
      else $error("fir_fpga_top: gate frequency counts differ");
  end

  freq_gate #(.FTYPE(fir_pkg::FT_LOWPASS)) u_gate_lp (
    .clk, .clk1, .reset, .sig_out(lowpass), .pass(in_band[0]), .freq(clk1_mhz));

  freq_gate #(.FTYPE(fir_pkg::FT_HIGHPASS)) u_gate_hp (
    .clk, .clk1, .reset, .sig_out(highpass), .pass(in_band[1]), .freq(count_hp));

  freq_gate #(.FTYPE(fir_pkg::FT_BANDPASS)) u_gate_bp (
    .clk, .clk1, .reset, .sig_out(bandpass), .pass(in_band[2]), .freq(count_bp));

  freq_gate #(.FTYPE(fir_pkg::FT_BANDSTOP)) u_gate_bs (
    .clk, .clk1, .reset, .sig_out(bandreject), .pass(in_band[3]), .freq(count_bs));

endmodule
