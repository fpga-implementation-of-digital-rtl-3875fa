// fir_direct_form: linear-phase FIR filter in direct form, folded by default.
//
// Computes y(n) = sum_{k=0..N} h(k) * x(n-k) for an odd number of taps
// TAPS = N+1 with a symmetric impulse response h(k) = h(N-k). The structure is
// the direct form: a chain of N delay_ram stages holds x(n-1)..x(n-N), and the
// current input x(n) is used directly as the first tap.
//
// FOLDED = 1 (default): because of the symmetry the taps are folded in pairs
// before multiplying:
//   M = N/2 byte_adders form x(n-k) + x(n-N+k), k = 0..M-1,
//   M+1 nibble_multipliers multiply these sums and the centre tap x(n-M)
//   by h(0)..h(M),
//   M byte_adders sum the M+1 products in a binary tree,
// so the filter uses N delay stages, N adders and M+1 multipliers.
// FOLDED = 0: the unfolded form, one nibble_multiplier per tap (N+1 of them,
// h(M+1)..h(N) mirrored from h(M-1)..h(0)) and N byte_adders in the tree.
// Both give identical outputs. The datapath is exact (no rounding): pre-sums
// have DATA_W+1 bits, products DATA_W+1+COEF_W bits and the tree ACC_W bits,
// wide enough for any input.
//
// Interface:
//   x_in, x_valid  signed input sample and its strobe; a sample is accepted at
//                  each rising clk edge with x_valid = 1 (one per clock at most).
//   y_out, y_valid filter output for the sample accepted at the previous edge.
//                  y_out has 15 fraction bits for Q1.15 coefficients:
//                  y = y_out / 2^15.
//   reset          asynchronous, active high; clears the sample history and
//                  the output.
// Timing: y_out/y_valid are registered and appear one clock after the sample;
// the whole sum is computed combinationally in that clock cycle, so the filter
// runs at one output per clock.
// The coefficient values are parameters (COEFS holds h(0)..h(M)); their
// defaults are the 37-tap Kaiser lowpass of fir_pkg. The direct form, the
// block names and the counts of delays, adders and multipliers follow the
// published design; the widths, the exact arithmetic, the tree shape, the
// valid strobes and the reset are choices of this design.
module fir_direct_form #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned HALF_P = (TAPS + 1) / 2,
  parameter logic signed [COEF_W-1:0] COEFS [HALF_P] = fir_pkg::COEF_LOWPASS,
  parameter int unsigned ACC_W  = DATA_W + 1 + COEF_W + $clog2(HALF_P),
  parameter bit          FOLDED = 1'b1
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                     x_valid,
  output logic signed [ACC_W-1:0]  y_out,
  output logic                     y_valid
);

  localparam int unsigned N     = TAPS - 1;    // filter order = delay stages
  localparam int unsigned M     = N / 2;       // pre-adders; M+1 multipliers
  localparam int unsigned PRE_W = DATA_W + 1;
  localparam int unsigned PRD_W = PRE_W + COEF_W;

  initial begin
    assert (TAPS % 2 == 1 && TAPS >= 3)
      else $error("fir_direct_form: TAPS must be odd and at least 3");
    assert (HALF_P == M + 1)
      else $error("fir_direct_form: HALF_P must be (TAPS+1)/2");
  end

  // ---------------------------------------------------------------- delay line
  // tap[0] = x(n), tap[k] = x(n-k)
  logic [DATA_W-1:0] tap [TAPS];

  assign tap[0] = x_in;

  for (genvar k = 1; k < TAPS; k++) begin : g_delay
    delay_ram #(.W(DATA_W)) u_stage (
      .clk  (clk),
      .reset(reset),
      .en   (x_valid),
      .d    (tap[k-1]),
      .q    (tap[k])
    );
  end

  // Products entering the adder tree: M+1 when folded, N+1 when not.
  localparam int unsigned NPROD = FOLDED ? M + 1 : TAPS;

  logic signed [PRD_W-1:0] prod [NPROD];

  if (FOLDED) begin : g_folded
    // ----------------------------------------------------- symmetric folding
    logic signed [PRE_W-1:0] pre [M+1];

    for (genvar k = 0; k < M; k++) begin : g_fold
      byte_adder #(.W(PRE_W)) u_pre (
        .a  (PRE_W'(signed'(tap[k]))),
        .b  (PRE_W'(signed'(tap[N-k]))),
        .sum(pre[k])
      );
    end
    assign pre[M] = PRE_W'(signed'(tap[M]));

    // ----------------------------------------------------------- multipliers
    for (genvar k = 0; k <= M; k++) begin : g_mult
      nibble_multiplier #(.A_W(PRE_W), .B_W(COEF_W)) u_mul (
        .a(pre[k]),
        .b(COEFS[k]),
        .p(prod[k])
      );
    end
  end else begin : g_unfolded
    // ------------------------------------------- one multiplier for each tap
    for (genvar k = 0; k < TAPS; k++) begin : g_mult
      nibble_multiplier #(.A_W(PRE_W), .B_W(COEF_W)) u_mul (
        .a(PRE_W'(signed'(tap[k]))),
        .b(COEFS[(k <= M) ? k : N - k]),
        .p(prod[k])
      );
    end
  end

  // ------------------------------------------------------------- adder tree
  // Heap-ordered binary tree of 2*NPROD-1 nodes: node i (i < NPROD-1) adds
  // nodes 2i+1 and 2i+2; nodes NPROD-1..2*NPROD-2 are the products.
  // NPROD-1 adders in all.
  for (genvar i = 0; i < 2 * NPROD - 1; i++) begin : g_node
    logic signed [ACC_W-1:0] s;
    if (i >= NPROD - 1) begin : g_leaf
      assign s = ACC_W'(prod[i-(NPROD-1)]);
    end else begin : g_add
      byte_adder #(.W(ACC_W)) u_sum (
        .a  (g_node[2*i+1].s),
        .b  (g_node[2*i+2].s),
        .sum(s)
      );
    end
  end

  // ------------------------------------------------------------ output stage
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) y_out <= g_node[0].s;
    end
  end

endmodule
