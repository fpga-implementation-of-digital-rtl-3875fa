// nibble_multiplier: signed sample-by-coefficient multiplier of the FIR filter.
//
// The product is formed from nibbles: the coefficient b is cut into 4-bit
// digits, each digit multiplies the sample a, and the partial products are
// shifted by 4 bits per digit and added. All digits but the top one are
// unsigned; the top digit carries the sign of b (radix-16 two's complement),
// so the result is the exact signed product a * b. Only the block name comes
// from the filter's block diagram; the nibble-wise arrangement is this
// design's reading of that name. With a constant coefficient, synthesis
// reduces each digit product to a few shifted adds.
//
// Interface: a is an A_W-bit signed sample, b a B_W-bit signed coefficient
// (B_W a multiple of 4), p the (A_W+B_W)-bit signed product. Combinational.
module nibble_multiplier #(
  parameter int unsigned A_W = 9,
  parameter int unsigned B_W = 16
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int unsigned DIGITS = B_W / 4;
  localparam int unsigned P_W    = A_W + B_W;

  initial begin
    assert (B_W % 4 == 0 && B_W >= 4)
      else $error("nibble_multiplier: B_W must be a positive multiple of 4");
  end

  always_comb begin
    logic signed [P_W-1:0] acc;
    logic signed [P_W-1:0] a_ext;
    logic signed [4:0]     digit;
    a_ext = P_W'(a);
    acc   = '0;
    for (int unsigned d = 0; d < DIGITS; d++) begin
      if (d == DIGITS - 1) digit = 5'(signed'(b[4*d +: 4]));    // sign-carrying top digit
      else                 digit = {1'b0, b[4*d +: 4]};         // unsigned lower digit
      acc = acc + ((a_ext * P_W'(digit)) <<< (4 * d));
    end
    p = acc;
  end

endmodule
