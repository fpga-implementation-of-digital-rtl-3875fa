// byte_adder: two-input signed adder of the FIR filter.
//
// The direct-form filter uses it twice over: to fold the symmetric taps
// together before the multipliers (x(n-k) + x(n-N+k)) and to sum the products
// in a binary tree. The name follows the block diagram of the filter; the
// width is a parameter of this design, and the caller gives operands already
// sign-extended to a width in which the sum cannot overflow.
//
// Interface: a and b are W-bit two's complement operands, sum = a + b, also
// W bits. Purely combinational.
module byte_adder #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] sum
);

  always_comb sum = a + b;

endmodule
