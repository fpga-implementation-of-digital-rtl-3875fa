// delay_ram: one stage of the FIR filter's tapped delay line.
//
// Each stage holds one past input sample. When a new sample is accepted
// (en = 1 at a rising clk edge) the stage loads the sample held by the stage
// before it, so a chain of N stages turns x(n) into x(n-1) .. x(n-N). The stage
// name follows the block diagram of the direct-form filter; in this design a
// stage is a W-bit register with an enable, which is all the diagram asks of it.
//
// Interface: d is the sample from the previous stage (or the filter input),
// q is the delayed sample, en marks the cycle in which a new input sample
// arrives. reset is asynchronous and active high and clears the stage to 0,
// so that the filter starts from an all-zero history.
// Timing: q takes the value of d one clock edge after en is seen high.
module delay_ram #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)   q <= '0;
    else if (en) q <= d;
  end

endmodule
