// noise_gen: digital pseudo-noise generator. A K = 60 bit shift register is
// clocked at the sample rate; the bit shifted in is NOT(q[59] XOR q[58])
// (an XOR gate followed by a NOT gate, taps of x**60 + x**59 + 1), which gives
// the maximal sequence length 2**60 - 1 clocks, about 731 years at 50 MHz.
// The XNOR form locks up only in the all-ones state, so reset clears the
// register to zero, a state on the maximal cycle. The white-noise sample is the
// lowest M bits of the register. Interface: clk, rst (synchronous, active
// high), data (M bits), prbs (the bit shifted in). Timing: one new bit per clock.
// K and the XOR+NOT feedback follow the generator's description; the tap
// positions, the reset state and the choice of output bits are this design's.
module noise_gen #(
  parameter int unsigned K = 60,
  parameter int unsigned TAP_A = 60,
  parameter int unsigned TAP_B = 59,
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst,
  output logic [M-1:0] data,
  output logic         prbs
);

  logic [K-1:0] sr;

  assign prbs = ~(sr[TAP_A-1] ^ sr[TAP_B-1]);

  always_ff @(posedge clk) begin
    if (rst) sr <= '0;
    else     sr <= {sr[K-2:0], prbs};
  end

  assign data = sr[M-1:0];

endmodule
