// square_gen: square wave made straight from a phase accumulator, with no
// memory. The most significant phase bit is 0 for the first half of every
// period and 1 for the second, so it is a 50 % duty square of period
// T_out = 2**N / (F_clk * L); it drives the output to full scale (2**M - 1)
// or to 0. The generator has its own N-bit accumulator.
// Interface: clk, rst (synchronous, active high), freq_code L, data (M bits).
// Timing: data is registered and follows the phase of the previous clock;
// after rst it is 0. Which half is high and the output register are this
// design's choice.
module square_gen #(
  parameter int unsigned N = 24,
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] freq_code,
  output logic [M-1:0] data
);

  logic [N-1:0] phase;
  logic         msb;

  phase_accumulator #(.N(N), .B(1)) u_acc (
    .clk, .rst, .freq_code, .phase, .addr(msb)
  );

  always_ff @(posedge clk) begin
    if (rst) data <= '0;
    else     data <= {M{msb}};
  end

endmodule
