// sawtooth_gen: sawtooth wave made straight from a phase accumulator, with no
// memory. The accumulator ramps 0 .. 2**N-1 and wraps, so its top M bits are
// already a rising ramp that drops back to 0 once per period,
// f_out = F_clk * L / 2**N. The generator has its own N-bit accumulator.
// Interface: clk, rst (synchronous, active high), freq_code L, data (M bits,
// unsigned). Timing: data is registered and shows the phase of the previous
// clock; after rst it starts at 0. The choice of the top M bits and the output
// register are this design's own.
module sawtooth_gen #(
  parameter int unsigned N = 24,
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] freq_code,
  output logic [M-1:0] data
);

  logic [N-1:0] phase;
  logic [M-1:0] ramp;

  phase_accumulator #(.N(N), .B(M)) u_acc (
    .clk, .rst, .freq_code, .phase, .addr(ramp)
  );

  always_ff @(posedge clk) begin
    if (rst) data <= '0;
    else     data <= ramp;
  end

endmodule
