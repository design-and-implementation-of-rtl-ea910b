// phase_accumulator: the DDS phase register. Every clock the N-bit frequency
// code L is added to the N-bit phase, wrapping modulo 2**N, so the phase
// completes f_out = F_clk * L / 2**N cycles per second. The top B bits of the
// phase are the ROM read address. N = 24 and B = 13 are the generator's sizes;
// with a 50 MHz clock one step of L is 50e6 / 2**24 = 2.98 Hz.
// Interface: clk, synchronous active-high rst (clears the phase), freq_code L.
// Timing: phase and addr are registered outputs; a new L takes effect on the
// next clock edge, with no phase jump (phase-continuous switching). The
// synchronous reset and the continuous switching are this design's choice.
module phase_accumulator #(
  parameter int unsigned N = 24,
  parameter int unsigned B = 13
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] freq_code,
  output logic [N-1:0] phase,
  output logic [B-1:0] addr
);

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + freq_code;
  end

  assign addr = phase[N-1 -: B];

endmodule
