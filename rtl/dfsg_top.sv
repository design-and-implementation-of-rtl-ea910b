// dfsg_top: digital function signals generator. One 24-bit phase accumulator,
// stepped by the frequency code L every 50 MHz clock, addresses four 8192 x 8
// waveform ROMs (sine, triangle, Gaussian, sinc) with its top 13 bits. A
// sawtooth and a square generator, each with its own accumulator fed by the
// same L, make their waves from the phase alone, and a 60-bit pseudo-noise
// shift register makes white noise. A seven-channel selector passes the wave
// chosen by wave_sel (dfsg_pkg::wave_t) to dac_data, the 8-bit unsigned code
// for an external DAC. Output frequency is f_out = 50 MHz * L / 2**24, a step
// of 2.98 Hz; L = 335544 gives 1 MHz.
// Interface: clk (50 MHz), rst (synchronous, active high, clears every
// accumulator, the noise register and the output), freq_code L, wave_sel,
// dac_data. Timing: dac_data is registered; a ROM wave reaches it two clocks
// after its accumulator phase (ROM read, then selector), the sawtooth, square
// and noise waves take the same two clocks. The structure and sizes follow the
// generator's description; the shared address bus, the reset style and the
// register stages are this design's choice.
module dfsg_top
  import dfsg_pkg::*;
#(
  parameter int unsigned N = ACC_W,
  parameter int unsigned B = ADDR_W,
  parameter int unsigned M = SMP_W,
  parameter int unsigned K = PN_K
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] freq_code,
  input  logic [2:0]   wave_sel,
  output logic [M-1:0] dac_data
);

  logic [N-1:0] phase;
  logic [B-1:0] rom_addr;
  logic [M-1:0] ch [N_WAVES];
  logic [M-1:0] noise_q;
  logic         prbs;

  phase_accumulator #(.N(N), .B(B)) u_acc (
    .clk, .rst, .freq_code, .phase, .addr(rom_addr)
  );

  rom_sin        #(.B(B), .M(M)) u_sin   (.clk, .addr(rom_addr), .data(ch[WAVE_SIN]));
  rom_triangular #(.B(B), .M(M)) u_tri   (.clk, .addr(rom_addr), .data(ch[WAVE_TRI]));
  rom_gaussian   #(.B(B), .M(M)) u_gauss (.clk, .addr(rom_addr), .data(ch[WAVE_GAUSS]));
  rom_sinc       #(.B(B), .M(M)) u_sinc  (.clk, .addr(rom_addr), .data(ch[WAVE_SINC]));

  square_gen   #(.N(N), .M(M)) u_square (.clk, .rst, .freq_code, .data(ch[WAVE_SQUARE]));
  sawtooth_gen #(.N(N), .M(M)) u_saw    (.clk, .rst, .freq_code, .data(ch[WAVE_SAWTOOTH]));

  noise_gen #(.K(K), .TAP_A(K), .TAP_B(K-1), .M(M)) u_noise (
    .clk, .rst, .data(noise_q), .prbs
  );

  // Register the noise sample so all seven channels reach the selector with
  // the same delay.
  always_ff @(posedge clk) begin
    if (rst) ch[WAVE_NOISE] <= '0;
    else     ch[WAVE_NOISE] <= noise_q;
  end

  wave_mux #(.M(M), .CH(N_WAVES)) u_mux (
    .clk, .rst, .ch, .sel(wave_sel), .data(dac_data)
  );

endmodule
