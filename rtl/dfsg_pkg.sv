// dfsg_pkg: sizes and the waveform-select encoding shared by the function
// generator. The accumulator width (24), ROM address width (13), sample width
// (8) and the 50 MHz clock are the generator's stated sizes; the numeric
// codes of the select input are this design's own choice.
package dfsg_pkg;

  // Phase accumulator width n.
  localparam int unsigned ACC_W  = 24;
  // ROM address width b: 2**13 = 8192 samples per period.
  localparam int unsigned ADDR_W = 13;
  // Sample width m, also the DAC input width.
  localparam int unsigned SMP_W  = 8;
  // Reference clock in Hz.
  localparam int unsigned F_CLK_HZ = 50_000_000;
  // Frequency code for a 1 MHz output: 2**24 * 1e6 / 50e6, truncated.
  localparam logic [ACC_W-1:0] L_1MHZ = 24'd335544;

  // Length of the pseudo-noise shift register.
  localparam int unsigned PN_K = 60;

  typedef logic [SMP_W-1:0]  sample_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [ACC_W-1:0]  phase_t;

  // Waveform select, seven channels.
  typedef enum logic [2:0] {
    WAVE_SIN      = 3'd0,
    WAVE_TRI      = 3'd1,
    WAVE_GAUSS    = 3'd2,
    WAVE_SINC     = 3'd3,
    WAVE_SQUARE   = 3'd4,
    WAVE_SAWTOOTH = 3'd5,
    WAVE_NOISE    = 3'd6
  } wave_t;

  localparam int unsigned N_WAVES = 7;

endpackage
