// rom_sin: 8192 x 8 ROM with one period of the sine,
//   U(i) = 128 + floor(127 * sin(2*pi*i / 2**B)),  i = 0 .. 2**B-1,
// i.e. the +/-127 sine of the generator's formula raised by an offset of 128 so
// every sample is unsigned (range 1..255). The table is filled from that
// formula when the design is elaborated, so no data file is needed.
// Interface: clk, addr (B bits, the accumulator's top bits), data (M bits).
// Timing: synchronous read, data follows addr by one clock as a block-RAM ROM
// does; the one-cycle read is this design's choice.
module rom_sin #(
  parameter int unsigned B = 13,
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic [B-1:0] addr,
  output logic [M-1:0] data
);

  localparam int unsigned DEPTH = 1 << B;
  localparam int HALF = 1 << (M-1);

  function automatic logic [M-1:0] sample(int i);
    real v;
    v = $floor(real'(HALF - 1) * $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(DEPTH)));
    return M'(HALF + $rtoi(v));
  endfunction

  logic [M-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = sample(i);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
