// rom_triangular: 8192 x 8 ROM with one period of the triangle,
//   U(i) = floor(i/16)        for i = 0 .. 4095   (rising 0 .. 255)
//   U(i) = 511 - floor(i/16)  for i = 4096 .. 8191 (falling 255 .. 0)
// written here for general B and M as i >> (B-1-M) on the first half and
// (2**(M+1) - 1) - (i >> (B-1-M)) on the second. The table is filled when
// the design is elaborated. Interface: clk, addr (B bits), data (M bits).
// Timing: synchronous read, one clock from addr to data (this design's choice).
module rom_triangular #(
  parameter int unsigned B = 13,
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic [B-1:0] addr,
  output logic [M-1:0] data
);

  localparam int unsigned DEPTH = 1 << B;
  localparam int unsigned SHIFT = B - 1 - M;

  function automatic logic [M-1:0] sample(int i);
    int q;
    q = i >> SHIFT;
    if (i < int'(DEPTH / 2)) return M'(q);
    else                     return M'((2 ** (M+1) - 1) - q);
  endfunction

  logic [M-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = sample(i);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
