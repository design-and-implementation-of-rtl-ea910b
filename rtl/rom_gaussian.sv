// rom_gaussian: 8192 x 8 ROM with one Gaussian pulse,
//   U(i) = floor(255 * exp(-(A*i)**2 / X**2)),  i = -4095 .. +4096,
// with X = 1365 (about 4096/3, so the pulse falls to exp(-9) at the edges)
// and A = 1. Address k holds sample i = k - (2**(B-1) - 1), so the peak of
// 255 sits at address 4095 and the pulse is centred in the period. The table
// is filled when the design is elaborated. A and X are parameters so the
// narrower pulse (A = 2) can be built too. Interface: clk, addr (B bits),
// data (M bits). Timing: synchronous read, one clock from addr to data (this
// design's choice).
module rom_gaussian #(
  parameter int unsigned B = 13,
  parameter int unsigned M = 8,
  parameter int unsigned A = 1,
  parameter int unsigned X = 1365
) (
  input  logic         clk,
  input  logic [B-1:0] addr,
  output logic [M-1:0] data
);

  localparam int unsigned DEPTH = 1 << B;
  localparam int CENTER = (1 << (B-1)) - 1;

  function automatic logic [M-1:0] sample(int k);
    real t, v;
    t = real'(A) * real'(k - CENTER) / real'(X);
    v = $floor(real'((1 << M) - 1) * $exp(-(t * t)));
    return M'($rtoi(v));
  endfunction

  logic [M-1:0] mem [DEPTH];

  initial for (int k = 0; k < DEPTH; k++) mem[k] = sample(k);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
