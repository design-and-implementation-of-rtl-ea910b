// rom_sinc: 8192 x 8 ROM with one sinc pulse,
//   U(i) = 128 + floor(127 * sinc(x)),  x = pi*i / (4096*T),  i = -4095 .. +4096,
// where sinc(x) = sin(pi*x)/(pi*x) is the normalised sinc, sinc(0) = 1. With
// T = 1 the argument pi*x runs over about +/-pi**2, so the pulse shows its main
// lobe and about three side lobes each way; samples range 100 .. 255.
// Address k holds sample i = k - (2**(B-1) - 1), so the peak sits at address
// 4095. T is given as the integer ratio T_NUM/T_DEN (1/1 by default, 2/3 for
// the wider variant). The table is filled when the design is elaborated.
// Interface: clk, addr (B bits), data (M bits). Timing: synchronous read,
// one clock from addr to data (this design's choice).
module rom_sinc #(
  parameter int unsigned B     = 13,
  parameter int unsigned M     = 8,
  parameter int unsigned T_NUM = 1,
  parameter int unsigned T_DEN = 1
) (
  input  logic         clk,
  input  logic [B-1:0] addr,
  output logic [M-1:0] data
);

  localparam int unsigned DEPTH = 1 << B;
  localparam int CENTER = (1 << (B-1)) - 1;
  localparam int HALF   = 1 << (M-1);

  function automatic logic [M-1:0] sample(int k);
    real pi, x, s, v;
    pi = 3.14159265358979323846;
    x  = pi * real'(k - CENTER) * real'(T_DEN) / (real'(1 << (B-1)) * real'(T_NUM));
    if (k == CENTER) s = 1.0;
    else             s = $sin(pi * x) / (pi * x);
    v = $floor(real'(HALF - 1) * s);
    return M'(HALF + $rtoi(v));
  endfunction

  logic [M-1:0] mem [DEPTH];

  initial for (int k = 0; k < DEPTH; k++) mem[k] = sample(k);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
