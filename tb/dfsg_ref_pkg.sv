// dfsg_ref_pkg: reference values for the function-generator testbenches,
// computed here from the waveform formulas and not taken from the RTL.
// Sample index conventions: sine and triangle use address i = 0 .. 8191
// directly; the Gaussian and sinc pulses use i = addr - 4095, so address 4095
// is the centre of the pulse.
package dfsg_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int ref_sin(int addr);
    real a;
    a = 2.0 * PI * real'(addr) / 8192.0;
    return 128 + $rtoi($floor(127.0 * $sin(a)));
  endfunction

  function automatic int ref_tri(int addr);
    if (addr <= 4095) return addr / 16;
    return 511 - addr / 16;
  endfunction

  function automatic int ref_gauss(int addr, real x);
    real i;
    i = real'(addr - 4095);
    return $rtoi($floor(255.0 * $exp(-(i * i) / (x * x))));
  endfunction

  // Normalised sinc of y = pi*i/(4096*T): sin(pi*y)/(pi*y).
  function automatic int ref_sinc(int addr, real t);
    real y, s;
    y = PI * real'(addr - 4095) / (4096.0 * t);
    if (addr == 4095) s = 1.0;
    else s = $sin(PI * y) / (PI * y);
    return 128 + $rtoi($floor(127.0 * s));
  endfunction

  // One step of the 60-bit XNOR shift register, taps 60 and 59.
  function automatic logic [59:0] ref_pn_step(logic [59:0] s);
    return {s[58:0], ~(s[59] ^ s[58])};
  endfunction

endpackage
