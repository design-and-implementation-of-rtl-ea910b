// dac8_model: behavioural model of the external 8-bit DAC that follows the
// generator. It maps the unsigned code 0 .. 255 linearly onto 0 .. VREF volts
// (5 V full scale) with no settling time. For simulation only.
module dac8_model #(
  parameter real VREF = 5.0
) (
  input  logic [7:0] code,
  output real        vout
);
  always_comb vout = real'(code) * VREF / 255.0;
endmodule
