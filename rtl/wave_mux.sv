// wave_mux: seven-channel, 8-bit waveform selector. It passes the channel
// chosen by sel (see dfsg_pkg::wave_t) to the DAC output register; the
// unused select code 7 gives 0. Interface: clk, rst (synchronous, active
// high, clears the output), ch (seven samples, indexed by the wave_t code),
// sel, data. Timing: the output is registered, one clock after ch and sel.
// The seven 8-bit channels follow the generator's description; the encoding,
// the output register and its reset are this design's choice.
module wave_mux
  import dfsg_pkg::*;
#(
  parameter int unsigned M = SMP_W,
  parameter int unsigned CH = N_WAVES
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] ch [CH],
  input  logic [2:0]   sel,
  output logic [M-1:0] data
);

  logic [M-1:0] pick;

  always_comb begin
    if (int'(sel) < int'(CH)) pick = ch[sel];
    else                      pick = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) data <= '0;
    else     data <= pick;
  end

endmodule
