// tb_pulse_variants: builds the two alternative pulse tables, the sinc pulse
// with T = 2/3 and the Gaussian pulse with a = 2, and compares all 8192
// samples of each with the formulas of dfsg_ref_pkg. With T = 2/3 the sinc
// argument is 1.5 times larger (narrower main lobe, more side lobes); with
// a = 2 the Gaussian exponent is four times larger (half the width).
module tb_pulse_variants;
  import dfsg_ref_pkg::*;

  logic        clk = 1'b0;
  logic [12:0] addr = '0;
  logic [7:0]  d_sinc, d_gauss;
  int checks = 0, failures = 0;

  rom_sinc     #(.T_NUM(2), .T_DEN(3)) u_sinc  (.clk, .addr, .data(d_sinc));
  rom_gaussian #(.A(2))                u_gauss (.clk, .addr, .data(d_gauss));

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gaussian with a = 2 and x = 1365: exp(-(2*i)**2 / 1365**2).
  function automatic int ref_gauss_a2(int a);
    return ref_gauss(a, 1365.0 / 2.0);
  endfunction

  initial begin
    int half_w;
    half_w = 0;
    @(negedge clk);
    for (int a = 0; a < 8192; a++) begin
      addr = 13'(a);
      @(negedge clk);
      checks += 2;
      if (int'(d_sinc) != ref_sinc(a, 2.0 / 3.0)) begin
        failures++;
        if (failures < 10) $display("sinc T=2/3 addr %0d: %0d expected %0d", a, d_sinc, ref_sinc(a, 2.0 / 3.0));
      end
      if (int'(d_gauss) != ref_gauss_a2(a)) begin
        failures++;
        if (failures < 10) $display("gauss a=2 addr %0d: %0d expected %0d", a, d_gauss, ref_gauss_a2(a));
      end
      if (d_gauss >= 8'd128) half_w++;
    end
    // Full width at half height of exp(-(i/682.5)**2) is 2*682.5*sqrt(ln 2) = 1136.
    checks++;
    if (half_w < 1130 || half_w > 1142) begin
      failures++;
      $display("gauss a=2: %0d samples above half height", half_w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
