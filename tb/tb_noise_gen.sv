// tb_noise_gen: checks the 60-bit pseudo-noise generator against a model
// shift register (XNOR of bits 60 and 59 shifted in) for 20000 clocks, checks
// that its output is not stuck and that ones and zeros of the serial bit are
// balanced, and that reset restarts the sequence. A second instance with
// K = 4 (taps 4 and 3) must repeat with the maximal period 2**4 - 1 = 15,
// which shows the feedback gives a maximal-length sequence.
module tb_noise_gen;
  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  data;
  logic        prbs;
  logic [3:0]  data4;
  logic        prbs4;
  logic [59:0] model;
  int checks = 0, failures = 0;

  noise_gen dut (.clk, .rst, .data, .prbs);
  noise_gen #(.K(4), .TAP_A(4), .TAP_B(3), .M(4)) dut4 (
    .clk, .rst, .data(data4), .prbs(prbs4)
  );

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, changes, period;
    logic [7:0] prev;
    logic [3:0] first4;
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    model = '0;
    ones = 0; changes = 0;
    for (int i = 0; i < 20000; i++) begin
      prev = data;
      @(posedge clk);
      model = dfsg_ref_pkg::ref_pn_step(model);
      @(negedge clk);
      checks++;
      if (data !== model[7:0]) begin
        failures++;
        if (failures < 10) $display("noise %h expected %h", data, model[7:0]);
      end
      if (model[0]) ones++;
      if (data != prev) changes++;
    end
    checks++;
    if (ones < 2000 || ones > 18000 || changes < 5000) begin
      failures++;
      $display("noise not white: %0d ones, %0d changes", ones, changes);
    end
    // Restart after reset.
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    checks++;
    if (data != 8'd0) begin failures++; $display("reset did not clear"); end
    // Period of the 4-bit version.
    first4 = data4;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (data4 != first4 && period < 100);
    checks++;
    if (period != 15) begin
      failures++;
      $display("K=4 period %0d, expected 15", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
