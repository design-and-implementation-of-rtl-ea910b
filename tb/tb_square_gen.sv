// tb_square_gen: runs square_gen and checks every sample against a model
// accumulator (output is 255 when the phase MSB of the previous clock is 1,
// else 0). At L = 335544 (1 MHz at 50 MHz) it counts rising edges over 5000
// clocks (99 or 100 expected) and the share of high samples (close to 50 %).
// Reset must force the output low.
module tb_square_gen;
  logic        clk = 1'b0;
  logic        rst;
  logic [23:0] freq_code;
  logic [7:0]  data;
  logic [23:0] model, model_d;
  int checks = 0, failures = 0;

  square_gen dut (.clk, .rst, .freq_code, .data);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic r, logic [23:0] l);
    rst = r; freq_code = l;
    @(posedge clk);
    model_d = r ? 24'd0 : model;
    model   = r ? 24'd0 : 24'(model + l);
    @(negedge clk);
    checks++;
    if (data !== (model_d[23] ? 8'hFF : 8'h00)) begin
      failures++;
      if (failures < 10) $display("square %0d, phase msb %0d", data, model_d[23]);
    end
  endtask

  initial begin
    int rises, highs;
    logic [7:0] prev;
    @(negedge clk);
    model = '0; model_d = '0;
    step(1'b1, 24'd0);
    for (int i = 0; i < 3000; i++) step(1'b0, 24'd98765);
    step(1'b1, 24'd0);
    checks++;
    if (data != 8'd0) begin failures++; $display("reset did not clear"); end
    rises = 0; highs = 0;
    for (int i = 0; i < 5000; i++) begin
      prev = data;
      step(1'b0, 24'd335544);
      if (data == 8'hFF && prev == 8'h00) rises++;
      if (data == 8'hFF) highs++;
    end
    checks++;
    if (rises < 99 || rises > 100 || highs < 2450 || highs > 2550) begin
      failures++;
      $display("1 MHz: %0d rising edges, %0d high samples in 5000", rises, highs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
