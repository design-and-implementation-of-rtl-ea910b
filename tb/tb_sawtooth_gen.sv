// tb_sawtooth_gen: runs sawtooth_gen with several frequency codes and checks
// every output sample against a model accumulator: the output must equal the
// top 8 bits of the phase one clock earlier, so it rises and drops back to 0
// once per period. At L = 335544 (1 MHz at 50 MHz) it must drop 99 or 100
// times in 5000 clocks. Reset must clear it.
module tb_sawtooth_gen;
  logic        clk = 1'b0;
  logic        rst;
  logic [23:0] freq_code;
  logic [7:0]  data;
  logic [23:0] model, model_d;
  int checks = 0, failures = 0;

  sawtooth_gen dut (.clk, .rst, .freq_code, .data);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Applies one clock and checks the output; returns 1 on a drop.
  task automatic step(logic r, logic [23:0] l, output bit dropped);
    logic [7:0] prev_data;
    prev_data = data;
    rst = r; freq_code = l;
    @(posedge clk);
    model_d = r ? 24'd0 : model;
    model   = r ? 24'd0 : 24'(model + l);
    @(negedge clk);
    checks++;
    if (data !== model_d[23:16]) begin
      failures++;
      if (failures < 10) $display("saw %0d expected %0d", data, model_d[23:16]);
    end
    dropped = (data < prev_data);
  endtask

  initial begin
    bit d;
    int drops;
    @(negedge clk);
    model = '0; model_d = '0;
    step(1'b1, 24'd0, d);
    for (int i = 0; i < 2000; i++) step(1'b0, 24'd123457, d);
    step(1'b1, 24'd0, d);
    checks++;
    if (data != 8'd0) begin failures++; $display("reset did not clear"); end
    drops = 0;
    for (int i = 0; i < 5000; i++) begin
      step(1'b0, 24'd335544, d);
      if (d) drops++;
    end
    checks++;
    if (drops < 99 || drops > 100) begin
      failures++;
      $display("1 MHz: %0d periods in 5000 clocks", drops);
    end
    for (int i = 0; i < 2000; i++) step(1'b0, 24'($urandom), d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
