// tb_phase_accumulator: drives phase_accumulator at its default 24/13 bits
// with random frequency codes, resets and code changes, and compares phase
// and addr every clock with a model accumulator kept in the testbench. It
// then checks the output rate: with L = 335544 and a 50 MHz clock the phase
// must wrap 99 or 100 times in 5000 clocks (1 MHz), and with L = 1 it must
// advance by exactly one per clock (the 3 Hz resolution step).
module tb_phase_accumulator;
  logic        clk = 1'b0;
  logic        rst;
  logic [23:0] freq_code;
  logic [23:0] phase;
  logic [12:0] addr;
  logic [23:0] model;
  int checks = 0, failures = 0;

  phase_accumulator dut (.clk, .rst, .freq_code, .phase, .addr);

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
    model = r ? 24'd0 : 24'(model + l);
    @(negedge clk);
    checks++;
    if (phase !== model || addr !== model[23:11]) begin
      failures++;
      if (failures < 10) $display("phase %h addr %h, expected %h", phase, addr, model);
    end
  endtask

  initial begin
    int wraps;
    logic [23:0] prev;
    @(negedge clk);
    model = '0;
    step(1'b1, 24'd0);
    for (int i = 0; i < 3000; i++) begin
      step(($urandom_range(99, 0) == 0), 24'($urandom));
    end
    // Rate at 1 MHz.
    step(1'b1, 24'd0);
    wraps = 0;
    for (int i = 0; i < 5000; i++) begin
      prev = model;
      step(1'b0, 24'd335544);
      if (phase < prev) wraps++;
    end
    checks++;
    if (wraps < 99 || wraps > 100) begin
      failures++;
      $display("1 MHz: %0d wraps in 5000 clocks", wraps);
    end
    // Resolution step L = 1.
    step(1'b1, 24'd0);
    for (int i = 0; i < 100; i++) step(1'b0, 24'd1);
    checks++;
    if (phase != 24'd100) begin
      failures++;
      $display("L=1: phase %0d after 100 clocks", phase);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
