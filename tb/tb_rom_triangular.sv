// tb_rom_triangular: reads all 8192 addresses of rom_triangular in a random order and
// compares each sample, one clock after its address, with the value computed
// from the waveform formula in dfsg_ref_pkg, then checks a few samples whose
// values are worked out by hand (peaks, zero crossings, ends). Also checks
// the one-clock read latency.
module tb_rom_triangular;
  import dfsg_ref_pkg::*;

  logic       clk = 1'b0;
  logic [12:0] addr;
  logic [7:0]  data;
  int checks = 0, failures = 0;
  int order [8192];

  rom_triangular dut (.clk, .addr, .data);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic spot(int a, int expv);
    @(negedge clk) addr = 13'(a);
    @(negedge clk);
    checks++;
    if (int'(data) != expv) begin
      failures++;
      $display("spot addr %0d: got %0d expected %0d", a, data, expv);
    end
  endtask

  initial begin
    int a, j, tmp, lo, hi;
    lo = 999; hi = -1;
    for (int i = 0; i < 8192; i++) order[i] = i;
    for (int i = 8191; i > 0; i--) begin
      j = int'($urandom_range(i, 0));
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
    addr = '0;
    @(negedge clk);
    for (int i = 0; i < 8192; i++) begin
      a = order[i];
      addr = 13'(a);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(data) != ref_tri(a)) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0d expected %0d", a, data, ref_tri(a));
      end
      if (int'(data) < lo) lo = int'(data);
      if (int'(data) > hi) hi = int'(data);
    end
    $display("rom_triangular range %0d .. %0d", lo, hi);
    // Latency: data must still hold the old sample right after addr changes.
    @(negedge clk) addr = 13'd100;
    @(negedge clk) addr = 13'd5000;
    #1;
    checks++;
    a = 100;
    if (int'(data) != ref_tri(a)) begin
      failures++;
      $display("read latency is not one clock");
    end

    spot(0, 0); spot(15, 0); spot(16, 1); spot(4095, 255); spot(4096, 255); spot(8191, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
