// tb_wave_mux: feeds seven random 8-bit channels and random select codes
// (all eight, code 7 included) to wave_mux and checks that one clock later
// the output holds the selected channel, 0 for code 7, and 0 under reset.
module tb_wave_mux;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] ch [7];
  logic [2:0] sel;
  logic [7:0] data;
  logic [7:0] expv;
  int checks = 0, failures = 0;
  int seen [8];

  wave_mux dut (.clk, .rst, .ch, .sel, .data);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk);
    rst = 1'b1; sel = '0;
    foreach (ch[i]) ch[i] = 8'(i * 17 + 3);
    @(negedge clk);
    checks++;
    if (data != 8'd0) begin failures++; $display("reset did not clear"); end
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      foreach (ch[i]) ch[i] = 8'($urandom);
      sel = 3'($urandom);
      expv = (sel == 3'd7) ? 8'd0 : ch[sel];
      seen[sel]++;
      @(negedge clk);
      checks++;
      if (data !== expv) begin
        failures++;
        if (failures < 10) $display("sel %0d: got %h expected %h", sel, data, expv);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("select %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
