// tb_dfsg_top: end-to-end test of the whole generator at its default sizes
// (24-bit accumulator, 8192-sample ROMs, 60-bit noise register). A model in
// the testbench tracks the phase and the noise register clock by clock and
// predicts every DAC code two clocks after its phase, using the waveform
// formulas of dfsg_ref_pkg. The test selects each of the seven waves (and the
// unused code) in turn, changes the frequency code (1 MHz, 5 MHz, random
// codes and the 3 Hz step L = 1), resets the generator in mid-run, and checks
// the 1 MHz output rate and the 5 V peak of the DAC model. It counts each
// mechanism (wave switch per wave, frequency change, reset, sawtooth wrap,
// 1-LSB resolution step) and fails if one never happened.
module tb_dfsg_top;
  import dfsg_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [23:0] freq_code = '0;
  logic [2:0]  wave_sel = '0;
  logic [7:0]  dac_data;
  real         vout;

  dfsg_top dut (.clk, .rst, .freq_code, .wave_sel, .dac_data);
  dac8_model u_dac (.code(dac_data), .vout);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sel [8];
  int n_freq = 0, n_reset = 0, n_wrap = 0, n_lsb = 0;
  real vmax = 0.0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state after each rising edge, and its two previous values.
  logic [23:0] p_m = '0, p_d1 = '0, p_d2 = '0;
  logic [59:0] s_m = '0, s_d1 = '0, s_d2 = '0;
  logic [2:0]  sel_e = '0;
  logic        rst_e = 1'b1, rst_d1 = 1'b1;

  always @(posedge clk) begin
    p_d2 = p_d1; p_d1 = p_m;
    p_m  = rst ? 24'd0 : 24'(p_m + freq_code);
    s_d2 = s_d1; s_d1 = s_m;
    s_m  = rst ? 60'd0 : ref_pn_step(s_m);
    sel_e  = wave_sel;
    rst_d1 = rst_e;
    rst_e  = rst;
  end

  function automatic int expect_code(logic [2:0] sel, logic [23:0] p, logic [59:0] s);
    case (sel)
      3'd0: return ref_sin(int'(p[23:11]));
      3'd1: return ref_tri(int'(p[23:11]));
      3'd2: return ref_gauss(int'(p[23:11]), 1365.0);
      3'd3: return ref_sinc(int'(p[23:11]), 1.0);
      3'd4: return p[23] ? 255 : 0;
      3'd5: return int'(p[23:16]);
      3'd6: return int'(s[7:0]);
      default: return 0;
    endcase
  endfunction

  // Check of every output sample.
  always @(negedge clk) begin
    int e;
    if (!rst_d1 || rst_e) begin
      e = rst_e ? 0 : expect_code(sel_e, p_d2, s_d2);
      checks++;
      if (int'(dac_data) != e) begin
        failures++;
        if (failures < 20)
          $display("t=%0t sel %0d: dac %0d expected %0d", $time, sel_e, dac_data, e);
      end
      if (vout > vmax) vmax = vout;
    end
  end

  task automatic run(int cycles);
    repeat (cycles) @(negedge clk);
  endtask

  task automatic select(int w);
    if (wave_sel != 3'(w)) n_sel[w]++;
    wave_sel = 3'(w);
  endtask

  task automatic set_freq(logic [23:0] l);
    if (freq_code != l) n_freq++;
    freq_code = l;
  endtask

  task automatic pulse_reset();
    rst = 1'b1;
    n_reset++;
    run(2);
    rst = 1'b0;
  endtask

  initial begin
    int drops, ups;
    logic [7:0] prev;
    foreach (n_sel[i]) n_sel[i] = 0;
    run(3);
    rst = 1'b0;
    n_reset++;
    set_freq(24'd335544);                    // 1 MHz
    for (int w = 1; w < 8; w++) begin select(w); run(400); end
    select(0); run(400);

    // Output rate at 1 MHz: sawtooth periods and sine upward crossings.
    select(5); run(3);
    drops = 0; prev = dac_data;
    for (int i = 0; i < 5000; i++) begin
      run(1);
      if (dac_data < prev) begin drops++; n_wrap++; end
      prev = dac_data;
    end
    checks++;
    if (drops < 99 || drops > 100) begin
      failures++; $display("sawtooth: %0d periods in 5000 clocks at 1 MHz", drops);
    end
    select(0); run(3);
    ups = 0; prev = dac_data;
    for (int i = 0; i < 5000; i++) begin
      run(1);
      if (prev < 8'd128 && dac_data >= 8'd128) ups++;
      prev = dac_data;
    end
    checks++;
    if (ups < 99 || ups > 101) begin
      failures++; $display("sine: %0d periods in 5000 clocks at 1 MHz", ups);
    end

    // 5 MHz and random codes on every wave, with a reset in mid-run.
    set_freq(24'd1677722);
    for (int w = 0; w < 7; w++) begin select(w); run(300); end
    for (int k = 0; k < 20; k++) begin
      set_freq(24'($urandom));
      select(int'($urandom_range(6, 0)));
      run(200);
      if (k == 10) pulse_reset();
    end

    // Resolution: L = 1 moves the sawtooth by one code every 2**16 clocks.
    select(5);
    pulse_reset();
    set_freq(24'd1);
    run(65536 + 4);
    checks++;
    if (dac_data != 8'd1) begin
      failures++; $display("L=1: sawtooth %0d after 65536 clocks", dac_data);
    end else n_lsb++;

    checks++;
    if (vmax < 4.99 || vmax > 5.0 + 1e-9) begin
      failures++; $display("DAC peak %f V, expected 5 V", vmax);
    end

    for (int w = 0; w < 8; w++) begin
      checks++;
      if (n_sel[w] == 0) begin failures++; $display("wave %0d never selected", w); end
    end
    checks++;
    if (n_freq < 3 || n_reset < 2 || n_wrap == 0 || n_lsb == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("switches sin %0d tri %0d gauss %0d sinc %0d square %0d saw %0d noise %0d unused %0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_sel[4], n_sel[5], n_sel[6], n_sel[7]);
    $display("frequency changes %0d, resets %0d, sawtooth wraps %0d, peak %f V",
             n_freq, n_reset, n_wrap, vmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
