// tb_interleave_gearbox - every ADC sample carries its own cycle number and
// ADC index, so each output word can be checked sample by sample: channel
// grouping and time order per mode, word rate (one word every 4, 2 or 1
// clocks), time stamps (4 ticks per clock) and the time-base clear.
module tb_interleave_gearbox;
  import tdaq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  acq_mode_e mode = MODE_4CH;
  logic ts_clear = 0, in_valid = 0;
  sample_t [N_ADC-1:0] in_sample;
  logic    [N_ADC-1:0] ch_valid;
  sample_word_t [N_ADC-1:0] ch_word;
  ts_t [N_ADC-1:0] ch_ts;
  logic [2:0] sample_step;
  ts_t now_ts;
  int checks = 0, failures = 0;
  int unsigned t = 0;
  int words [N_ADC];
  longint last_t0 [N_ADC];

  interleave_gearbox dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  always_comb
    for (int a = 0; a < N_ADC; a++) in_sample[a] = sample_t'({1'b0, 13'(t), 2'(a)});

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  int settle = 0;   // clocks since the last mode change
  always @(posedge clk) settle <= settle + 1;

  always @(negedge clk) if (rst_n && settle > 2) begin
    for (int c = 0; c < N_ADC; c++) if (ch_valid[c]) begin
      int r;
      longint t0;
      r  = int'(adcs_per_channel(mode));
      t0 = longint'(ch_word[c][0][14:2]);
      chk(c < N_ADC / r, $sformatf("word on unused channel %0d", c));
      for (int k = 0; k < WORD_SAMPLES; k++) begin
        chk(int'(ch_word[c][k][1:0]) == c * r + k % r, $sformatf("ch%0d k%0d adc", c, k));
        chk(longint'(ch_word[c][k][14:2]) == ((t0 + k / r) & 13'h1fff), $sformatf("ch%0d k%0d time", c, k));
      end
      // time stamp: 4 ticks per clock; the sample pattern counts clocks too
      chk(ch_ts[c][14:2] == 13'(t0), $sformatf("ch%0d ts %0d vs %0d", c, ch_ts[c] >> 2, t0));
      chk(int'(sample_step) == 4 / r, "step");
      if (words[c] > 0) chk(((t0 - last_t0[c]) & 13'h1fff) == longint'(4 / r), $sformatf("ch%0d rate", c));
      last_t0[c] = t0;
      words[c]++;
    end
  end

  task automatic run_mode(acq_mode_e m, int cycles);
    @(negedge clk) mode = m;
    settle = 0;
    for (int c = 0; c < N_ADC; c++) words[c] = 0;
    repeat (cycles) @(posedge clk);
    for (int c = 0; c < N_ADC; c++) begin
      int r = int'(adcs_per_channel(m));
      if (c < N_ADC / r) chk(words[c] >= cycles * r / 4 - 4, $sformatf("mode %0d ch%0d words %0d", m, c, words[c]));
      else               chk(words[c] == 0, "unused channel silent");
    end
  endtask

  always @(posedge clk) if (rst_n) t <= t + 1;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1; in_valid = 1;
    // cycle counter in the testbench starts with the DUT's
    run_mode(MODE_4CH, 200);
    run_mode(MODE_2CH, 200);
    run_mode(MODE_1CH, 200);
    run_mode(MODE_4CH, 100);
    // time-base clear
    @(negedge clk) ts_clear = 1;
    @(negedge clk) ts_clear = 0;
    chk(now_ts == 0, "ts_clear");
    @(negedge clk) chk(now_ts == 4, "time base advances 4 ticks per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
