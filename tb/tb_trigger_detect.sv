// tb_trigger_detect - drives random pulse-like sample words (with gaps
// between words) through trigger_detect and compares the trigger flag,
// index and time stamp with a sample-by-sample crossing model. Also checks
// the external, software and off sources and the one-clock latency.
module tb_trigger_detect;
  import tdaq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  trig_src_e src = TRIG_AUTO;
  sample_t threshold = 16'sd1000;
  logic ext_trig = 0, sw_trig = 0, in_valid = 0;
  logic [2:0] sample_step = 3'd2;
  sample_word_t in_word = '0;
  ts_t in_ts = 0;
  logic out_valid, trig;
  sample_word_t out_word;
  ts_t out_ts, trig_ts;
  logic [1:0] trig_idx;
  int checks = 0, failures = 0, n_trig = 0;
  sample_t prev = 0;

  trigger_detect dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one word; expected trigger computed from the model
  task automatic send(sample_word_t w, bit exp_trig, int exp_idx);
    @(negedge clk);
    in_valid = 1; in_word = w; in_ts = in_ts + 8;
    @(negedge clk);
    in_valid = 0;
    chk(out_valid && out_word == w && out_ts == in_ts, "word passes through");
    chk(trig == exp_trig, $sformatf("trig %0d exp %0d (w=%p)", trig, exp_trig, w));
    if (exp_trig) begin
      chk(trig_idx == 2'(exp_idx), $sformatf("idx %0d exp %0d", trig_idx, exp_idx));
      chk(trig_ts == in_ts + ts_t'(exp_idx * 2), "trig_ts");
      n_trig++;
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // auto trigger on random waveform
    for (int i = 0; i < 3000; i++) begin
      sample_word_t w;
      bit et;
      int ei;
      et = 0; ei = 0;
      for (int k = 0; k < WORD_SAMPLES; k++) begin
        w[k] = sample_t'($signed(12'($urandom)) ) ;   // -2048..2047 around threshold
        w[k] = sample_t'(int'(w[k]) + 1000);
      end
      for (int k = 0; k < WORD_SAMPLES; k++) begin
        sample_t p;
        p = (k == 0) ? prev : w[k-1];
        if (!et && p < threshold && w[k] >= threshold) begin et = 1; ei = k; end
      end
      prev = w[WORD_SAMPLES-1];
      send(w, et, ei);
    end
    chk(n_trig > 100, "auto triggers seen");
    // external trigger: pulse between words triggers the next word at index 0
    src = TRIG_EXTERNAL;
    @(negedge clk) ext_trig = 1;
    @(negedge clk) ext_trig = 0;
    send('{default: 16'sd5000}, 1, 0);
    send('{default: 16'sd0}, 0, 0);
    // software trigger
    src = TRIG_SOFTWARE;
    @(negedge clk) sw_trig = 1;
    @(negedge clk) sw_trig = 0;
    send('{default: 16'sd0}, 1, 0);
    @(negedge clk) ext_trig = 1;          // wrong source: ignored
    @(negedge clk) ext_trig = 0;
    send('{default: 16'sd0}, 0, 0);
    // off
    src = TRIG_OFF;
    send('{16'sd5000, 16'sd0, 16'sd5000, 16'sd0}, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
