// tb_pulse_height_detector - a random sample stream with pulses and random
// trigger positions goes through pulse_height_detector as four-sample
// words, once with each shaping filter (moving average, triangular,
// trapezoidal), the design reset in between. A sample-by-sample model
// (4-sample average, optionally averaged again over 4 or 8 samples; 64-sample
// window; pile-up when a trigger falls inside an open window) predicts every
// result: height, pile-up flag, trigger time and the clock it appears in.
module tb_pulse_height_detector;
  import tdaq_pkg::*;
  localparam int WIN = 64, MA = 4, NW = 4000;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  filt_e filt = FILT_MA;
  logic in_valid = 0, trig = 0;
  sample_word_t in_word = '0;
  logic [1:0] trig_idx = 0;
  ts_t trig_ts = 0;
  logic res_valid, res_pileup;
  sample_t res_height;
  ts_t res_ts;
  int checks = 0, failures = 0, n_pile = 0, n_clean = 0;

  pulse_height_detector dut (.*);

  sample_t x [NW*4];
  bit      tw [NW];
  int      ti [NW];
  typedef struct { int h; bit p; longint ts; int endw; } res_t;
  res_t exp_q[$];
  int words_sent = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  // first-stage average and filter output of the model
  function automatic int m1f(int n);
    int a = 0;
    if (n < 0) return 0;
    for (int j = 0; j < MA; j++) a += (n - j >= 0) ? int'(x[n-j]) : 0;
    return a >>> 2;
  endfunction
  function automatic int filtf(int n);
    int a = 0;
    case (filt)
      FILT_TRI:  begin for (int j = 0; j < 4; j++) a += m1f(n - j); return a >>> 2; end
      FILT_TRAP: begin for (int j = 0; j < 8; j++) a += m1f(n - j); return a >>> 3; end
      default:   return m1f(n);
    endcase
  endfunction

  task automatic build();
    int rem, peak, ts;
    bit active, pile;
    int amp, age;
    amp = 0; age = 1000;
    for (int w = 0; w < NW; w++) begin
      tw[w] = ($urandom_range(0, 19) == 0);
      ti[w] = $urandom_range(0, 3);
      for (int k = 0; k < 4; k++) begin
        int n = w * 4 + k;
        if (tw[w] && k == ti[w]) begin amp = $urandom_range(200, 20000); age = 0; end
        x[n] = sample_t'(($urandom_range(0, 60) - 30) + ((age < 40) ? amp * (40 - age) / 40 : 0));
        age++;
      end
    end
    active = 0; rem = 0; peak = 0; pile = 0; ts = 0;
    for (int n = 0; n < NW * 4; n++) begin
      int w, k, s, m;
      bit th;
      w = n / 4; k = n % 4;
      th = tw[w] && k == ti[w];
      m = filtf(n);
      if (active && rem > 0) begin
        if (th) pile = 1;
        if (m > peak) peak = m;
        rem--;
        if (rem == 0) begin
          exp_q.push_back('{peak, pile, ts, w});
          active = 0;
        end
      end else if (th) begin
        active = 1; rem = WIN - 1; peak = m; pile = 0; ts = n;
      end
    end
  endtask

  always @(negedge clk) if (res_valid) begin
    res_t e;
    chk(exp_q.size() > 0, "unexpected result");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      chk(int'(res_height) == e.h && res_pileup == e.p && res_ts == ts_t'(e.ts),
          $sformatf("got h=%0d p=%0d ts=%0d exp h=%0d p=%0d ts=%0d", res_height, res_pileup, res_ts, e.h, e.p, e.ts));
      chk(words_sent == e.endw + 1, $sformatf("latency: after word %0d, expected %0d", words_sent - 1, e.endw));
      if (e.p) n_pile++; else n_clean++;
    end
  end

  initial begin
    for (int f = 0; f < 3; f++) begin
    filt = filt_e'(f);
    exp_q.delete();
    build();
    @(negedge clk) rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    words_sent = 0;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 4; k++) in_word[k] = x[w*4+k];
      trig = tw[w]; trig_idx = 2'(ti[w]); trig_ts = ts_t'(w * 4 + ti[w]);
      @(posedge clk) words_sent++;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk) in_valid = 0; trig = 0;
        @(posedge clk);
      end
    end
    @(negedge clk) in_valid = 0; trig = 0;
    repeat (5) @(posedge clk);
    chk(exp_q.size() == 0, "all results seen");
    chk(n_pile > 5 && n_clean > 20, $sformatf("pile-up %0d clean %0d", n_pile, n_clean));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
