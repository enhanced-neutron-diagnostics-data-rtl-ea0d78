// tb_psd_unit - a random sample stream with pulses of two decay times and
// random trigger positions goes through psd_unit as four-sample words. A
// sample-by-sample model (64-sample window from the trigger, tail from
// position tail_start) predicts total and tail charge, the ratio flag,
// the trigger time and the clock each result appears in.
module tb_psd_unit;
  import tdaq_pkg::*;
  localparam int WIN = 64, NW = 4000;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic in_valid = 0, trig = 0;
  sample_word_t in_word = '0;
  logic [1:0] trig_idx = 0;
  ts_t trig_ts = 0;
  logic [15:0] tail_start = 16'd12, ratio_limit = 16'd100;
  logic res_valid, res_tail_high;
  logic signed [31:0] res_total, res_tail;
  ts_t res_ts;
  int checks = 0, failures = 0, n_pile = 0, n_clean = 0, n_hi = 0;

  psd_unit dut (.*);

  sample_t x [NW*4];
  bit      tw [NW];
  int      ti [NW];
  typedef struct { int tot; int tail; bit p; longint ts; int endw; } res_t;
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
  task automatic build();
    int rem, tot, tail, ts, pos;
    bit active, pile;
    int amp, age, tau;
    amp = 0; age = 1000;
    for (int w = 0; w < NW; w++) begin
      tw[w] = ($urandom_range(0, 19) == 0);
      ti[w] = $urandom_range(0, 3);
      for (int k = 0; k < 4; k++) begin
        int n = w * 4 + k;
        if (tw[w] && k == ti[w]) begin amp = $urandom_range(200, 20000); age = 0; tau = $urandom_range(0, 1) ? 12 : 40; end
        x[n] = sample_t'(($urandom_range(0, 60) - 30) + ((age < tau) ? amp * (tau - age) / tau : 0));
        age++;
      end
    end
    active = 0; rem = 0; tot = 0; tail = 0; pile = 0; ts = 0; pos = 0;
    for (int n = 0; n < NW * 4; n++) begin
      int w, k;
      bit th;
      w = n / 4; k = n % 4;
      th = tw[w] && k == ti[w];
      if (active && rem > 0) begin
        if (th) pile = 1;
        pos++;
        tot += int'(x[n]);
        if (pos >= int'(tail_start)) tail += int'(x[n]);
        rem--;
        if (rem == 0) begin
          exp_q.push_back('{tot, tail, pile, ts, w});
          active = 0;
        end
      end else if (th) begin
        active = 1; rem = WIN - 1; pos = 0; tot = int'(x[n]); tail = (tail_start == 0) ? int'(x[n]) : 0;
        pile = 0; ts = n;
      end
    end
  endtask

  always @(negedge clk) if (res_valid) begin
    res_t e;
    chk(exp_q.size() > 0, "unexpected result");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      chk(res_total == e.tot && res_tail == e.tail && res_ts == ts_t'(e.ts),
          $sformatf("got tot=%0d tail=%0d ts=%0d exp %0d %0d %0d", res_total, res_tail, res_ts, e.tot, e.tail, e.ts));
      chk(res_tail_high == (longint'(e.tail) * 256 >= longint'(e.tot) * longint'(ratio_limit)), "ratio flag");
      if (res_tail_high) n_hi++;
      chk(words_sent == e.endw + 1, $sformatf("latency: after word %0d, expected %0d", words_sent - 1, e.endw));
      if (e.p) n_pile++; else n_clean++;
    end
  end

  initial begin
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
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
    chk(n_hi > 5 && n_hi < n_pile + n_clean - 5, $sformatf("tail-high %0d of %0d", n_hi, n_pile + n_clean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
