// tb_adc_compensation - random samples, gains and offsets through
// adc_compensation, compared with ((x - off) * gain) >> 14, saturated,
// one clock later.
module tb_adc_compensation;
  import tdaq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic in_valid = 0, out_valid;
  sample_t in_sample = 0, out_sample;
  logic [15:0] gain = 16384;
  logic signed [15:0] offset = 0;
  int checks = 0, failures = 0;

  adc_compensation dut (.*);

  function automatic int ref_model(int x, int g, int o);
    longint p;
    p = (longint'(x) - longint'(o)) * longint'(g);
    p = p >>> 14;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return int'(p);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int x, g, o;
      x = $signed(16'($urandom));
      g = (i < 1000) ? 16384 + int'($urandom_range(0, 2000)) - 1000 : int'($urandom_range(0, 65535));
      o = $signed(16'($urandom_range(0, 4000))) - 2000;
      if (i == 0) begin x = 32767; g = 65535; o = -2000; end   // saturate high
      if (i == 1) begin x = -32768; g = 65535; o = 2000; end   // saturate low
      @(negedge clk);
      in_valid = 1; in_sample = sample_t'(x); gain = 16'(g); offset = 16'(o);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(out_sample) != ref_model(x, g, o)) begin
        failures++;
        if (failures < 10) $display("x=%0d g=%0d o=%0d got %0d exp %0d", x, g, o, out_sample, ref_model(x, g, o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
