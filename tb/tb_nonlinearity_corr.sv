// tb_nonlinearity_corr - checks the code-to-sample conversion, the table
// write and the one-clock latency of nonlinearity_corr against a reference
// model kept in the testbench.
module tb_nonlinearity_corr;
  import tdaq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic in_valid = 0, out_valid, tbl_we = 0;
  logic [11:0] in_code = 0, tbl_addr = 0;
  logic signed [7:0] tbl_data = 0;
  sample_t out_sample;
  int checks = 0, failures = 0;
  logic signed [7:0] model [4096];

  nonlinearity_corr dut (.*);

  function automatic sample_t expect_of(logic [11:0] c);
    int v;
    v = (int'(c) - 2048) * 16 + int'(model[c]);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return sample_t'(v);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // program a few corrections, including the saturating corner
    for (int i = 0; i < 64; i++) begin
      logic [11:0] a;
      logic signed [7:0] d;
      a = (i == 0) ? 12'hfff : 12'($urandom_range(0, 4095));
      d = (i == 0) ? 8'sd127 : 8'($urandom);
      @(negedge clk);
      tbl_we = 1; tbl_addr = a; tbl_data = d; model[a] = d;
    end
    @(negedge clk) tbl_we = 0;
    // stream codes, compare one clock later
    for (int i = 0; i < 2000; i++) begin
      logic [11:0] c;
      c = (i < 3) ? 12'(i == 0 ? 12'hfff : (i == 1 ? 0 : 2048)) : 12'($urandom_range(0, 4095));
      @(negedge clk);
      in_valid = 1; in_code = c;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_sample !== expect_of(c)) begin
        failures++;
        if (failures < 10) $display("code %0d: got %0d exp %0d", c, out_sample, expect_of(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
