// tb_pha_histogram - clears the histogram, feeds random pulse heights
// (some piled up, some back to back into the same bin, some negative or at
// full scale) and compares every bin read back with a model histogram,
// together with the accepted and rejected counters and the clear time.
module tb_pha_histogram;
  import tdaq_pkg::*;
  localparam int BINS = 4096;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic in_valid = 0, in_pileup = 0, clear = 0, busy;
  sample_t in_height = 0;
  logic [11:0] rd_addr = 0;
  logic [31:0] rd_data, n_accepted, n_rejected;
  int checks = 0, failures = 0;
  int model [BINS];
  int acc = 0, rej = 0;

  pha_histogram dut (.*);

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

  task automatic clear_hist();
    int n;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    n = 0;
    while (busy) begin @(negedge clk); n++; end
    chk(n == BINS - 1 || n == BINS, $sformatf("clear took %0d clocks", n));
    for (int i = 0; i < BINS; i++) model[i] = 0;
    acc = 0; rej = 0;
  endtask

  task automatic compare_all();
    for (int i = 0; i < BINS; i++) begin
      @(negedge clk) rd_addr = 12'(i);
      @(negedge clk);
      chk(rd_data == 32'(model[i]), $sformatf("bin %0d got %0d exp %0d", i, rd_data, model[i]));
    end
    chk(n_accepted == 32'(acc) && n_rejected == 32'(rej), "counters");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // mark some bins non-zero first so that clear is visible
    for (int i = 0; i < 50; i++) begin
      @(negedge clk) in_valid = 1; in_height = sample_t'(i * 600); in_pileup = 0;
    end
    @(negedge clk) in_valid = 0;
    clear_hist();
    for (int i = 0; i < 6000; i++) begin
      int h, b;
      bit p;
      case ($urandom_range(0, 9))
        0: h = -int'($urandom_range(1, 30000));
        1: h = 32767;
        2: h = 800 + $urandom_range(0, 7);            // crowd into one bin
        default: h = $urandom_range(0, 32767);
      endcase
      p = ($urandom_range(0, 4) == 0);
      b = (h < 0) ? 0 : h >> 3;
      @(negedge clk);
      in_valid = 1; in_height = sample_t'(h); in_pileup = p;
      if (p) rej++; else begin acc++; model[b]++; end
      if ($urandom_range(0, 1)) begin @(negedge clk) in_valid = 0; end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(negedge clk);
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
