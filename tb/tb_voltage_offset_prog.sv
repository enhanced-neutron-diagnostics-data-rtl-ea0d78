// tb_voltage_offset_prog - voltage_offset_prog drives a real spi_master; an
// SPI slave model on the DAC select decodes the four 24-bit frames and
// checks command, channel order and codes. A load while busy is ignored.
module tb_voltage_offset_prog;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic load = 0, busy;
  logic [3:0][15:0] codes = '0;
  logic spi_req_valid, spi_req_ready, spi_rsp_valid;
  logic [1:0] spi_req_cs;
  logic [5:0] spi_req_len;
  logic [31:0] spi_req_data, rsp_data;
  logic sclk, mosi;
  logic [3:0] cs_n;
  int checks = 0, failures = 0;

  voltage_offset_prog dut (.*);
  spi_master #(.N_CS(4), .CLK_DIV(2)) u_spi (
    .clk, .rst_n, .req_valid(spi_req_valid), .req_ready(spi_req_ready),
    .req_cs(spi_req_cs), .req_len(spi_req_len), .req_data(spi_req_data),
    .rsp_valid(spi_rsp_valid), .rsp_data(rsp_data),
    .sclk, .mosi, .miso(1'b0), .cs_n
  );

  // DAC model: collects frames on select 0
  logic [31:0] sr;
  int nbits;
  logic [23:0] frames[$];
  always @(negedge cs_n[0]) begin sr = 0; nbits = 0; end
  always @(posedge sclk) if (!cs_n[0]) begin sr = {sr[30:0], mosi}; nbits++; end
  always @(posedge cs_n[0]) if (rst_n) begin
    checks++;
    if (nbits != 24) begin failures++; $display("FAIL frame of %0d bits", nbits); end
    frames.push_back(sr[23:0]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic program_and_check(logic [3:0][15:0] c);
    frames.delete();
    @(negedge clk) codes = c; load = 1;
    @(negedge clk) load = 0; codes = '1;       // later changes are not taken
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    repeat (20) @(negedge clk);
    load = 1;                                  // ignored while busy
    @(negedge clk) load = 0;
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (frames.size() != 4) begin failures++; $display("FAIL %0d frames", frames.size()); end
    for (int i = 0; i < frames.size() && i < 4; i++) begin
      checks++;
      if (frames[i] != {4'h3, 4'(i), c[i]}) begin
        failures++;
        $display("FAIL frame %0d %h exp %h", i, frames[i], {4'h3, 4'(i), c[i]});
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_and_check({16'h1234, 16'h8000, 16'hffff, 16'h0001});
    for (int r = 0; r < 5; r++)
      program_and_check({16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
