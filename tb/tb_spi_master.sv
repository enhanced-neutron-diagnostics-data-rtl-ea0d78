// tb_spi_master - an SPI mode-0 slave model on every select line checks
// random frames of 1..32 bits: the bits the slave receives, the bits the
// master reads back, which select was driven, the SCLK half period and the
// frame duration of 2*CLK_DIV*len + 2 clocks from acceptance to rsp_valid.
module tb_spi_master;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic req_valid = 0, req_ready, rsp_valid, sclk, mosi, miso;
  logic [1:0] req_cs = 0;
  logic [5:0] req_len = 0;
  logic [31:0] req_data = 0, rsp_data;
  logic [3:0] cs_n;
  int checks = 0, failures = 0;

  spi_master #(.N_CS(4), .CLK_DIV(DIV)) dut (.*);

  // slave model
  logic [31:0] slave_out, slave_in;
  int          bit_cnt, sel, last_edge, min_half;
  longint      cyc = 0;
  always @(posedge clk) cyc++;
  assign miso = slave_out[31];
  always @(negedge (&cs_n)) begin bit_cnt = 0; slave_in = 0; end
  always @(posedge sclk) begin
    slave_in = {slave_in[30:0], mosi};
    bit_cnt++;
    for (int i = 0; i < 4; i++) if (!cs_n[i]) sel = i;
  end
  always @(negedge sclk) slave_out = slave_out << 1;
  always @(sclk) begin
    if (cyc - last_edge < min_half) min_half = int'(cyc - last_edge);
    last_edge = int'(cyc);
  end

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(cs_n == 4'hf && sclk == 0, "idle bus");
    for (int i = 0; i < 200; i++) begin
      int len, cs, n;
      logic [31:0] d, s, mask;
      len = (i < 2) ? (i == 0 ? 1 : 32) : $urandom_range(1, 32);
      cs  = $urandom_range(0, 3);
      d   = $urandom;
      s   = $urandom;
      mask = (len == 32) ? 32'hffffffff : (32'h1 << len) - 1;
      slave_out = s << (32 - len);
      bit_cnt = 0; slave_in = 0; sel = -1; min_half = 1000;
      @(negedge clk);
      req_valid = 1; req_cs = 2'(cs); req_len = 6'(len); req_data = d;
      @(posedge clk);
      chk(req_ready, "ready when idle");
      @(negedge clk) req_valid = 0;
      n = 1;
      while (!rsp_valid) begin @(negedge clk); n++; end
      chk(n == 2 * DIV * len + 2, $sformatf("frame of %0d bits took %0d clocks", len, n));
      chk(bit_cnt == len, $sformatf("bits clocked %0d exp %0d", bit_cnt, len));
      chk((slave_in & mask) == (d & mask), $sformatf("mosi %h exp %h", slave_in & mask, d & mask));
      chk(rsp_data == (s & mask), $sformatf("miso %h exp %h", rsp_data, s & mask));
      chk(sel == cs, "select line");
      chk(min_half >= DIV, $sformatf("sclk half period %0d", min_half));
      @(negedge clk) chk(cs_n == 4'hf, "select released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
