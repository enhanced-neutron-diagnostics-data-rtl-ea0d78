// tb_data_manager - four channels of sample words with random triggers,
// random pulse results and TDC hits go into data_manager while the DDR and
// link ports apply random back-pressure, including a long stall that makes
// the FIFOs overflow. The DDR stream is parsed into records and every
// record is matched, per source and in order, with what was offered:
// header fields, all sample words of raw records, result and TDC payloads.
// Records that never arrive must equal the drop counter; addresses must be
// consecutive and every processed word must also cross the link.
module tb_data_manager;
  import tdaq_pkg::*;
  localparam int RW = 16;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic raw_enable = 1;
  logic [3:0] ch_valid = 0, ch_trig = 0, res_valid = 0, res_pileup = 0, res_tail_high = 0;
  sample_word_t [3:0] ch_word = '0;
  logic [3:0][1:0] ch_trig_idx = '0;
  ts_t [3:0] ch_trig_ts = '0, res_ts = '0;
  sample_t [3:0] res_height = '0;
  logic [3:0][31:0] res_total = '0, res_tail = '0;
  logic tdc_valid = 0;
  logic [1:0] tdc_channel = 0;
  logic [31:0] tdc_time = 0;
  ts_t now_ts = 0;
  logic ddr_valid, ddr_ready = 1, link_valid, link_last, link_ready = 1;
  logic [26:0] ddr_addr;
  logic [63:0] ddr_data, link_data;
  logic [31:0] dropped, records;
  int checks = 0, failures = 0;

  data_manager dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // expected records per source: list of 64-bit words
  typedef logic [63:0] rec_t[$];
  rec_t exp_q [9][$];
  int attempts = 0, received = 0, skipped = 0, raw_drops = 0;

  // per-channel stimulus state
  int wcnt [4];
  int cap_left [4];           // words still in an open raw record
  int res_gap [4];
  bit just_done [4];       // a record ended in the previous clock
  rec_t open_rec [4];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus, applied at negedge
  bit stall = 0, quiet = 0;
  int tdc_gap = 0;
  always @(negedge clk) if (rst_n) begin
    now_ts = now_ts + 4;
    ddr_ready  = stall ? 0 : ($urandom_range(0, 9) != 0);
    link_ready = ($urandom_range(0, 4) != 0);
    for (int c = 0; c < 4; c++) begin
      bit blocked;
      blocked = just_done[c];
      just_done[c] = 0;
      ch_valid[c] = ($urandom_range(0, 3) == 0);
      ch_trig[c] = 0;
      res_valid[c] = 0;
      if (ch_valid[c]) begin
        for (int k = 0; k < 4; k++) ch_word[c][k] = sample_t'({2'(c), 14'(wcnt[c] * 4 + k)});
        ch_trig[c] = !quiet && ($urandom_range(0, 31) == 0);
        ch_trig_idx[c] = 2'($urandom);
        ch_trig_ts[c] = ts_t'({$urandom, $urandom});
        if (cap_left[c] > 0) begin
          open_rec[c].push_back(ch_word[c]);
          cap_left[c]--;
          if (cap_left[c] == 0) begin exp_q[c].push_back(open_rec[c]); just_done[c] = 1; end
        end else if (ch_trig[c] && !blocked) begin
          open_rec[c] = {};
          open_rec[c].push_back({4'h1, 2'(c), ch_trig_idx[c], 8'(RW), ch_trig_ts[c]});
          open_rec[c].push_back(ch_word[c]);
          cap_left[c] = RW - 1;
          attempts++;
        end
        wcnt[c]++;
      end
      if (res_gap[c] > 0) res_gap[c]--;
      else if (!quiet && $urandom_range(0, 59) == 0) begin
        rec_t r;
        r = {};
        res_valid[c] = 1; res_gap[c] = 2;
        res_pileup[c] = 1'($urandom); res_tail_high[c] = 1'($urandom);
        res_height[c] = sample_t'($urandom); res_ts[c] = ts_t'({$urandom, $urandom});
        res_total[c] = $urandom_range(0, 1) ? 32'($urandom) : 32'($urandom_range(0, 100000));
        res_tail[c]  = 32'($urandom_range(0, 100000)) - 32'd50000;
        r.push_back({4'h2, 2'(c), res_pileup[c], res_tail_high[c], 8'h0, res_ts[c]});
        r.push_back({res_height[c], sat24(res_tail[c]), sat24(res_total[c])});
        exp_q[4 + c].push_back(r);
        attempts++;
      end
    end
    tdc_valid = 0;
    if (tdc_gap > 0) tdc_gap--;
    else if (!quiet && $urandom_range(0, 29) == 0) begin
      rec_t r;
      r = {};
      tdc_valid = 1; tdc_gap = 1;
      tdc_channel = 2'($urandom); tdc_time = $urandom;
      r.push_back({4'h3, tdc_channel, 10'h0, now_ts});
      r.push_back({32'h0, tdc_time});
      exp_q[8].push_back(r);
      attempts++;
    end
  end

  function automatic logic [23:0] sat24(logic [31:0] v);
    if ($signed(v) > 32'sd8388607) return 24'h7fffff;
    if ($signed(v) < -32'sd8388608) return 24'h800000;
    return v[23:0];
  endfunction

  // output parser, sampled at posedge
  rec_t cur;
  int need = 0, src = 0;
  logic [26:0] next_addr = 0;
  always @(posedge clk) if (rst_n) begin
    // a raw record refused for lack of FIFO room is not captured
    for (int c = 0; c < 4; c++) if (dut.drop[c]) begin cap_left[c] = 0; skipped++; raw_drops++; end
    if (link_valid && link_ready)
      chk(ddr_valid && ddr_ready && link_data == ddr_data, "link word equals DDR word");
    if (ddr_valid && ddr_ready) begin
      chk(ddr_addr == next_addr, "consecutive addresses");
      next_addr = next_addr + 1;
      if (need == 0) begin
        cur = {};
        case (ddr_data[63:60])
          4'h1: begin need = 1 + int'(ddr_data[55:48]); src = int'(ddr_data[59:58]); end
          4'h2: begin need = 2; src = 4 + int'(ddr_data[59:58]); end
          4'h3: begin need = 2; src = 8; end
          default: begin chk(0, $sformatf("bad header %h", ddr_data)); need = 1; src = -1; end
        endcase
      end
      if (src >= 4) chk(link_valid && link_ready, "processed word also on link");
      cur.push_back(ddr_data);
      need--;
      if (need == 0 && src >= 0) begin
        bit found;
        rec_t e;
        found = 0;
        if (src == 8) chk(link_last, "link_last on record end");
        while (!found && exp_q[src].size() > 0) begin
          e = exp_q[src].pop_front();
          if (e == cur) found = 1; else skipped++;
        end
        chk(found, $sformatf("record from source %0d matched (%h)", src, cur[0]));
        received++;
      end
    end
  end

  initial begin
    for (int c = 0; c < 4; c++) begin wcnt[c] = 0; cap_left[c] = 0; res_gap[c] = 0; just_done[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    $display("phase 1 done");
    chk(dropped == 0, "no drops without stall");
    stall = 1;
    repeat (3000) @(posedge clk);
    stall = 0;
    repeat (20000) @(posedge clk);
    chk(dropped > 0 && raw_drops > 0, "stall caused drops of raw and other records");
    // stop input, drain
    quiet = 1;
    repeat (5000) @(posedge clk);
    // open raw records never completed are not expected
    for (int c = 0; c < 4; c++) if (cap_left[c] > 0) attempts--;
    for (int s = 0; s < 9; s++) skipped += exp_q[s].size();
    chk(received + int'(dropped) == attempts, $sformatf("received %0d + dropped %0d vs offered %0d", received, dropped, attempts));
    chk(skipped == int'(dropped), $sformatf("missing %0d vs dropped %0d", skipped, dropped));
    chk(records == 32'(received), "record counter");
    $display("received %0d dropped %0d", received, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
