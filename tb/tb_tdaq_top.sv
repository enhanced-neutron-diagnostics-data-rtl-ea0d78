// tb_tdaq_top - end-to-end test of tdaq_top at its default parameters.
//
// The testbench plays the analogue front end: each logical channel carries
// a waveform of triangular pulses (fast or slow decay, some in close pairs),
// and every ADC samples the waveform of its channel at its own clock phase
// (0/90/180/270 degrees in the 1-channel mode, 0/180 in the 2-channel mode).
// The design runs in all three acquisition modes (with moving-average,
// triangular and trapezoidal shaping respectively) with auto, external and
// software triggers, TDC hits, a DDR stall long enough to overflow the
// FIFOs, offset-DAC programming and a host SPI read.
//
// The DDR stream is parsed into records and each is checked against the
// waveform: every raw sample exactly (including the non-linearity, gain and
// offset corrections), and for every result the height (peak of the
// shaped samples), total and tail charge and ratio flag recomputed from the
// waveform at the reported trigger time, plus the pile-up flag from the
// threshold crossings. Auto-trigger times must be threshold crossings. At
// the end every histogram is read back and its sum must equal the accepted
// pulse counter. Each mechanism must occur at least once.
module tb_tdaq_top;
  import tdaq_pkg::*;
  localparam int WIN = 64, TS_LAT = 8;      // record time = sample time + 8 ticks
  localparam int THR = 4000, TAIL = 12, RATIO = 80;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  tdaq_cfg_t cfg;
  logic adc_valid = 0;
  logic [3:0][11:0] adc_code;
  logic ts_clear = 0, ext_trig = 0;
  logic [3:0] sw_trig = 0;
  logic inl_we = 0;
  logic [1:0] inl_adc = 0;
  logic [11:0] inl_addr = 0;
  logic signed [7:0] inl_data = 0;
  logic hist_clear = 0;
  logic [1:0] hist_ch = 0;
  logic [11:0] hist_addr = 0;
  logic [31:0] hist_data;
  logic [3:0] hist_busy;
  logic [3:0][31:0] hist_accepted, hist_rejected;
  logic dac_load = 0, dac_busy;
  logic [3:0][15:0] dac_codes = '0;
  logic spi_req_valid = 0, spi_req_ready, spi_rsp_valid;
  logic [1:0] spi_req_cs = 0;
  logic [5:0] spi_req_len = 0;
  logic [31:0] spi_req_data = 0, spi_rsp_data;
  logic spi_sclk, spi_mosi, spi_miso;
  logic [3:0] spi_cs_n;
  logic tdc_valid = 0;
  logic [1:0] tdc_channel = 0;
  logic [31:0] tdc_time = 0;
  logic ddr_valid, ddr_ready = 1, link_valid, link_last, link_ready = 1;
  logic [26:0] ddr_addr;
  logic [63:0] ddr_data, link_data;
  logic [3:0] trig_seen;
  logic [31:0] dropped, records;

  tdaq_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ analogue model
  typedef struct { longint t0; int amp; int decay; } pulse_t;   // t0 in ticks
  pulse_t pulses [4][$];
  longint xings [4][$];              // auto-trigger crossing times, ticks
  int     inl_m [4][4096];
  int     gain_m [4] = '{16384, 16584, 16234, 16484};
  int     off_m  [4] = '{0, 32, -48, 16};
  acq_mode_e mode = MODE_4CH;

  function automatic int step_of(); return 4 / int'(adcs_per_channel(mode)); endfunction

  function automatic int wf(int c, longint t);
    int v = 0;
    int s = step_of();
    foreach (pulses[c][i]) begin
      longint dt = t - pulses[c][i].t0;
      longint rise = 2 * s, fall = longint'(pulses[c][i].decay) * s;
      if (dt >= 0 && dt < rise) v += int'(longint'(pulses[c][i].amp) * dt / rise);
      else if (dt >= rise && dt < rise + fall)
        v += int'(longint'(pulses[c][i].amp) * (rise + fall - dt) / fall);
    end
    return v;
  endfunction

  function automatic int code_of(int c, longint t);
    int k = 2048 + wf(c, t) / 16;
    return (k > 4095) ? 4095 : k;
  endfunction

  function automatic int adc_of(int c, longint t);
    int r = int'(adcs_per_channel(mode));
    return c * r + int'(t % 4) / (4 / r);
  endfunction

  // corrected sample the design should produce for channel c at tick t
  function automatic int xs(int c, longint t);
    int a = adc_of(c, t), k = code_of(c, t);
    longint v;
    v = longint'((k - 2048) * 16 + inl_m[a][k]);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    v = ((v - off_m[a]) * gain_m[a]) >>> 14;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return int'(v);
  endfunction

  // ADC sampling: sample label t = clocks since reset release
  longint tcnt = 0;
  always @(negedge clk) begin
    for (int a = 0; a < 4; a++) begin
      int c;
      c = int'(adc_channel(mode, 2'(a)));
      adc_code[a] = 12'(code_of(c, 4 * tcnt + longint'(adc_phase(mode, 2'(a)))));
    end
  end
  always @(posedge clk) if (rst_n) tcnt++;

  // -------------------------------------------------------- SPI devices
  logic [31:0] dac_sr, host_sr;
  int dac_bits, dac_frames = 0, dac_bad = 0;
  assign spi_miso = host_sr[31];
  always @(negedge spi_cs_n[0]) begin dac_sr = 0; dac_bits = 0; end
  always @(negedge spi_cs_n[2]) host_sr = 32'hBEEF0000;
  always @(posedge spi_sclk) if (!spi_cs_n[0]) begin dac_sr = {dac_sr[30:0], spi_mosi}; dac_bits++; end
  always @(negedge spi_sclk) if (!spi_cs_n[2]) host_sr = host_sr << 1;
  always @(posedge spi_cs_n[0]) if (rst_n) begin
    if (dac_bits != 24 || dac_sr[23:0] != {4'h3, 4'(dac_frames), dac_codes[dac_frames]}) dac_bad++;
    dac_frames++;
  end

  // --------------------------------------------------- mechanism counters
  int n_mode [3] = '{0, 0, 0};
  int n_filt [3] = '{0, 0, 0};
  int n_auto = 0, n_ext = 0, n_sw = 0, n_pile = 0, n_hi = 0, n_lo = 0;
  int n_raw = 0, n_res = 0, n_tdc = 0, n_link = 0, host_ok = 0;
  trig_src_e src_now [4];

  // ----------------------------------------------------- record checker
  logic [63:0] rec [$];
  int need = 0;
  int tdc_exp [$];

  task automatic check_raw();
    int c = int'(rec[0][59:58]), idx = int'(rec[0][57:56]), n = int'(rec[0][55:48]);
    int s = step_of();
    longint tfirst = longint'(rec[0][47:0]) - TS_LAT - longint'(idx * s);
    bit ok = 1;
    chk(c < 4 / int'(adcs_per_channel(mode)), "raw record channel in use");
    chk(n == 16 && rec.size() == n + 1, "raw record length");
    for (int j = 0; j < 4 * n && j < 4 * (rec.size() - 1); j++) begin
      int got = int'($signed(rec[1 + j / 4][16 * (j % 4) +: 16]));
      if (got != xs(c, tfirst + longint'(j * s))) begin
        ok = 0;
        if (failures < 5) $display("raw ch%0d sample %0d got %0d exp %0d", c, j, got, xs(c, tfirst + longint'(j * s)));
      end
    end
    chk(ok, "raw samples equal the waveform");
    n_raw++;
  endtask

  // shaping filter of the pulse height detector, on the channel's samples
  function automatic int avg4(int c, longint t);
    int s = step_of();
    return (xs(c, t) + xs(c, t - s) + xs(c, t - 2 * s) + xs(c, t - 3 * s)) >>> 2;
  endfunction
  function automatic int shaped(int c, longint t);
    int s = step_of(), a = 0;
    case (cfg.filt)
      FILT_TRI:  begin for (int j = 0; j < 4; j++) a += avg4(c, t - longint'(j * s)); return a >>> 2; end
      FILT_TRAP: begin for (int j = 0; j < 8; j++) a += avg4(c, t - longint'(j * s)); return a >>> 3; end
      default:   return avg4(c, t);
    endcase
  endfunction

  task automatic check_result();
    int c = int'(rec[0][59:58]);
    bit pile = rec[0][57], hi = rec[0][56];
    longint tt = longint'(rec[0][47:0]) - TS_LAT;
    int s = step_of();
    int height = int'($signed(rec[1][63:48]));
    int tail = int'($signed(rec[1][47:24])), tot = int'($signed(rec[1][23:0]));
    int e_h = -32768, e_tot = 0, e_tail = 0;
    bit e_pile = 0, is_x = 0;
    for (int i = 0; i < WIN; i++) begin
      longint t = tt + longint'(i * s);
      int m = shaped(c, t);
      if (m > e_h) e_h = m;
      e_tot += xs(c, t);
      if (i >= TAIL) e_tail += xs(c, t);
    end
    foreach (xings[c][i]) begin
      if (xings[c][i] == tt) is_x = 1;
      if (xings[c][i] > tt && xings[c][i] <= tt + longint'((WIN - 1) * s)) e_pile = 1;
    end
    if (src_now[c] != TRIG_AUTO) e_pile = 0;
    else chk(is_x, $sformatf("auto trigger ch%0d at %0d is a threshold crossing", c, tt));
    chk(height == e_h, $sformatf("height ch%0d got %0d exp %0d", c, height, e_h));
    chk(tot == e_tot && tail == e_tail, $sformatf("charges ch%0d got %0d/%0d exp %0d/%0d", c, tot, tail, e_tot, e_tail));
    chk(hi == (longint'(e_tail) * 256 >= longint'(e_tot) * RATIO), "ratio flag");
    chk(pile == e_pile, $sformatf("pile-up ch%0d got %0d exp %0d", c, pile, e_pile));
    n_res++;
    n_mode[int'(mode)]++;
    n_filt[int'(cfg.filt)]++;
    if (pile) n_pile++;
    if (hi) n_hi++; else n_lo++;
    case (src_now[c])
      TRIG_AUTO:     n_auto++;
      TRIG_EXTERNAL: n_ext++;
      TRIG_SOFTWARE: n_sw++;
      default: ;
    endcase
  endtask

  logic [26:0] next_addr = 0;
  int ddr_run = 0, ddr_run_max = 0;   // longest stretch of words in consecutive clocks
  always @(posedge clk) if (rst_n) begin
    if (link_valid && link_ready) n_link++;
    ddr_run = (ddr_valid && ddr_ready) ? ddr_run + 1 : 0;
    if (ddr_run > ddr_run_max) ddr_run_max = ddr_run;
    if (ddr_valid && ddr_ready) begin
      chk(ddr_addr == next_addr, "DDR addresses consecutive");
      next_addr = next_addr + 1;
      if (need == 0) begin
        rec.delete();
        case (ddr_data[63:60])
          4'h1: need = 1 + int'(ddr_data[55:48]);
          4'h2, 4'h3: need = 2;
          default: begin chk(0, "record type"); need = 1; end
        endcase
      end
      rec.push_back(ddr_data);
      need--;
      if (need == 0) begin
        case (rec[0][63:60])
          4'h1: check_raw();
          4'h2: check_result();
          4'h3: begin
            chk(tdc_exp.size() > 0 && rec[1][31:0] == 32'(tdc_exp[0]), "TDC record payload");
            if (tdc_exp.size() > 0) void'(tdc_exp.pop_front());
            n_tdc++;
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ schedule
  // pulses on channels [0, nch) starting `lead` clocks from now, every
  // `gap` samples, alternating fast/slow, every third with a close follower
  task automatic schedule(int nch, int n, int gap);
    int s = step_of();
    longint base = 4 * (tcnt + 40);
    for (int c = 0; c < 4; c++) begin pulses[c].delete(); xings[c].delete(); end
    for (int c = 0; c < nch; c++) begin
      for (int i = 0; i < n; i++) begin
        longint t0 = base + longint'(i * gap * s) + longint'(c * 8 * s) + longint'($urandom_range(0, 3));
        pulses[c].push_back('{t0, $urandom_range(9000, 28000), (i % 2) ? 50 : 10});
        if (i % 3 == 0) pulses[c].push_back('{t0 + 24 * s, $urandom_range(9000, 20000), 10});
      end
      // threshold crossings on the sample grid of this channel
      for (longint t = base - 8 * s; t < base + longint'((n + 1) * gap * s); t += s)
        if (xs(c, t - s) < THR && xs(c, t) >= THR) xings[c].push_back(t);
    end
  endtask

  task automatic wait_drain();
    int idle = 0;
    while (idle < 300) begin
      @(posedge clk);
      idle = (ddr_valid || need != 0) ? 0 : idle + 1;
    end
  endtask

  task automatic set_mode(acq_mode_e m);
    @(negedge clk);
    mode = m; cfg.mode = m;
    repeat (50) @(negedge clk);
  endtask

  // --------------------------------------------------------------- main
  initial begin
    for (int a = 0; a < 4; a++) for (int k = 0; k < 4096; k++) inl_m[a][k] = 0;
    cfg = '0;
    cfg.mode = MODE_4CH;
    cfg.raw_enable = 1;
    for (int c = 0; c < 4; c++) begin
      cfg.trig_src[c] = TRIG_AUTO; src_now[c] = TRIG_AUTO;
      cfg.threshold[c] = 16'(THR);
      cfg.gain[c] = 16'(gain_m[c]);
      cfg.offset[c] = 16'(off_m[c]);
    end
    cfg.tail_start = 16'(TAIL);
    cfg.ratio_limit = 16'(RATIO);
    repeat (3) @(negedge clk);
    rst_n = 1; adc_valid = 1;

    // non-linearity corrections on codes the pulses pass through
    for (int i = 0; i < 200; i++) begin
      int a = $urandom_range(0, 3), k = (i == 0) ? 2048 : $urandom_range(2048, 3900);
      int d = int'($signed(8'($urandom)));
      @(negedge clk) inl_we = 1; inl_adc = 2'(a); inl_addr = 12'(k); inl_data = 8'(d);
      inl_m[a][k] = d;
    end
    @(negedge clk) inl_we = 0;

    // offset DAC and a host read of the temperature sensor
    dac_codes = {16'h4444, 16'h3333, 16'h2222, 16'h1111};
    @(negedge clk) dac_load = 1; spi_req_valid = 1; spi_req_cs = 2; spi_req_len = 16;
    @(negedge clk) dac_load = 0;
    while (!spi_req_ready) @(negedge clk);
    @(negedge clk) spi_req_valid = 0;
    while (!spi_rsp_valid) @(negedge clk);
    if (spi_rsp_data == 32'hBEEF) host_ok++;
    while (dac_busy) @(negedge clk);
    repeat (10) @(negedge clk);
    chk(dac_frames == 4 && dac_bad == 0, $sformatf("DAC frames %0d bad %0d", dac_frames, dac_bad));
    chk(host_ok == 1, "host SPI read");

    // A: four channels at 200 MSPS, auto trigger
    set_mode(MODE_4CH);
    schedule(4, 12, 200);
    repeat (12 * 200 + 300) @(negedge clk);
    // TDC hits
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) tdc_valid = 1; tdc_channel = 2'(i % 2); tdc_time = $urandom;
      tdc_exp.push_back(int'(tdc_time));
      @(negedge clk) tdc_valid = 0;
      repeat (5) @(negedge clk);
    end
    wait_drain();

    // B: two channels at 400 MSPS
    set_mode(MODE_2CH);
    cfg.filt = FILT_TRI;
    schedule(2, 12, 200);
    repeat (12 * 100 + 300) @(negedge clk);
    wait_drain();

    // C: one channel at 800 MSPS, with a DDR stall that overflows the FIFOs
    set_mode(MODE_1CH);
    cfg.filt = FILT_TRAP;
    schedule(1, 40, 200);
    repeat (400) @(negedge clk);
    ddr_ready = 0;
    repeat (1200) @(negedge clk);
    ddr_ready = 1;
    repeat (40 * 50 + 300) @(negedge clk);
    wait_drain();
    chk(dropped > 0, "overflow dropped records");

    // D: external trigger on channel 0, software trigger on channel 1
    set_mode(MODE_4CH);
    cfg.filt = FILT_MA;
    cfg.trig_src[0] = TRIG_EXTERNAL; src_now[0] = TRIG_EXTERNAL;
    cfg.trig_src[1] = TRIG_SOFTWARE; src_now[1] = TRIG_SOFTWARE;
    cfg.trig_src[2] = TRIG_OFF;      src_now[2] = TRIG_OFF;
    cfg.trig_src[3] = TRIG_OFF;      src_now[3] = TRIG_OFF;
    schedule(2, 3, 200);
    for (int i = 0; i < 3; i++) begin
      repeat (30) @(negedge clk);
      ext_trig = 1; sw_trig[1] = 1;
      @(negedge clk) ext_trig = 0; sw_trig[1] = 0;
      repeat (170) @(negedge clk);
    end
    wait_drain();

    // histograms: sum of bins equals accepted pulses
    for (int c = 0; c < 4; c++) begin
      longint sum;
      sum = 0;
      hist_ch = 2'(c);
      for (int b = 0; b < 4096; b++) begin
        @(negedge clk) hist_addr = 12'(b);
        @(negedge clk) sum += longint'(hist_data);
      end
      chk(sum == longint'(hist_accepted[c]), $sformatf("histogram %0d sum %0d accepted %0d", c, sum, hist_accepted[c]));
    end
    chk(hist_accepted[0] > 0 && hist_rejected[0] > 0, "histogram accepted and rejected pulses");

    // every mechanism happened
    chk(n_mode[0] > 0, "4-channel mode results");
    chk(n_mode[1] > 0, "2-channel mode results");
    chk(n_mode[2] > 0, "1-channel mode results");
    chk(n_auto > 0 && n_ext > 0 && n_sw > 0, "auto, external and software triggers");
    chk(n_pile > 0, "pile-up detected");
    chk(n_filt[0] > 0 && n_filt[1] > 0 && n_filt[2] > 0, "moving-average, triangular and trapezoidal shaping");
    chk(n_hi > 0 && n_lo > 0, "both pulse shape classes");
    chk(n_raw > 0 && n_tdc == 10, $sformatf("raw %0d and TDC %0d records", n_raw, n_tdc));
    chk(n_link > 0, "processed data on the link");
    // 8 bytes per clock: a whole raw record (header + 16 words) leaves without a gap
    chk(ddr_run_max >= 17, $sformatf("DDR port sustains one word per clock (longest run %0d)", ddr_run_max));
    $display("results %0d (4ch %0d 2ch %0d 1ch %0d) auto %0d ext %0d sw %0d pile-up %0d tail-high %0d low %0d raw %0d tdc %0d dropped %0d link words %0d longest DDR run %0d",
             n_res, n_mode[0], n_mode[1], n_mode[2], n_auto, n_ext, n_sw, n_pile, n_hi, n_lo, n_raw, n_tdc, dropped, n_link, ddr_run_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
