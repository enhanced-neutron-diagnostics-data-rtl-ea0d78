// tdaq_top - FPGA of the transient-recorder / time-digitizer module.
//
// Four free-running 12-bit ADCs at 200 MSPS feed the chip. Each ADC stream
// is corrected for integral non-linearity (nonlinearity_corr) and for its
// gain and offset mismatch (adc_compensation), then merged into logical
// channels according to the acquisition architecture chosen by software
// (interleave_gearbox): 4 x 200 MSPS, 2 x 400 MSPS or 1 x 800 MSPS. Every
// logical channel has a trigger level detector, a pulse height detector, a
// histogram of pulse heights with pile-up rejection and a pulse shape
// discriminator. The data manager tags every pulse with its channel and
// trigger time and writes raw pulses, pulse results and time-to-digital
// converter hits to the DDR memory port, and the processed records to the
// gigabit link port. An SPI controller serves the offset DAC, programmed by
// voltage_offset_prog, and the other serial peripherals, reached through
// the host SPI request port.
//
// The DDR controller, the gigabit link core, the TDC chip, the ADCs and the
// analogue parts are outside this RTL: their signals are ports. The
// structure follows the module's block diagram; port formats are choices of
// this design and are described in the sub-modules.
//
// Timing: ADC code to gearbox word is 3 clocks plus the word assembly,
// trigger detection adds 1; results appear one clock after the window's
// last word.
module tdaq_top
  import tdaq_pkg::*;
#(
  parameter int unsigned WIN        = 64,    // pulse window, samples
  parameter int unsigned MA_LEN     = 4,     // moving-average length
  parameter int unsigned RAW_WORDS  = 16,    // words per raw record
  parameter int unsigned FIFO_DEPTH = 64,    // data manager FIFO entries
  parameter int unsigned HIST_BINS  = 4096,  // histogram bins
  parameter int unsigned ADDR_W     = 27,    // 1 GB of 8-byte words
  parameter int unsigned SPI_DIV    = 4      // SCLK = clk / (2*SPI_DIV)
) (
  input  logic                           clk,         // 200 MHz ADC clock
  input  logic                           rst_n,
  input  tdaq_cfg_t                      cfg,
  // ADCs
  input  logic                           adc_valid,
  input  logic [N_ADC-1:0][ADC_BITS-1:0] adc_code,
  // time base and triggers
  input  logic                           ts_clear,    // module sync pulse
  input  logic                           ext_trig,
  input  logic [N_ADC-1:0]               sw_trig,
  // non-linearity table write
  input  logic                           inl_we,
  input  logic [1:0]                     inl_adc,
  input  logic [ADC_BITS-1:0]            inl_addr,
  input  logic signed [7:0]              inl_data,
  // histograms
  input  logic                           hist_clear,
  input  logic [1:0]                     hist_ch,
  input  logic [$clog2(HIST_BINS)-1:0]   hist_addr,
  output logic [31:0]                    hist_data,
  output logic [N_ADC-1:0]               hist_busy,
  output logic [N_ADC-1:0][31:0]         hist_accepted,
  output logic [N_ADC-1:0][31:0]         hist_rejected,
  // analogue offset DAC
  input  logic                           dac_load,
  input  logic [N_ADC-1:0][15:0]         dac_codes,
  output logic                           dac_busy,
  // host access to the other SPI devices
  input  logic                           spi_req_valid,
  output logic                           spi_req_ready,
  input  logic [1:0]                     spi_req_cs,
  input  logic [5:0]                     spi_req_len,
  input  logic [31:0]                    spi_req_data,
  output logic                           spi_rsp_valid,
  output logic [31:0]                    spi_rsp_data,
  output logic                           spi_sclk,
  output logic                           spi_mosi,
  input  logic                           spi_miso,
  output logic [3:0]                     spi_cs_n,
  // time-to-digital converter
  input  logic                           tdc_valid,
  input  logic [1:0]                     tdc_channel,
  input  logic [31:0]                    tdc_time,
  // DDR controller write port
  output logic                           ddr_valid,
  output logic [ADDR_W-1:0]              ddr_addr,
  output logic [REC_W-1:0]               ddr_data,
  input  logic                           ddr_ready,
  // gigabit link port
  output logic                           link_valid,
  output logic [REC_W-1:0]               link_data,
  output logic                           link_last,
  input  logic                           link_ready,
  // status
  output logic [N_ADC-1:0]               trig_seen,   // trigger pulses
  output logic [31:0]                    dropped,
  output logic [31:0]                    records
);
  // ---------------------------------------------------- per-ADC correction
  logic    [N_ADC-1:0] nl_valid, cmp_valid;
  sample_t [N_ADC-1:0] nl_sample, cmp_sample;

  for (genvar a = 0; a < N_ADC; a++) begin : g_adc
    nonlinearity_corr u_nl (
      .clk, .rst_n,
      .in_valid(adc_valid), .in_code(adc_code[a]),
      .out_valid(nl_valid[a]), .out_sample(nl_sample[a]),
      .tbl_we(inl_we && inl_adc == 2'(a)), .tbl_addr(inl_addr), .tbl_data(inl_data)
    );
    adc_compensation u_cmp (
      .clk, .rst_n,
      .in_valid(nl_valid[a]), .in_sample(nl_sample[a]),
      .gain(cfg.gain[a]), .offset(cfg.offset[a]),
      .out_valid(cmp_valid[a]), .out_sample(cmp_sample[a])
    );
  end

  // ------------------------------------------------------------ interleave
  logic         [N_ADC-1:0] gb_valid;
  sample_word_t [N_ADC-1:0] gb_word;
  ts_t          [N_ADC-1:0] gb_ts;
  logic [2:0]               step;
  ts_t                      now_ts;

  interleave_gearbox u_gb (
    .clk, .rst_n, .mode(cfg.mode), .ts_clear,
    .in_valid(cmp_valid[0]), .in_sample(cmp_sample),
    .ch_valid(gb_valid), .ch_word(gb_word), .ch_ts(gb_ts),
    .sample_step(step), .now_ts
  );

  // ------------------------------------------------- per-channel processing
  logic         [N_ADC-1:0]      td_valid, td_trig;
  sample_word_t [N_ADC-1:0]      td_word;
  ts_t          [N_ADC-1:0]      td_ts, td_trig_ts;
  logic [N_ADC-1:0][1:0]         td_idx;
  logic         [N_ADC-1:0]      ph_valid, ph_pile, ps_valid, ps_high;
  sample_t      [N_ADC-1:0]      ph_height;
  ts_t          [N_ADC-1:0]      ph_ts, ps_ts;
  logic [N_ADC-1:0][31:0]        ps_total, ps_tail;
  logic [N_ADC-1:0][31:0]        h_rd;

  assign trig_seen = td_trig;

  for (genvar c = 0; c < N_ADC; c++) begin : g_ch
    trigger_detect u_trig (
      .clk, .rst_n, .src(cfg.trig_src[c]), .threshold(cfg.threshold[c]),
      .ext_trig, .sw_trig(sw_trig[c]), .sample_step(step),
      .in_valid(gb_valid[c]), .in_word(gb_word[c]), .in_ts(gb_ts[c]),
      .out_valid(td_valid[c]), .out_word(td_word[c]), .out_ts(td_ts[c]),
      .trig(td_trig[c]), .trig_idx(td_idx[c]), .trig_ts(td_trig_ts[c])
    );
    pulse_height_detector #(.MA_LEN(MA_LEN), .WIN(WIN)) u_ph (
      .clk, .rst_n, .filt(cfg.filt),
      .in_valid(td_valid[c]), .in_word(td_word[c]),
      .trig(td_trig[c]), .trig_idx(td_idx[c]), .trig_ts(td_trig_ts[c]),
      .res_valid(ph_valid[c]), .res_height(ph_height[c]),
      .res_pileup(ph_pile[c]), .res_ts(ph_ts[c])
    );
    psd_unit #(.WIN(WIN)) u_psd (
      .clk, .rst_n, .tail_start(cfg.tail_start), .ratio_limit(cfg.ratio_limit),
      .in_valid(td_valid[c]), .in_word(td_word[c]),
      .trig(td_trig[c]), .trig_idx(td_idx[c]), .trig_ts(td_trig_ts[c]),
      .res_valid(ps_valid[c]), .res_total(ps_total[c]), .res_tail(ps_tail[c]),
      .res_tail_high(ps_high[c]), .res_ts(ps_ts[c])
    );
    pha_histogram #(.BINS(HIST_BINS)) u_hist (
      .clk, .rst_n,
      .in_valid(ph_valid[c]), .in_height(ph_height[c]), .in_pileup(ph_pile[c]),
      .clear(hist_clear), .busy(hist_busy[c]),
      .rd_addr(hist_addr), .rd_data(h_rd[c]),
      .n_accepted(hist_accepted[c]), .n_rejected(hist_rejected[c])
    );
  end

  logic [1:0] hist_ch_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist_ch_q <= '0;
    else        hist_ch_q <= hist_ch;
  end
  assign hist_data = h_rd[hist_ch_q];

  // ---------------------------------------------------------- data manager
  data_manager #(.RAW_WORDS(RAW_WORDS), .FIFO_DEPTH(FIFO_DEPTH), .ADDR_W(ADDR_W)) u_dm (
    .clk, .rst_n, .raw_enable(cfg.raw_enable),
    .ch_valid(td_valid), .ch_word(td_word), .ch_trig(td_trig),
    .ch_trig_idx(td_idx), .ch_trig_ts(td_trig_ts),
    .res_valid(ph_valid), .res_height(ph_height), .res_pileup(ph_pile),
    .res_total(ps_total), .res_tail(ps_tail), .res_tail_high(ps_high),
    .res_ts(ph_ts),
    .tdc_valid, .tdc_channel, .tdc_time, .now_ts,
    .ddr_valid, .ddr_addr, .ddr_data, .ddr_ready,
    .link_valid, .link_data, .link_last, .link_ready,
    .dropped, .records
  );

  // ------------------------------------------------------------------ SPI
  logic        v_req_valid, m_req_ready, m_rsp_valid;
  logic [1:0]  v_req_cs;
  logic [5:0]  v_req_len;
  logic [31:0] v_req_data, m_rsp_data;
  logic        host_owns_q;
  logic        take_v;

  voltage_offset_prog u_vop (
    .clk, .rst_n, .load(dac_load), .codes(dac_codes), .busy(dac_busy),
    .spi_req_valid(v_req_valid), .spi_req_ready(m_req_ready && take_v),
    .spi_req_cs(v_req_cs), .spi_req_len(v_req_len), .spi_req_data(v_req_data),
    .spi_rsp_valid(m_rsp_valid && !host_owns_q)
  );

  // the offset programmer has priority; the host waits while it is busy
  assign take_v        = dac_busy;
  assign spi_req_ready = m_req_ready && !dac_busy;

  spi_master #(.N_CS(4), .CLK_DIV(SPI_DIV)) u_spi (
    .clk, .rst_n,
    .req_valid(take_v ? v_req_valid : spi_req_valid),
    .req_ready(m_req_ready),
    .req_cs(take_v ? v_req_cs : spi_req_cs),
    .req_len(take_v ? v_req_len : spi_req_len),
    .req_data(take_v ? v_req_data : spi_req_data),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data),
    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso), .cs_n(spi_cs_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_owns_q <= 1'b0;
    else if (m_req_ready && (take_v ? v_req_valid : spi_req_valid)) host_owns_q <= !take_v;
  end
  assign spi_rsp_valid = m_rsp_valid && host_owns_q;
  assign spi_rsp_data  = m_rsp_data;

  // unused: per-channel word times and PSD time stamps equal the PHA ones
  logic unused;
  assign unused = ^{td_ts, ps_ts, ps_valid};

endmodule
