// interleave_gearbox - merges the four ADC streams into logical channels.
//
// All four ADCs sample at 200 MHz. In MODE_4CH each ADC is a channel of its
// own; in MODE_2CH ADCs 0,1 form channel 0 and ADCs 2,3 form channel 1, their
// clocks 180 degrees apart; in MODE_1CH all four form channel 0 with clocks
// 0/90/180/270 degrees apart. Within a channel the ADCs are read in phase
// order, which gives the samples in time order. Each channel collects its
// samples into words of four (oldest in element 0): a word every 4 clocks in
// MODE_4CH, every 2 in MODE_2CH and every clock in MODE_1CH, so every
// channel word is 8 bytes and all later stages handle one word per clock at
// most.
//
// Every word carries the time stamp of its first sample in 1.25 ns ticks
// (4 ticks per 200 MHz clock plus the ADC's clock phase); sample k of the
// word lies k*sample_step ticks later. ts_clear restarts the time base, so
// several modules can be synchronised by a common pulse. A mode change
// discards partly filled words.
//
// The three modes, the ADC grouping and the clock phases follow the module
// description and its clock distribution figure; the word format and the
// time stamp unit are choices of this design.
//
// Word times are clock times, so the two low bits of each ch_ts and of now_ts
// are always zero; they are kept so every time stamp is in 1.25 ns ticks.
//
// Timing: a word leaves one clock after its last sample enters.
module interleave_gearbox
  import tdaq_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  acq_mode_e                     mode,
  input  logic                          ts_clear,
  input  logic                          in_valid,          // ADC samples valid
  input  sample_t [N_ADC-1:0]           in_sample,
  output logic    [N_ADC-1:0]           ch_valid,
  output sample_word_t [N_ADC-1:0]      ch_word,
  output ts_t     [N_ADC-1:0]           ch_ts,
  output logic    [2:0]                 sample_step,       // ticks per sample
  output ts_t                           now_ts             // current time base
);
  localparam int unsigned CYC_W = TS_W - 2;

  logic [CYC_W-1:0]  cyc_q;
  acq_mode_e         mode_q;
  logic [2:0]        fill_q   [N_ADC];
  sample_word_t      buf_q    [N_ADC];
  logic [CYC_W-1:0]  first_q  [N_ADC];

  assign now_ts = {cyc_q, 2'b00};

  always_comb begin
    case (mode_q)
      MODE_2CH: sample_step = 3'd2;
      MODE_1CH: sample_step = 3'd1;
      default:  sample_step = 3'd4;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q    <= '0;
      mode_q   <= MODE_4CH;
      ch_valid <= '0;
      ch_word  <= '0;
      ch_ts    <= '0;
      for (int c = 0; c < N_ADC; c++) begin
        fill_q[c]  <= '0;
        buf_q[c]   <= '0;
        first_q[c] <= '0;
      end
    end else begin
      cyc_q    <= ts_clear ? '0 : cyc_q + 1'b1;
      mode_q   <= mode;
      ch_valid <= '0;
      if (mode != mode_q) begin
        for (int c = 0; c < N_ADC; c++) fill_q[c] <= '0;
      end else if (in_valid) begin
        for (int c = 0; c < N_ADC; c++) begin
          int unsigned r;
          logic [2:0]  f;
          sample_word_t w;
          r = adcs_per_channel(mode_q);
          if (c < N_ADC / r) begin
            f = fill_q[c];
            w = buf_q[c];
            for (int k = 0; k < N_ADC; k++)
              if (k < r) w[f + 3'(k)] = in_sample[c * r + k];
            if (f == 3'd0) first_q[c] <= cyc_q;
            if (f + 3'(r) >= 3'(WORD_SAMPLES)) begin
              ch_valid[c] <= 1'b1;
              ch_word[c]  <= w;
              ch_ts[c]    <= {(f == 3'd0) ? cyc_q : first_q[c], 2'b00};
              fill_q[c]   <= '0;
            end else begin
              fill_q[c]   <= f + 3'(r);
            end
            buf_q[c] <= w;
          end
        end
      end
    end
  end

endmodule
