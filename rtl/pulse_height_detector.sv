// pulse_height_detector - pulse height analysis of one logical channel.
//
// The samples are shaped by one of three filters, chosen at run time by
// `filt`, each computed for every sample of each four-sample word from the
// word and the samples before it:
//   FILT_MA   moving average of MA_LEN samples (rectangular response);
//   FILT_TRI  that average averaged again over MA_LEN samples (triangular
//             response, 2*MA_LEN-1 samples long);
//   FILT_TRAP that average averaged again over 2*MA_LEN samples
//             (trapezoidal response: MA_LEN rise, MA_LEN flat top).
// MA_LEN is a power of two up to 8; each average divides by its length with
// an arithmetic shift. After a trigger, the largest filtered value within
// the WIN-sample window is the pulse height. A second
// trigger inside the window marks the pulse as piled up; the pulse is still
// reported, flagged, so that the histogram can reject it and the record
// stream can keep it.
//
// Moving-average smoothing, peak height and pile-up detection and rejection
// and the choice of moving-average, triangular or trapezoidal shaping follow
// the module description. Building the triangle and trapezoid from cascaded
// averages, the filter lengths, window length and the pile-up rule are
// choices of this design.
//
// Timing: res_valid pulses one clock after the word holding the last window
// sample; one result per window.
module pulse_height_detector
  import tdaq_pkg::*;
#(
  parameter int unsigned MA_LEN = 4,     // moving-average length
  parameter int unsigned WIN    = 64     // window length in samples
) (
  input  logic          clk,
  input  logic          rst_n,
  input  filt_e         filt,
  input  logic          in_valid,
  input  sample_word_t  in_word,
  input  logic          trig,
  input  logic [1:0]    trig_idx,
  input  ts_t           trig_ts,
  output logic          res_valid,
  output sample_t       res_height,
  output logic          res_pileup,
  output ts_t           res_ts
);
  localparam int unsigned SH   = $clog2(MA_LEN);
  localparam int unsigned HIST = 16;              // history kept (>= 2*MA_LEN-1)

  sample_t hist_q [HIST];                         // [0] = newest past sample
  sample_t m1h_q  [HIST];                         // past first-stage outputs
  sample_t m1 [WORD_SAMPLES];                     // first-stage average
  sample_t ma [WORD_SAMPLES];                     // filter output
  sample_t peak_q;
  ts_t     ts_q;

  logic [WORD_SAMPLES-1:0] old_mask, new_mask;
  logic                    start, ends, end_pile, active;

  pulse_window #(.WIN(WIN)) u_win (
    .clk, .rst_n, .in_valid, .trig, .trig_idx,
    .old_mask, .new_mask, .old_base(), .start, .ends, .end_pile, .active
  );

  // First stage: moving average of every sample in the word.
  always_comb begin
    for (int k = 0; k < WORD_SAMPLES; k++) begin
      logic signed [SAMPLE_W+4:0] acc;
      acc = '0;
      for (int j = 0; j < MA_LEN; j++) begin
        if (k - j >= 0) acc = acc + (SAMPLE_W+5)'(in_word[k-j]);
        else            acc = acc + (SAMPLE_W+5)'(hist_q[j-k-1]);
      end
      m1[k] = sample_t'(acc >>> SH);
    end
  end

  // Second stage: average of the first-stage outputs over MA_LEN (triangle)
  // or 2*MA_LEN (trapezoid) samples.
  always_comb begin
    for (int k = 0; k < WORD_SAMPLES; k++) begin
      logic signed [SAMPLE_W+4:0] acc;
      acc = '0;
      for (int j = 0; j < 2 * MA_LEN; j++) begin
        if (j < MA_LEN || filt == FILT_TRAP) begin
          if (k - j >= 0) acc = acc + (SAMPLE_W+5)'(m1[k-j]);
          else            acc = acc + (SAMPLE_W+5)'(m1h_q[j-k-1]);
        end
      end
      case (filt)
        FILT_TRI:  ma[k] = sample_t'(acc >>> SH);
        FILT_TRAP: ma[k] = sample_t'(acc >>> (SH + 1));
        default:   ma[k] = m1[k];
      endcase
    end
  end

  sample_t old_peak, new_peak;
  always_comb begin
    old_peak = peak_q;
    new_peak = -16'sh8000;
    for (int k = 0; k < WORD_SAMPLES; k++) begin
      if (old_mask[k] && ma[k] > old_peak) old_peak = ma[k];
      if (new_mask[k] && ma[k] > new_peak) new_peak = ma[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) begin
        hist_q[i] <= '0;
        m1h_q[i]  <= '0;
      end
      peak_q     <= '0;
      ts_q       <= '0;
      res_valid  <= 1'b0;
      res_height <= '0;
      res_pileup <= 1'b0;
      res_ts     <= '0;
    end else begin
      res_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < HIST; i++) begin
          hist_q[i] <= (i < WORD_SAMPLES) ? in_word[WORD_SAMPLES-1-i] : hist_q[i-WORD_SAMPLES];
          m1h_q[i]  <= (i < WORD_SAMPLES) ? m1[WORD_SAMPLES-1-i]      : m1h_q[i-WORD_SAMPLES];
        end
        if (ends) begin
          res_valid  <= 1'b1;
          res_height <= old_peak;
          res_pileup <= end_pile;
          res_ts     <= ts_q;
        end
        if (start) begin
          peak_q <= new_peak;
          ts_q   <= trig_ts;
        end else if (active) begin
          peak_q <= old_peak;
        end
      end
    end
  end

  initial assert (MA_LEN >= 1 && 2 * MA_LEN <= HIST && (1 << SH) == MA_LEN)
    else $error("pulse_height_detector: MA_LEN must be 1, 2, 4 or 8");

endmodule
