// trigger_detect - trigger level detection of one logical channel.
//
// Works on the four-sample words of the channel. In TRIG_AUTO the channel
// triggers itself: a trigger is raised at the first sample of a word whose
// value reaches `threshold` while the sample before it (the last sample of
// the previous word for element 0) was below it, i.e. on every rising
// crossing of the level. In TRIG_EXTERNAL and TRIG_SOFTWARE a pulse on
// ext_trig or sw_trig is held until the next word and triggers at its first
// sample. TRIG_OFF never triggers. The time stamp of the trigger is the word
// time plus index * sample_step.
//
// Every trigger is reported, including those that fall inside a pulse that
// is still being processed: the pulse processors use them to detect pile-up.
// Self-triggering on a level and software-selectable trigger modes follow the
// module description; the rising-crossing rule and the three sources are
// choices of this design.
//
// Timing: the word, its time stamp and the trigger flag leave together one
// clock after the word enters.
module trigger_detect
  import tdaq_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  trig_src_e     src,
  input  sample_t       threshold,
  input  logic          ext_trig,
  input  logic          sw_trig,
  input  logic [2:0]    sample_step,
  input  logic          in_valid,
  input  sample_word_t  in_word,
  input  ts_t           in_ts,
  output logic          out_valid,
  output sample_word_t  out_word,
  output ts_t           out_ts,
  output logic          trig,
  output logic [1:0]    trig_idx,
  output ts_t           trig_ts
);
  sample_t   last_q;        // last sample of the previous word
  logic      pend_q;        // external / software trigger waiting for a word
  logic      hit;
  logic [1:0] hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    case (src)
      TRIG_AUTO: begin
        for (int k = WORD_SAMPLES - 1; k >= 0; k--) begin
          sample_t prev;
          prev = (k == 0) ? last_q : in_word[k-1];
          if (prev < threshold && in_word[k] >= threshold) begin
            hit     = 1'b1;
            hit_idx = 2'(k);
          end
        end
      end
      TRIG_EXTERNAL, TRIG_SOFTWARE: hit = pend_q || (src == TRIG_EXTERNAL ? ext_trig : sw_trig);
      default: hit = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= '0;
      pend_q    <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_ts    <= '0;
      trig      <= 1'b0;
      trig_idx  <= '0;
      trig_ts   <= '0;
    end else begin
      out_valid <= in_valid;
      trig      <= 1'b0;
      if (in_valid) begin
        last_q   <= in_word[WORD_SAMPLES-1];
        out_word <= in_word;
        out_ts   <= in_ts;
        trig     <= hit;
        trig_idx <= hit_idx;
        trig_ts  <= in_ts + TS_W'(hit_idx) * TS_W'(sample_step);
        pend_q   <= 1'b0;
      end else if ((src == TRIG_EXTERNAL && ext_trig) || (src == TRIG_SOFTWARE && sw_trig)) begin
        pend_q   <= 1'b1;
      end
    end
  end

endmodule
