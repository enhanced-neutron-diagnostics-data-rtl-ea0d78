// pulse_window - tracks the processing window that follows each trigger.
//
// A trigger at sample trig_idx of a word opens a window of WIN samples. For
// every word this helper says which samples belong to the window still open
// (old_mask, sample position old_base + k within it) and which to a window
// opening in this word (new_mask, position k - trig_idx). `ends` marks the
// word holding the last sample of the open window; end_pile tells whether
// another trigger fell inside that window (pile-up). A trigger after the
// last sample of the open window, in the same word, opens the next window.
//
// Purely a helper of pulse_height_detector and psd_unit, which use the same
// window so that they finish a pulse together. Masks and flags are
// combinational on the current word; the state advances on each valid word.
module pulse_window
  import tdaq_pkg::*;
#(
  parameter int unsigned WIN = 64      // window length in samples (>= 8)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      trig,
  input  logic [1:0]                trig_idx,
  output logic [WORD_SAMPLES-1:0]   old_mask,
  output logic [WORD_SAMPLES-1:0]   new_mask,
  output logic [15:0]               old_base,
  output logic                      start,
  output logic                      ends,
  output logic                      end_pile,
  output logic                      active
);
  logic        active_q, pile_q;
  logic [15:0] rem_q;
  logic        cont, retrig_in;

  assign active = active_q;

  always_comb begin
    cont     = in_valid && active_q;
    ends     = cont && (rem_q <= 16'(WORD_SAMPLES));
    retrig_in   = cont && trig && (16'(trig_idx) < rem_q);
    start    = in_valid && trig && !retrig_in;
    end_pile = pile_q || retrig_in;
    old_base = 16'(WIN) - rem_q;
    for (int k = 0; k < WORD_SAMPLES; k++) begin
      old_mask[k] = cont && (16'(k) < rem_q);
      new_mask[k] = start && (k >= int'(trig_idx));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      pile_q   <= 1'b0;
      rem_q    <= '0;
    end else if (in_valid) begin
      if (start) begin
        active_q <= 1'b1;
        pile_q   <= 1'b0;
        rem_q    <= 16'(WIN) - 16'(WORD_SAMPLES) + 16'(trig_idx);
      end else if (ends) begin
        active_q <= 1'b0;
        pile_q   <= 1'b0;
        rem_q    <= '0;
      end else if (cont) begin
        rem_q    <= rem_q - 16'(WORD_SAMPLES);
        pile_q   <= end_pile;
      end
    end
  end

  initial assert (WIN >= 2 * WORD_SAMPLES && WIN < 65536)
    else $error("pulse_window: WIN out of range");

endmodule
