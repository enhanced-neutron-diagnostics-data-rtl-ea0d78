// psd_unit - pulse shape discrimination by charge integration.
//
// After a trigger the samples of the WIN-sample window are summed twice: all
// of them (total charge) and those from position tail_start onward (charge
// of the falling part, the tail). Neutrons and gamma rays can give pulses of
// equal height and equal total charge but different tail-to-total ratios,
// so the unit also compares the ratio with a programmable limit without a
// divider:
//     tail_high = tail * 256 >= ratio_limit * total     (ratio_limit in 1/256)
// The two sums and the flag are reported for every window; pile-up is judged
// by the pulse height detector, which shares the same window.
//
// Charge integration over the whole pulse and over its falling portion, and
// the use of their ratio, follow the module description; window length, the
// fixed-point comparison and the flag are choices of this design.
//
// Timing: res_valid pulses one clock after the word holding the last window
// sample, in the same clock as pulse_height_detector with the same WIN.
module psd_unit
  import tdaq_pkg::*;
#(
  parameter int unsigned WIN    = 64,    // window length in samples
  parameter int unsigned AREA_W = 32     // accumulator width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [15:0]               tail_start,   // first tail sample in window
  input  logic [15:0]               ratio_limit,  // tail/total limit, 1/256
  input  logic                      in_valid,
  input  sample_word_t              in_word,
  input  logic                      trig,
  input  logic [1:0]                trig_idx,
  input  ts_t                       trig_ts,
  output logic                      res_valid,
  output logic signed [AREA_W-1:0]  res_total,
  output logic signed [AREA_W-1:0]  res_tail,
  output logic                      res_tail_high,
  output ts_t                       res_ts
);
  typedef logic signed [AREA_W-1:0] area_t;

  logic [WORD_SAMPLES-1:0] old_mask, new_mask;
  logic [15:0]             old_base;
  logic                    start, ends, active;
  area_t                   tot_q, tail_q;
  ts_t                     ts_q;

  pulse_window #(.WIN(WIN)) u_win (
    .clk, .rst_n, .in_valid, .trig, .trig_idx,
    .old_mask, .new_mask, .old_base, .start, .ends, .end_pile(), .active
  );

  area_t old_tot, old_tail, new_tot, new_tail;
  always_comb begin
    old_tot  = tot_q;
    old_tail = tail_q;
    new_tot  = '0;
    new_tail = '0;
    for (int k = 0; k < WORD_SAMPLES; k++) begin
      if (old_mask[k]) begin
        old_tot = old_tot + area_t'(in_word[k]);
        if (old_base + 16'(k) >= tail_start) old_tail = old_tail + area_t'(in_word[k]);
      end
      if (new_mask[k]) begin
        new_tot = new_tot + area_t'(in_word[k]);
        if (16'(k) - 16'(trig_idx) >= tail_start) new_tail = new_tail + area_t'(in_word[k]);
      end
    end
  end

  // Ratio comparison on the completed sums.
  logic signed [AREA_W+17:0] lhs, rhs;
  always_comb begin
    lhs = (AREA_W+18)'(old_tail) <<< 8;
    rhs = (AREA_W+18)'(old_tot) * $signed({2'b00, ratio_limit});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tot_q         <= '0;
      tail_q        <= '0;
      ts_q          <= '0;
      res_valid     <= 1'b0;
      res_total     <= '0;
      res_tail      <= '0;
      res_tail_high <= 1'b0;
      res_ts        <= '0;
    end else begin
      res_valid <= 1'b0;
      if (in_valid) begin
        if (ends) begin
          res_valid     <= 1'b1;
          res_total     <= old_tot;
          res_tail      <= old_tail;
          res_tail_high <= (lhs >= rhs);
          res_ts        <= ts_q;
        end
        if (start) begin
          tot_q  <= new_tot;
          tail_q <= new_tail;
          ts_q   <= trig_ts;
        end else if (active) begin
          tot_q  <= old_tot;
          tail_q <= old_tail;
        end
      end
    end
  end

endmodule
