// adc_compensation - digital gain and offset matching of one ADC.
//
// Interleaved ADCs only reach their dynamic range when their gain and offset
// match. Each ADC's sample is corrected as
//     out = sat16( ((in - offset) * gain) >>> 14 )
// with gain an unsigned Q2.14 factor (16384 = 1.0) and offset a signed value
// in the sample unit. The coefficients come from the calibration software.
// That gain mismatches are compensated digitally follows the module
// description; the linear form, the Q2.14 format and saturation are choices
// of this design. Coarse offsets are also removed in the analogue domain by
// the offset DAC (see voltage_offset_prog).
//
// Timing: one clock of latency, one sample per clock.
module adc_compensation
  import tdaq_pkg::*;
#(
  parameter int unsigned GAIN_FRAC = 14   // fractional bits of the gain
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sample_t              in_sample,
  input  logic [15:0]          gain,        // Q2.14
  input  logic signed [15:0]   offset,
  output logic                 out_valid,
  output sample_t              out_sample
);
  logic signed [16:0] diff;
  logic signed [34:0] prod;
  logic signed [34:0] scaled;
  sample_t            sat;

  always_comb begin
    diff   = 17'(in_sample) - 17'(offset);
    prod   = 35'(diff) * $signed({19'b0, gain});
    scaled = prod >>> GAIN_FRAC;
    if (scaled > 35'sd32767)       sat = 16'sh7fff;
    else if (scaled < -35'sd32768) sat = -16'sh8000;
    else                           sat = sample_t'(scaled);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid  <= in_valid;
      out_sample <= sat;
    end
  end

endmodule
