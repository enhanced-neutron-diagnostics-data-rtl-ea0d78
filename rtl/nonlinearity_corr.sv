// nonlinearity_corr - integral non-linearity correction of one ADC.
//
// The 12-bit offset-binary ADC code is turned into a signed sample with four
// fractional bits (value = (code - 2048) * 16) and a code-dependent
// correction, read from a table of TABLE_DEPTH signed entries in 1/16 LSB, is
// added. The table is written by the controller after calibration; it starts
// at zero (power-up contents), so an uncalibrated channel passes codes
// through unchanged apart from the format change. The sum saturates to the
// 16-bit range.
//
// The non-linearity correction stage and its place before the mismatch
// compensation follow the module's block diagram; the table form, the 1/16
// LSB unit and the 8-bit entry width are choices of this design.
//
// Timing: one clock of latency (registered table read); one sample per clock.
module nonlinearity_corr
  import tdaq_pkg::*;
#(
  parameter int unsigned CODE_BITS = ADC_BITS,   // ADC resolution
  parameter int unsigned CORR_W    = 8           // table entry width, 1/16 LSB
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ADC stream
  input  logic                      in_valid,
  input  logic [CODE_BITS-1:0]      in_code,
  output logic                      out_valid,
  output sample_t                   out_sample,
  // table write port
  input  logic                      tbl_we,
  input  logic [CODE_BITS-1:0]      tbl_addr,
  input  logic signed [CORR_W-1:0]  tbl_data
);
  localparam int unsigned DEPTH = 1 << CODE_BITS;
  localparam int unsigned FRAC  = SAMPLE_W - CODE_BITS;  // 4 fractional bits

  logic signed [CORR_W-1:0] table_q [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) table_q[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (tbl_we) table_q[tbl_addr] <= tbl_data;
  end

  logic signed [CORR_W-1:0]    corr_q;
  logic [CODE_BITS-1:0]        code_q;
  always_ff @(posedge clk) begin
    corr_q <= table_q[in_code];
    code_q <= in_code;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // (code - midscale) << FRAC, plus correction, saturated.
  logic signed [SAMPLE_W+1:0] sum;
  always_comb begin
    sum = ($signed((SAMPLE_W+2)'(code_q)) - $signed((SAMPLE_W+2)'(DEPTH / 2))) <<< FRAC;
    sum = sum + (SAMPLE_W+2)'(corr_q);
    if (sum > (SAMPLE_W+2)'(32767))       out_sample = 16'sh7fff;
    else if (sum < -(SAMPLE_W+2)'(32768)) out_sample = -16'sh8000;
    else                                  out_sample = sample_t'(sum);
  end

endmodule
