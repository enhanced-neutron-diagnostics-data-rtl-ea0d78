// pha_histogram - pulse height spectrum of one logical channel.
//
// Every pulse result that is not piled up adds one to the bin of its height;
// piled-up pulses are rejected and only counted. Heights are signed samples
// with four fractional bits; negative heights fall into bin 0 and positive
// ones are scaled to BINS bins over the positive range (bin = height >> 3 for
// the default 4096 bins, i.e. half an ADC LSB per bin).
//
// The memory is a BINS x COUNT_W array with one read-modify-write port for
// the increments (the read and the write are one clock apart, with
// forwarding when the same bin is hit twice in a row) and one read port for
// the controller. `clear` zeroes the bins one per clock while `busy` is high;
// pulses arriving meanwhile are not counted. A histogram of pulse heights
// with pile-up rejection follows the module description; bin count, counter
// width and the clear mechanism are choices of this design.
//
// Timing: accepts one result per clock; rd_data follows rd_addr by a clock.
module pha_histogram
  import tdaq_pkg::*;
#(
  parameter int unsigned BINS    = 4096,   // 2**ADC_BITS bins
  parameter int unsigned COUNT_W = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  sample_t                   in_height,
  input  logic                      in_pileup,
  input  logic                      clear,
  output logic                      busy,
  input  logic [$clog2(BINS)-1:0]   rd_addr,
  output logic [COUNT_W-1:0]        rd_data,
  output logic [31:0]               n_accepted,
  output logic [31:0]               n_rejected
);
  localparam int unsigned AW = $clog2(BINS);

  logic [COUNT_W-1:0] mem [BINS];

  initial begin
    for (int i = 0; i < BINS; i++) mem[i] = '0;
  end

  // Height to bin.
  logic [AW-1:0] bin;
  always_comb begin
    if (in_height[SAMPLE_W-1]) bin = '0;
    else                       bin = in_height[SAMPLE_W-2 -: AW];
  end

  // Stage 1: read; stage 2: write back + 1.
  logic               inc_q;
  logic [AW-1:0]      bin_q;
  logic [COUNT_W-1:0] rd_inc_q;
  logic               wr_en;
  logic [AW-1:0]      wr_addr;
  logic [COUNT_W-1:0] wr_data;
  logic [AW-1:0]      clr_addr_q;
  logic               accept;

  assign accept = in_valid && !in_pileup && !busy;

  always_comb begin
    if (busy) begin
      wr_en   = 1'b1;
      wr_addr = clr_addr_q;
      wr_data = '0;
    end else begin
      wr_en   = inc_q;
      wr_addr = bin_q;
      wr_data = rd_inc_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    // forwarding: the bin just written is read again
    if (inc_q && !busy && accept && bin == bin_q) rd_inc_q <= wr_data;
    else                                          rd_inc_q <= mem[bin];
    if (wr_en && rst_n) mem[wr_addr] <= wr_data;   // no write while in reset
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_q      <= 1'b0;
      bin_q      <= '0;
      busy       <= 1'b0;
      clr_addr_q <= '0;
      n_accepted <= '0;
      n_rejected <= '0;
    end else begin
      inc_q <= accept;
      bin_q <= bin;
      if (accept)                 n_accepted <= n_accepted + 1'b1;
      if (in_valid && in_pileup)  n_rejected <= n_rejected + 1'b1;
      if (clear && !busy) begin
        busy       <= 1'b1;
        clr_addr_q <= '0;
        inc_q      <= 1'b0;
        n_accepted <= '0;
        n_rejected <= '0;
      end else if (busy) begin
        clr_addr_q <= clr_addr_q + 1'b1;
        if (clr_addr_q == AW'(BINS - 1)) busy <= 1'b0;
      end
    end
  end

endmodule
