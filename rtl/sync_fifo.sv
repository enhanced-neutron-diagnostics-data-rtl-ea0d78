// sync_fifo - single-clock first-word-fall-through FIFO.
//
// DEPTH entries of W bits (DEPTH a power of two). The head entry is visible
// on rd_data whenever `empty` is low and is removed by rd_en. `free` is the
// number of entries that can still be written. Writing when full or reading
// when empty is an error, checked by assertions. Helper of data_manager.
module sync_fifo #(
  parameter int unsigned W     = 65,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   free
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp_q, rp_q;

  assign empty   = (wp_q == rp_q);
  assign free    = (AW+1)'(DEPTH) - (wp_q - rp_q);
  assign rd_data = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (wr_en) wp_q <= wp_q + 1'b1;
      if (rd_en) rp_q <= rp_q + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> free != 0)
    else $error("sync_fifo: write when full");
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("sync_fifo: read when empty");

endmodule
