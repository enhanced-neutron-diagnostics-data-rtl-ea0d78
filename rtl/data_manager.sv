// data_manager - tags, packs and stores every acquired pulse.
//
// Each pulse is stored with the number of the channel it came from and the
// time of its trigger. Three kinds of record, all in 64-bit (8-byte) words,
// are produced:
//
//   REC_RAW    header  [63:60]=1 [59:58]=channel [57:56]=trigger sample index
//                      [55:48]=number of sample words [47:0]=trigger time
//              then RAW_WORDS words of four signed 16-bit samples, [15:0]
//              oldest, starting with the word that holds the trigger sample.
//   REC_RESULT header  [63:60]=2 [59:58]=channel [57]=pile-up [56]=tail_high
//                      [47:0]=trigger time
//              payload [63:48]=pulse height [47:24]=tail charge
//                      [23:0]=total charge (both saturated to 24 bits)
//   REC_TDC    header  [63:60]=3 [59:58]=TDC channel [47:0]=arrival time
//              payload [31:0]=TDC measurement
//
// Every channel has one FIFO for raw records and one for results; the TDC
// has one. A raw record is started only if its FIFO has room for all of it,
// and a trigger that comes while a raw record is being captured starts
// none; results and TDC hits that find their FIFO full are dropped. Drops
// are counted in `dropped`. A round-robin arbiter forwards whole records,
// one word per clock, to the DDR memory port at consecutive word addresses
// of a circular buffer of MEM_WORDS words. Result and TDC records are
// processed data and go to the gigabit link as well: they move only when
// both ports are ready.
//
// Tagging with channel and trigger time, storage of raw and processed data
// in the 1 GB memory and an 8-byte word per 200 MHz clock follow the module
// description; record layout, FIFO sizes, the drop policy and the port
// handshakes are choices of this design.
module data_manager
  import tdaq_pkg::*;
#(
  parameter int unsigned RAW_WORDS  = 16,         // sample words per raw record
  parameter int unsigned FIFO_DEPTH = 64,         // entries per source FIFO
  parameter int unsigned ADDR_W     = 27          // 2**27 x 8 B = 1 GB
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       raw_enable,
  // per-channel sample stream with triggers (from trigger_detect)
  input  logic         [N_ADC-1:0]   ch_valid,
  input  sample_word_t [N_ADC-1:0]   ch_word,
  input  logic         [N_ADC-1:0]   ch_trig,
  input  logic [N_ADC-1:0][1:0]      ch_trig_idx,
  input  ts_t          [N_ADC-1:0]   ch_trig_ts,
  // per-channel pulse results (pulse height detector + PSD unit)
  input  logic         [N_ADC-1:0]   res_valid,
  input  sample_t      [N_ADC-1:0]   res_height,
  input  logic         [N_ADC-1:0]   res_pileup,
  input  logic [N_ADC-1:0][31:0]     res_total,
  input  logic [N_ADC-1:0][31:0]     res_tail,
  input  logic         [N_ADC-1:0]   res_tail_high,
  input  ts_t          [N_ADC-1:0]   res_ts,
  // time-to-digital converter hits
  input  logic                       tdc_valid,
  input  logic [1:0]                 tdc_channel,
  input  logic [31:0]                tdc_time,
  input  ts_t                        now_ts,
  // DDR memory write port
  output logic                       ddr_valid,
  output logic [ADDR_W-1:0]          ddr_addr,
  output logic [REC_W-1:0]           ddr_data,
  input  logic                       ddr_ready,
  // gigabit link port (processed data)
  output logic                       link_valid,
  output logic [REC_W-1:0]           link_data,
  output logic                       link_last,
  input  logic                       link_ready,
  // status
  output logic [31:0]                dropped,
  output logic [31:0]                records
);
  localparam int unsigned NSRC = 2 * N_ADC + 1;   // raw 0..3, result 4..7, TDC 8
  localparam int unsigned FW   = $clog2(FIFO_DEPTH);
  localparam int unsigned SW   = $clog2(NSRC);

  typedef struct packed {
    logic             last;
    logic [REC_W-1:0] data;
  } entry_t;

  function automatic logic [23:0] sat24(logic [31:0] v);
    if ($signed(v) > 32'sd8388607)       return 24'h7fffff;
    else if ($signed(v) < -32'sd8388608) return 24'h800000;
    else                                 return v[23:0];
  endfunction

  entry_t             wr_data [NSRC];
  logic [NSRC-1:0]    wr_en, rd_en, empty;
  entry_t             rd_data [NSRC];
  logic [FW:0]        free    [NSRC];
  logic [NSRC-1:0]    drop;

  for (genvar s = 0; s < NSRC; s++) begin : g_fifo
    sync_fifo #(.W($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(wr_en[s]), .wr_data(wr_data[s]),
      .rd_en(rd_en[s]), .rd_data(rd_data[s]),
      .empty(empty[s]), .free(free[s])
    );
  end

  // ---------------------------------------------------------------- raw
  for (genvar c = 0; c < N_ADC; c++) begin : g_raw
    logic               cap_q;       // capturing a raw record
    logic [7:0]         left_q;      // sample words still to write
    logic               wd_valid_q;  // word delayed by one clock
    sample_word_t       wd_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cap_q      <= 1'b0;
        left_q     <= '0;
        wd_valid_q <= 1'b0;
        wd_q       <= '0;
      end else begin
        wd_valid_q <= ch_valid[c];
        if (ch_valid[c]) wd_q <= ch_word[c];
        if (!cap_q) begin
          if (ch_valid[c] && ch_trig[c] && raw_enable && free[c] >= (FW+1)'(RAW_WORDS + 1)) begin
            cap_q  <= 1'b1;
            left_q <= 8'(RAW_WORDS);
          end
        end else if (wd_valid_q) begin
          left_q <= left_q - 1'b1;
          if (left_q == 8'd1) cap_q <= 1'b0;
        end
      end
    end

    always_comb begin
      wr_en[c]        = 1'b0;
      wr_data[c]      = '0;
      drop[c]         = 1'b0;
      if (!cap_q) begin
        if (ch_valid[c] && ch_trig[c] && raw_enable) begin
          if (free[c] >= (FW+1)'(RAW_WORDS + 1)) begin
            wr_en[c]   = 1'b1;
            wr_data[c] = '{last: 1'b0,
                           data: {REC_RAW, 2'(c), ch_trig_idx[c], 8'(RAW_WORDS), ch_trig_ts[c]}};
          end else begin
            drop[c] = 1'b1;
          end
        end
      end else if (wd_valid_q) begin
        wr_en[c]   = 1'b1;
        wr_data[c] = '{last: (left_q == 8'd1), data: wd_q};
      end
    end
  end

  // ------------------------------------------------------------- results
  for (genvar c = 0; c < N_ADC; c++) begin : g_res
    localparam int unsigned S = N_ADC + c;
    logic             second_q;
    logic [REC_W-1:0] payload_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        second_q  <= 1'b0;
        payload_q <= '0;
      end else begin
        second_q  <= res_valid[c] && free[S] >= (FW+1)'(2);
        payload_q <= {res_height[c], sat24(res_tail[c]), sat24(res_total[c])};
      end
    end

    always_comb begin
      wr_en[S]   = 1'b0;
      wr_data[S] = '0;
      drop[S]    = 1'b0;
      if (second_q) begin
        wr_en[S]   = 1'b1;
        wr_data[S] = '{last: 1'b1, data: payload_q};
      end else if (res_valid[c]) begin
        if (free[S] >= (FW+1)'(2)) begin
          wr_en[S]   = 1'b1;
          wr_data[S] = '{last: 1'b0,
                         data: {REC_RESULT, 2'(c), res_pileup[c], res_tail_high[c], 8'h00, res_ts[c]}};
        end else begin
          drop[S] = 1'b1;
        end
      end
    end

    // results of one channel are at least two clocks apart
    assert property (@(posedge clk) disable iff (!rst_n) second_q |-> !res_valid[c])
      else $error("data_manager: results too close");
  end

  // ----------------------------------------------------------------- TDC
  localparam int unsigned ST = 2 * N_ADC;
  logic        tdc_second_q;
  logic [31:0] tdc_time_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdc_second_q <= 1'b0;
      tdc_time_q   <= '0;
    end else begin
      tdc_second_q <= tdc_valid && !tdc_second_q && free[ST] >= (FW+1)'(2);
      tdc_time_q   <= tdc_time;
    end
  end

  always_comb begin
    wr_en[ST]   = 1'b0;
    wr_data[ST] = '0;
    drop[ST]    = 1'b0;
    if (tdc_second_q) begin
      wr_en[ST]   = 1'b1;
      wr_data[ST] = '{last: 1'b1, data: {32'h0, tdc_time_q}};
      drop[ST]    = tdc_valid;          // hit in the payload clock is lost
    end else if (tdc_valid) begin
      if (free[ST] >= (FW+1)'(2)) begin
        wr_en[ST]   = 1'b1;
        wr_data[ST] = '{last: 1'b0, data: {REC_TDC, tdc_channel, 10'h000, now_ts}};
      end else begin
        drop[ST] = 1'b1;
      end
    end
  end

  // ------------------------------------------------- complete-record count
  logic [FW:0] pkts_q [NSRC];
  for (genvar s = 0; s < NSRC; s++) begin : g_pkt
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pkts_q[s] <= '0;
      else pkts_q[s] <= pkts_q[s] + (FW+1)'(wr_en[s] && wr_data[s].last)
                                  - (FW+1)'(rd_en[s] && rd_data[s].last);
    end
  end

  // ------------------------------------------------------------- arbiter
  logic            busy_q;
  logic [SW-1:0]   cur_q, last_q;
  logic            proc_src;          // current source carries processed data
  logic            move;

  assign proc_src   = (cur_q >= SW'(N_ADC));
  assign ddr_valid  = busy_q && !empty[cur_q] && (!proc_src || link_ready);
  assign ddr_data   = rd_data[cur_q].data;
  assign link_valid = busy_q && proc_src && !empty[cur_q] && ddr_ready;
  assign link_data  = rd_data[cur_q].data;
  assign link_last  = rd_data[cur_q].last;
  assign move       = ddr_valid && ddr_ready;

  always_comb begin
    rd_en = '0;
    if (move) rd_en[cur_q] = 1'b1;
  end

  // next source with a complete record, searching from last_q + 1
  logic          found;
  logic [SW-1:0] next_src;
  always_comb begin
    found    = 1'b0;
    next_src = '0;
    for (int i = 1; i <= NSRC; i++) begin
      int unsigned s;
      s = (int'(last_q) + i) % NSRC;
      if (!found && pkts_q[s] != 0) begin
        found    = 1'b1;
        next_src = SW'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      cur_q    <= '0;
      last_q   <= SW'(NSRC - 1);
      ddr_addr <= '0;
      dropped  <= '0;
      records  <= '0;
    end else begin
      dropped <= dropped + 32'($countones(drop));
      if (move) begin
        ddr_addr <= ddr_addr + 1'b1;      // wraps: circular buffer
        if (rd_data[cur_q].last) begin
          busy_q  <= 1'b0;
          records <= records + 1'b1;
        end
      end
      if (!busy_q && found) begin
        busy_q <= 1'b1;
        cur_q  <= next_src;
        last_q <= next_src;
      end
    end
  end

endmodule
