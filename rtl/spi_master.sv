// spi_master - SPI controller for the module's serial peripherals.
//
// One master drives up to N_CS devices on a shared SCLK/MOSI/MISO bus with
// one active-low select each: on this module the offset DAC, the clock
// distribution chip, the temperature sensor and the configuration flash.
// A request names the device, the frame length (1..32 bits) and the data,
// right-aligned and sent MSB first. The bus runs in SPI mode 0: SCLK idles
// low, MOSI changes on falling edges and MISO is sampled on rising edges.
// The bits read back are returned right-aligned with rsp_valid.
//
// The SPI controller and the set of SPI devices follow the module's block
// diagram; the request interface, the mode and the clock divider are choices
// of this design.
//
// Timing: SCLK = clk / (2*CLK_DIV). A frame of L bits takes 2*CLK_DIV*L + 2
// clocks from acceptance (req_valid && req_ready) to rsp_valid, select low
// for all but the first and last of them.
module spi_master #(
  parameter int unsigned N_CS    = 4,
  parameter int unsigned CLK_DIV = 4        // half SCLK period in clocks
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_valid,
  output logic                      req_ready,
  input  logic [$clog2(N_CS)-1:0]   req_cs,
  input  logic [5:0]                req_len,    // 1..32
  input  logic [31:0]               req_data,
  output logic                      rsp_valid,
  output logic [31:0]               rsp_data,
  output logic                      sclk,
  output logic                      mosi,
  input  logic                      miso,
  output logic [N_CS-1:0]           cs_n
);
  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_END} state_e;

  state_e       state_q;
  logic [31:0]  tx_q, rx_q;
  logic [5:0]   left_q;
  logic [$clog2(CLK_DIV+1)-1:0] div_q;

  assign req_ready = (state_q == S_IDLE);
  assign mosi      = tx_q[31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      tx_q      <= '0;
      rx_q      <= '0;
      left_q    <= '0;
      div_q     <= '0;
      sclk      <= 1'b0;
      cs_n      <= '1;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      case (state_q)
        S_IDLE: if (req_valid) begin
          tx_q          <= req_data << (6'd32 - req_len);
          rx_q          <= '0;
          left_q        <= req_len;
          div_q         <= '0;
          cs_n          <= '1;
          cs_n[req_cs]  <= 1'b0;
          state_q       <= S_LOW;
        end
        S_LOW: begin
          if (div_q == ($bits(div_q))'(CLK_DIV - 1)) begin
            div_q   <= '0;
            sclk    <= 1'b1;
            rx_q    <= {rx_q[30:0], miso};
            state_q <= S_HIGH;
          end else div_q <= div_q + 1'b1;
        end
        S_HIGH: begin
          if (div_q == ($bits(div_q))'(CLK_DIV - 1)) begin
            div_q  <= '0;
            sclk   <= 1'b0;
            left_q <= left_q - 1'b1;
            if (left_q == 6'd1) state_q <= S_END;
            else begin
              tx_q    <= tx_q << 1;
              state_q <= S_LOW;
            end
          end else div_q <= div_q + 1'b1;
        end
        default: begin            // S_END: release the select
          cs_n      <= '1;
          rsp_valid <= 1'b1;
          rsp_data  <= rx_q;
          state_q   <= S_IDLE;
        end
      endcase
    end
  end

  initial assert (CLK_DIV >= 1) else $error("spi_master: CLK_DIV must be >= 1");

endmodule
