// voltage_offset_prog - programs the analogue input offsets.
//
// Each ADC has its own voltage reference, so the four inputs carry
// different offsets. They are cancelled in the analogue domain by a 16-bit
// quad voltage-output DAC, set during calibration. On `load` this block
// takes the four 16-bit codes and writes them to DAC channels A..D through
// the SPI controller, one 24-bit frame per channel:
//     [23:20] command (4'h3, write and update), [19:16] channel, [15:0] code.
// `busy` is high until the last frame is answered; `load` while busy is
// ignored.
//
// The 16-bit quad DAC and its role follow the module description; the frame
// format is an assumption of this design, to be matched to the DAC fitted.
//
// The select, the frame length, the command and the unused top byte of
// spi_req_data are constants; only the channel and code bits change.
//
// Timing: four SPI frames, issued back to back.
module voltage_offset_prog #(
  parameter int unsigned N_CH   = 4,
  parameter logic [1:0]  DAC_CS = 2'd0     // select line of the DAC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N_CH-1:0][15:0] codes,
  output logic                  busy,
  // SPI controller request port
  output logic                  spi_req_valid,
  input  logic                  spi_req_ready,
  output logic [1:0]            spi_req_cs,
  output logic [5:0]            spi_req_len,
  output logic [31:0]           spi_req_data,
  input  logic                  spi_rsp_valid
);
  localparam logic [3:0] CMD_WRITE_UPDATE = 4'h3;

  typedef enum logic [1:0] {P_IDLE, P_REQ, P_WAIT} state_e;

  state_e                 state_q;
  logic [N_CH-1:0][15:0]  codes_q;
  logic [3:0]             ch_q;

  assign busy          = (state_q != P_IDLE);
  assign spi_req_valid = (state_q == P_REQ);
  assign spi_req_cs    = DAC_CS;
  assign spi_req_len   = 6'd24;
  assign spi_req_data  = {8'h00, CMD_WRITE_UPDATE, ch_q, codes_q[ch_q[$clog2(N_CH)-1:0]]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= P_IDLE;
      codes_q <= '0;
      ch_q    <= '0;
    end else begin
      case (state_q)
        P_IDLE: if (load) begin
          codes_q <= codes;
          ch_q    <= '0;
          state_q <= P_REQ;
        end
        P_REQ:  if (spi_req_ready) state_q <= P_WAIT;
        default: if (spi_rsp_valid) begin
          if (ch_q == 4'(N_CH - 1)) state_q <= P_IDLE;
          else begin
            ch_q    <= ch_q + 1'b1;
            state_q <= P_REQ;
          end
        end
      endcase
    end
  end

endmodule
