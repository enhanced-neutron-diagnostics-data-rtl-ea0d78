// tdaq_pkg - types and constants shared by the TR-TD acquisition FPGA.
//
// The module digitises four inputs with 12-bit, 200 MSPS ADCs. Software
// selects one of three acquisition architectures: four channels at 200 MSPS,
// two channels at 400 MSPS (two ADCs per channel, clocks 180 degrees apart)
// or one channel at 800 MSPS (four ADCs, clocks 90 degrees apart). The
// per-ADC clock phases below are those programmed into the clock
// distribution chip for each mode. ADC k (0-based) is taken to be driven by
// clock output k+1.
//
// Corrected samples travel as signed 16-bit values. Each logical channel
// carries them as a word of four samples, which is 8 bytes: the width of the
// storage path to DDR memory. Time stamps count 1.25 ns ticks, one sample
// period of the fastest (800 MSPS) mode.
package tdaq_pkg;

  localparam int unsigned N_ADC        = 4;   // ADCs / analogue inputs
  localparam int unsigned ADC_BITS     = 12;  // ADC resolution
  localparam int unsigned SAMPLE_W     = 16;  // corrected sample container
  localparam int unsigned WORD_SAMPLES = 4;   // samples per 64-bit word
  localparam int unsigned TS_W         = 48;  // time stamp width (1.25 ns ticks)
  localparam int unsigned REC_W        = 64;  // storage word: 8 bytes

  typedef logic signed [SAMPLE_W-1:0]          sample_t;
  typedef sample_t [WORD_SAMPLES-1:0]          sample_word_t; // [0] is the oldest
  typedef logic [TS_W-1:0]                     ts_t;

  // Acquisition architecture selected by software.
  typedef enum logic [1:0] {
    MODE_4CH = 2'd0,   // 4 channels x 200 MSPS
    MODE_2CH = 2'd1,   // 2 channels x 400 MSPS
    MODE_1CH = 2'd2    // 1 channel  x 800 MSPS
  } acq_mode_e;

  // Trigger source of a channel.
  typedef enum logic [1:0] {
    TRIG_AUTO     = 2'd0,  // level crossing of the signal itself
    TRIG_EXTERNAL = 2'd1,  // module-level trigger input
    TRIG_SOFTWARE = 2'd2,  // forced by the controller
    TRIG_OFF      = 2'd3
  } trig_src_e;

  // Shaping filter ahead of the pulse height detector.
  typedef enum logic [1:0] {
    FILT_MA   = 2'd0,   // moving average of MA_LEN samples
    FILT_TRI  = 2'd1,   // two cascaded MA_LEN averages: triangular response
    FILT_TRAP = 2'd2    // MA_LEN then 2*MA_LEN average: trapezoidal response
  } filt_e;

  // Record types written to memory (top nibble of the first word).
  typedef enum logic [3:0] {
    REC_RAW    = 4'h1,  // header + sample words of one pulse
    REC_RESULT = 4'h2,  // pulse height and shape result of one pulse
    REC_TDC    = 4'h3   // one time-to-digital converter hit
  } rec_type_e;

  // Run-time configuration written by the controller.
  typedef struct packed {
    acq_mode_e                    mode;         // acquisition architecture
    logic                         raw_enable;   // store raw pulse records
    filt_e                        filt;         // pulse height shaping filter
    trig_src_e [N_ADC-1:0]        trig_src;     // per logical channel
    sample_t   [N_ADC-1:0]        threshold;    // auto-trigger level
    logic      [N_ADC-1:0][15:0]  gain;         // per ADC, Q2.14
    sample_t   [N_ADC-1:0]        offset;       // per ADC, sample units
    logic      [15:0]             tail_start;   // PSD tail start in window
    logic      [15:0]             ratio_limit;  // PSD tail/total limit, 1/256
  } tdaq_cfg_t;

  // Number of ADCs merged into one logical channel.
  function automatic int unsigned adcs_per_channel(acq_mode_e m);
    case (m)
      MODE_2CH: return 2;
      MODE_1CH: return 4;
      default:  return 1;
    endcase
  endfunction

  // Logical channel fed by ADC a.
  function automatic logic [1:0] adc_channel(acq_mode_e m, logic [1:0] a);
    case (m)
      MODE_2CH: return {1'b0, a[1]};
      MODE_1CH: return 2'd0;
      default:  return a;
    endcase
  endfunction

  // Clock phase of ADC a, in quarter periods of 200 MHz (units of 90 deg):
  // 4 ch: 0,0,0,0   2 ch: 0,180,0,180   1 ch: 0,90,180,270.
  function automatic logic [1:0] adc_phase(acq_mode_e m, logic [1:0] a);
    case (m)
      MODE_2CH: return {a[0], 1'b0};
      MODE_1CH: return a;
      default:  return 2'd0;
    endcase
  endfunction

endpackage
