// voice_pkg: types and constants shared by the voice-link blocks.
//
// The system samples a voice signal with a 14-bit SPI ADC, keeps 12 bits,
// adds an echo or a reverb built from a 4096 x 12 delay memory, sends each
// processed sample to a second FPGA in a 28-bit frame (15 ones, one zero,
// 12 data bits) and plays it out through a 12-bit SPI DAC.
//
// The effect delays are held here in samples of the delay line. They follow
// the delays of the echo and reverb tables (0.32 s / 0.128 s for the echo,
// 0.04..0.32 s and 0.016..0.128 s for the reverb) at a delay-line rate of
// 12.5 kHz: the ADC runs at 25 kHz and the stream is down-sampled by two
// before the delay line. That rate is this design's reading; it is the rate at
// which every listed delay fits the 4096-entry memory.
package voice_pkg;

  localparam int unsigned SAMPLE_W = 12;   // width of a processed sample
  localparam int unsigned ADC_W    = 14;   // LTC1407A-1 result width
  localparam int unsigned FRAME_W  = 28;   // 16 sync bits + 12 data bits
  localparam int unsigned SYNC_W   = 16;
  // 15 ones followed by a zero, sent first.
  localparam logic [SYNC_W-1:0] SYNC_PATTERN = 16'hFFFE;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Effect selection: echo or reverb, each with two delay settings.
  typedef enum logic [1:0] {
    ECHO_M1   = 2'd0,
    ECHO_M2   = 2'd1,
    REVERB_M1 = 2'd2,
    REVERB_M2 = 2'd3
  } effect_mode_t;

  localparam int unsigned NTAPS = 4;

  // Delay of tap t (in delay-line samples) for a mode. Echo uses tap 0 only.
  function automatic int unsigned tap_delay(effect_mode_t m, int unsigned t);
    case (m)
      ECHO_M1:   return 4000;                 // 0.32 s
      ECHO_M2:   return 1600;                 // 0.128 s
      REVERB_M1: return 500 << t;             // 0.04, 0.08, 0.16, 0.32 s
      default:   return 200 << t;             // 0.016, 0.032, 0.064, 0.128 s
    endcase
  endfunction

  // Right shift applied to tap t: echo gain 1, reverb gains 1/2 .. 1/16.
  function automatic int unsigned tap_shift(effect_mode_t m, int unsigned t);
    if (m == ECHO_M1 || m == ECHO_M2) return 0;
    return t + 1;
  endfunction

  // Number of taps a mode uses.
  function automatic int unsigned tap_count(effect_mode_t m);
    if (m == ECHO_M1 || m == ECHO_M2) return 1;
    return NTAPS;
  endfunction

endpackage
