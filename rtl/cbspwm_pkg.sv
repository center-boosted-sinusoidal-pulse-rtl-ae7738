// Shared constants and types of the center-boosted random-carrier PWM generator.
//
// Number formats used throughout:
//   sine_t   : signed sine-memory sample, full scale +/-1024 (one sample per 1.8 degrees,
//              200 samples per cycle).
//   ma_t     : unsigned modulation index, Q1.11 (2048 = 1.0), range 0 .. 1.9995.
//   ref_t    : signed reference, 1024*2048 = 2^21 represents 1.0 (carrier peak).
//   carrier_t: signed carrier, +/-CARRIER_AMP represents +/-1.0.
//   scaled_t : reference converted to carrier units.
// The 50 MHz clock, 200 samples per cycle, the 1024 peak, the 10/30 kHz sample rates and the
// 5 kHz carrier are the published design's numbers; the word widths and the carrier amplitude
// are this implementation's choice.
package cbspwm_pkg;

  localparam int unsigned CLK_HZ          = 50_000_000;
  localparam int unsigned SAMPLES         = 200;       // sine samples per cycle
  localparam int unsigned FUND_SAMPLE_HZ  = 10_000;    // 50 Hz fundamental x 200
  localparam int unsigned THIRD_SAMPLE_HZ = 30_000;    // 150 Hz third harmonic x 200
  localparam int unsigned CARRIER_HZ      = 5_000;

  localparam int unsigned ADDR_W   = 8;
  localparam int unsigned SINE_W   = 12;
  localparam int unsigned MA_W     = 12;
  localparam int unsigned MA_FRAC  = 11;
  localparam int unsigned REF_W    = 26;
  localparam int unsigned REF_SHIFT = 10 + MA_FRAC;   // log2(SINE_PEAK) + MA_FRAC
  localparam int unsigned CAR_W    = 13;
  localparam int unsigned SCALED_W = 14;

  // Clocks per carrier half period, and the carrier amplitude (one count per clock).
  localparam int unsigned CARRIER_HALF_PERIOD = CLK_HZ / CARRIER_HZ / 2;   // 5000
  localparam int unsigned CARRIER_AMP         = CARRIER_HALF_PERIOD / 2;   // 2500

  typedef logic        [ADDR_W-1:0]   addr_t;
  typedef logic signed [SINE_W-1:0]   sine_t;
  typedef logic        [MA_W-1:0]     ma_t;
  typedef logic signed [REF_W-1:0]    ref_t;
  typedef logic signed [CAR_W-1:0]    carrier_t;
  typedef logic signed [SCALED_W-1:0] scaled_t;

endpackage
