// Center-boosted sinusoidal PWM with random carrier selection, for a two-level three-phase
// voltage source inverter.
//
// Reference path: a 10 kHz and a 30 kHz sample strobe (fractional dividers of the 50 MHz
// clock) step the 50 Hz and 150 Hz address counters through a 200-entry sine memory. Each
// phase forms ma*sin(a), plus (ma/3) times the 180-degree-shifted third harmonic inside the
// centre 60 degrees of each half cycle, which lifts the middle of the reference (higher
// fundamental for the same peak).
// Carrier path: one 5 kHz triangle and its inverse; once per carrier period an 8-bit LFSR
// picks which of the two is used for the next period (1 = triangle, 0 = inverted), which
// spreads the harmonics around multiples of the switching frequency.
// Each phase's reference is compared with the common carrier to give a complementary gate
// pair.
//
// The three phases read the sine memory at start addresses 0, 133 and 67 (-120 and -240
// degrees, rounded to the 1.8 degree grid); the third-harmonic counter is shared, since the
// third harmonic is the same in all three phases. Gate numbering follows the usual bridge
// convention: leg a = pwm1 (upper) / pwm4 (lower), leg b = pwm3 / pwm6, leg c = pwm5 / pwm2;
// pwm[k-1] carries pwm k. The phase derivation, numbering, Q1.11 `ma` input and the
// carrier-unit scaling are this implementation's choices; everything else follows the
// published design.
//
// Timing: all logic runs on `clk` (50 MHz) with synchronous active-low reset. A reference
// sample reaches the comparator 4 clocks after its address strobe; gates are registered.
// A full 50 Hz reference cycle is 1,000,000 clocks; a carrier period is 10,000 clocks.
module cbspwm_top
  import cbspwm_pkg::*;
#(
  parameter int unsigned P_CLK_HZ          = CLK_HZ,
  parameter int unsigned P_FUND_SAMPLE_HZ  = FUND_SAMPLE_HZ,
  parameter int unsigned P_THIRD_SAMPLE_HZ = THIRD_SAMPLE_HZ,
  parameter int unsigned P_HALF_PERIOD     = CARRIER_HALF_PERIOD
) (
  input  logic     clk,
  input  logic     rst_n,       // synchronous, active low
  input  ma_t      ma,          // modulation index, Q1.11
  output logic [5:0] pwm,       // pwm[k-1] = gate k
  output scaled_t  ref_a,       // references in carrier units
  output scaled_t  ref_b,
  output scaled_t  ref_c,
  output carrier_t carrier,     // resultant carrier
  output logic     prbs,        // current carrier choice, 1 = triangle
  output logic [7:0] lfsr_state // PRBS register b8..b1
);

  localparam int unsigned AW = $clog2(SAMPLES);
  localparam int unsigned PHASE_START [3] = '{0, (2 * SAMPLES + 1) / 3, (SAMPLES + 1) / 3};

  // ---------------- sample strobes and address counters
  logic tick_fund, tick_third;

  sample_tick_gen #(.CLK_HZ(P_CLK_HZ), .OUT_HZ(P_FUND_SAMPLE_HZ)) u_tick_10k (
    .clk(clk), .rst_n(rst_n), .tick(tick_fund));

  sample_tick_gen #(.CLK_HZ(P_CLK_HZ), .OUT_HZ(P_THIRD_SAMPLE_HZ)) u_tick_30k (
    .clk(clk), .rst_n(rst_n), .tick(tick_third));

  logic [AW-1:0] third_addr;
  address_counter #(.DEPTH(SAMPLES), .START(SAMPLES / 2)) u_addr_third (
    .clk(clk), .rst_n(rst_n), .en(tick_third), .addr(third_addr));

  // ---------------- carrier
  carrier_t tri_w, tri_inv_w;
  logic     at_peak;

  triangle_carrier #(.HALF_PERIOD(P_HALF_PERIOD)) u_carrier (
    .clk(clk), .rst_n(rst_n), .tri_out(tri_w), .tri_inv(tri_inv_w), .at_peak(at_peak));

  carrier_selector u_carrier_selector (
    .clk(clk), .rst_n(rst_n), .tri_in(tri_w), .tri_inv(tri_inv_w), .at_peak(at_peak),
    .carrier(carrier), .prbs(prbs), .lfsr_state(lfsr_state));

  // ---------------- per-phase reference and comparator
  scaled_t ref_s [3];
  logic    gate_hi [3];
  logic    gate_lo [3];

  for (genvar ph = 0; ph < 3; ph++) begin : g_phase
    logic [AW-1:0] fund_addr;
    ref_t          ref_w;

    address_counter #(.DEPTH(SAMPLES), .START(PHASE_START[ph])) u_addr_fund (
      .clk(clk), .rst_n(rst_n), .en(tick_fund), .addr(fund_addr));

    boosted_reference #(.DEPTH(SAMPLES)) u_ref (
      .clk(clk), .rst_n(rst_n), .ma(ma), .fund_addr(fund_addr), .third_addr(third_addr),
      .ref_out(ref_w));

    pwm_comparator #(.CARRIER_AMP_P(P_HALF_PERIOD / 2), .SHIFT(REF_SHIFT)) u_cmp (
      .clk(clk), .rst_n(rst_n), .ref_in(ref_w), .carrier(carrier),
      .ref_scaled(ref_s[ph]), .gate_hi(gate_hi[ph]), .gate_lo(gate_lo[ph]));
  end

  assign ref_a = ref_s[0];
  assign ref_b = ref_s[1];
  assign ref_c = ref_s[2];

  // Bridge numbering: 1/4 leg a, 3/6 leg b, 5/2 leg c.
  assign pwm[0] = gate_hi[0];   // pwm1
  assign pwm[3] = gate_lo[0];   // pwm4
  assign pwm[2] = gate_hi[1];   // pwm3
  assign pwm[5] = gate_lo[1];   // pwm6
  assign pwm[4] = gate_hi[2];   // pwm5
  assign pwm[1] = gate_lo[2];   // pwm2

endmodule
