// End-to-end testbench for cbspwm_top at its default (full) size: 50 MHz clock, 200-sample
// references, 5 kHz carrier. Runs one complete 50 Hz cycle (1,000,000 clocks) at modulation
// index 0.8 and a second at 1.2, and checks:
//  * every reference sample of all three phases against a model computed here with $sin
//    (fundamental at addresses k, k+133, k+67; third harmonic at 100+3k; boost window;
//    scaling to carrier units),
//  * every gate, every clock, against the comparison of the previous clock's reference and
//    carrier, and the complementary pairs 1/4, 3/6, 5/2,
//  * the carrier: 100 PRBS steps per 20 ms (5 kHz) and that the carrier is the triangle or its
//    inverse according to the PRBS bit,
//  * the fundamental of leg a's pulse train against the fundamental of the (clipped) model
//    reference, within 3 %.
// Mechanisms counted (each must occur): boosted samples, periods on the regular and on the
// inverted triangle, carrier jumps at a selection change, and dropped pulses (over-modulation).
module tb_cbspwm_top;
  import cbspwm_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  ma_t  ma;
  logic [5:0] pwm;
  scaled_t ref_a, ref_b, ref_c;
  carrier_t carrier;
  logic prbs;
  logic [7:0] lfsr_state;

  int checks = 0, failures = 0;
  int n_boost = 0, n_tri = 0, n_inv = 0, n_jump = 0, n_dropped = 0;

  always #10 clk = ~clk;

  cbspwm_top dut (.clk, .rst_n, .ma, .pwm, .ref_a, .ref_b, .ref_c, .carrier, .prbs, .lfsr_state);

  function automatic longint s(int k);
    real v;
    v = 1024.0 * $sin(2.0 * PI * k / 200.0);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic bit in_window(int f);
    real a;
    a = 360.0 * f / 200.0;
    return (a > 60.0 && a < 120.0) || (a > 240.0 && a < 300.0);
  endfunction

  // Reference of one phase in carrier units (floor division by 2^21 after * 2500).
  function automatic longint model_ref(int f, int t, int m);
    longint r, p;
    r = s(f) * m + (in_window(f) ? s(t) * (m / 3) : 0);
    p = r * 2500;
    return (p >= 0) ? p / 2097152 : -((-p + 2097151) / 2097152);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("%s", msg);
  endtask

  initial begin
    repeat (2_200_000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One 50 Hz cycle at index m (Q1.11); n counts clocks since reset release.
  task automatic run_cycle(int m, int cycle);
    scaled_t  pa, pb, pc;
    carrier_t pcar;
    logic [7:0] plfsr;
    logic pprbs, pgate;
    int steps, run;
    longint e;
    int k, fa;
    real re_p, im_p, re_r, im_r, ang, amp_p, amp_r, rv;
    steps = 0; run = 0;
    re_p = 0.0; im_p = 0.0; re_r = 0.0; im_r = 0.0;
    pa = ref_a; pb = ref_b; pc = ref_c; pcar = carrier; plfsr = lfsr_state; pprbs = prbs;
    pgate = pwm[0];
    for (int n = 1; n <= 1_000_000; n++) begin
      @(posedge clk);
      #1;
      // gates: registered comparison of the previous clock's reference and carrier
      checks++;
      if (pwm[0] != (pa > pcar) || pwm[2] != (pb > pcar) || pwm[4] != (pc > pcar))
        fail($sformatf("clock %0d: gates %b", n, pwm));
      checks++;
      if (pwm[3] != !pwm[0] || pwm[5] != !pwm[2] || pwm[1] != !pwm[4])
        fail($sformatf("clock %0d: pairs not complementary %b", n, pwm));
      // carrier choice
      if (prbs) n_tri++; else n_inv++;
      if (lfsr_state != plfsr) begin
        steps++;
        checks++;
        if (pcar != 13'sd2500 && pcar != -13'sd2500) fail($sformatf("clock %0d: PRBS stepped away from the peak", n));
      end
      if (carrier - pcar > 1 || pcar - carrier > 1) n_jump++;
      // dropped pulses: a gate level held longer than one carrier period
      if (pwm[0] == pgate) run++;
      else run = 0;
      if (run == 10_001) n_dropped++;
      // reference samples, checked 1000 clocks into each 100 us sample period
      k = (n - 1000) / 5000;
      if ((n - 1000) % 5000 == 0 && n >= 1000) begin
        for (int ph = 0; ph < 3; ph++) begin
          fa = (k + (ph == 0 ? 0 : ph == 1 ? 133 : 67)) % 200;
          e = model_ref(fa, (100 + 3 * k) % 200, m);
          checks++;
          if (longint'(ph == 0 ? ref_a : ph == 1 ? ref_b : ref_c) != e)
            fail($sformatf("cycle %0d sample %0d phase %0d: %0d expected %0d", cycle, k, ph,
                           ph == 0 ? ref_a : ph == 1 ? ref_b : ref_c, e));
          if (in_window(fa) && s((100 + 3 * k) % 200) != 0 && m >= 3) n_boost++;
        end
      end
      // fundamental of leg a (+1/-1) and of the clipped model reference
      ang = 2.0 * PI * (n - 1) / 1_000_000.0;
      re_p += (pwm[0] ? 1.0 : -1.0) * $cos(ang);
      im_p += (pwm[0] ? 1.0 : -1.0) * $sin(ang);
      rv = real'(pa) / 2500.0;
      if (rv > 1.0) rv = 1.0;
      if (rv < -1.0) rv = -1.0;
      re_r += rv * $cos(ang);
      im_r += rv * $sin(ang);
      pa = ref_a; pb = ref_b; pc = ref_c; pcar = carrier; plfsr = lfsr_state; pprbs = prbs;
      pgate = pwm[0];
    end
    checks++;
    if (steps != 100) fail($sformatf("cycle %0d: %0d PRBS steps, expected 100", cycle, steps));
    amp_p = 2.0 * $sqrt(re_p * re_p + im_p * im_p) / 1_000_000.0;
    amp_r = 2.0 * $sqrt(re_r * re_r + im_r * im_r) / 1_000_000.0;
    $display("ma=%0.3f: leg fundamental %0.4f (model %0.4f), linear sine-triangle value %0.4f",
             real'(m) / 2048.0, amp_p, amp_r, real'(m) / 2048.0);
    checks++;
    if (amp_p < 0.97 * amp_r || amp_p > 1.03 * amp_r)
      fail($sformatf("cycle %0d: fundamental %f, model %f", cycle, amp_p, amp_r));
  endtask

  initial begin
    ma = MA_W'(1638);                    // 0.8
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    // the first sample period starts right at reset release: align the loop counter
    run_cycle(1638, 0);
    ma = MA_W'(2458);                    // 1.2, over-modulation
    run_cycle(2458, 1);
    $display("boosted samples %0d, clocks on triangle %0d, on inverted %0d, carrier jumps %0d, dropped pulses %0d",
             n_boost, n_tri, n_inv, n_jump, n_dropped);
    checks++;
    if (n_boost == 0 || n_tri == 0 || n_inv == 0 || n_jump == 0 || n_dropped == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
