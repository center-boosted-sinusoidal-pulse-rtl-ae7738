// Modulation-index sweep of cbspwm_top at full size: one 50 Hz cycle (1,000,000 clocks) at
// each of the indices 0.2, 0.4, 0.6, 0.8, 1.0 and 1.2. For each it measures, by a discrete
// Fourier transform over the cycle, the fundamental of leg a (pulses taken as +1/-1, i.e.
// in units of Vdc/2) and of the line-to-line pulse voltage a-b, and checks:
//  * the leg fundamental is within 3 % of the fundamental of the clipped boosted reference;
//  * the line-to-line fundamental is sqrt(3) times the leg fundamental within 3 %;
//  * the fundamental grows with the index.
// It prints the gain over the plain sine-triangle value (the index itself) for comparison.
module tb_modulation_sweep;
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

  always #10 clk = ~clk;

  cbspwm_top dut (.clk, .rst_n, .ma, .pwm, .ref_a, .ref_b, .ref_c, .carrier, .prbs, .lfsr_state);

  initial begin
    repeat (6_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx [6] = '{410, 819, 1229, 1638, 2048, 2458};   // 0.2 .. 1.2 in Q1.11
    real prev_amp;
    ma = MA_W'(idx[0]);
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    prev_amp = 0.0;
    foreach (idx[i]) begin
      real re_p, im_p, re_l, im_l, re_r, im_r, ang, rv, c, s, amp_p, amp_l, amp_r;
      scaled_t pa;
      ma = MA_W'(idx[i]);
      // let the new index reach the comparators
      repeat (10) @(posedge clk);
      #1 pa = ref_a;
      re_p = 0.0; im_p = 0.0; re_l = 0.0; im_l = 0.0; re_r = 0.0; im_r = 0.0;
      for (int n = 0; n < 1_000_000; n++) begin
        @(posedge clk);
        #1;
        ang = 2.0 * PI * n / 1_000_000.0;
        c = $cos(ang); s = $sin(ang);
        re_p += (pwm[0] ? 1.0 : -1.0) * c;
        im_p += (pwm[0] ? 1.0 : -1.0) * s;
        re_l += (real'(pwm[0]) - real'(pwm[2])) * 2.0 * c;
        im_l += (real'(pwm[0]) - real'(pwm[2])) * 2.0 * s;
        rv = real'(pa) / 2500.0;
        if (rv > 1.0) rv = 1.0;
        if (rv < -1.0) rv = -1.0;
        re_r += rv * c;
        im_r += rv * s;
        pa = ref_a;
      end
      amp_p = 2.0 * $sqrt(re_p * re_p + im_p * im_p) / 1_000_000.0;
      amp_l = 2.0 * $sqrt(re_l * re_l + im_l * im_l) / 1_000_000.0;
      amp_r = 2.0 * $sqrt(re_r * re_r + im_r * im_r) / 1_000_000.0;
      $display("ma=%0.2f: leg %0.4f (reference %0.4f), line-line %0.4f, gain over sine-triangle %0.3f",
               real'(idx[i]) / 2048.0, amp_p, amp_r, amp_l, amp_p * 2048.0 / real'(idx[i]));
      checks++;
      if (amp_p < 0.97 * amp_r || amp_p > 1.03 * amp_r) begin
        failures++; $display("  leg fundamental off the reference fundamental");
      end
      checks++;
      if (amp_l < 0.97 * $sqrt(3.0) * amp_p || amp_l > 1.03 * $sqrt(3.0) * amp_p) begin
        failures++; $display("  line-line fundamental is not sqrt(3) x leg");
      end
      checks++;
      if (amp_p <= prev_amp) begin failures++; $display("  fundamental did not grow"); end
      prev_amp = amp_p;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
