// Testbench for triangle_carrier at its full size (5000-clock half period): follows an
// independent model of the triangle for three periods, checks the inverted output, that
// at_peak marks exactly the +2500 clock, and that peaks are 10000 clocks (5 kHz) apart.
module tb_triangle_carrier;
  import cbspwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  carrier_t tri_out, tri_inv;
  logic at_peak;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  triangle_carrier dut (.clk, .rst_n, .tri_out, .tri_inv, .at_peak);

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, phase, exp, last_peak, peaks;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    last_peak = -1; peaks = 0;
    for (n = 0; n < 30_000; n++) begin
      // n clocks after reset release the value is the triangle of period 10000 at phase n
      phase = n % 10_000;
      exp = (phase <= 5000) ? phase - 2500 : 7500 - phase;
      #1;
      checks++;
      if (int'(tri_out) != exp || int'(tri_inv) != -exp || at_peak != (exp == 2500)) begin
        failures++;
        if (failures < 10) $display("clock %0d: tri %0d inv %0d peak %0b expected %0d", n, tri_out, tri_inv, at_peak, exp);
      end
      if (at_peak) begin
        if (last_peak >= 0) begin
          checks++;
          if (n - last_peak != 10_000) begin failures++; $display("peak spacing %0d", n - last_peak); end
        end
        last_peak = n; peaks++;
      end
      @(posedge clk);
    end
    checks++;
    if (peaks != 3) begin failures++; $display("%0d peaks in 3 periods", peaks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
