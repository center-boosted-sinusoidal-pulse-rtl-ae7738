// Testbench for sample_tick_gen: runs a 10 kHz and a 30 kHz instance from one 50 MHz clock
// and checks every strobe against floor(n*OUT_HZ/CLK_HZ) stepping, the strobe count over a
// 10000-clock window and the coincidence of every third 30 kHz strobe with a 10 kHz strobe.
module tb_sample_tick_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick10, tick30;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  sample_tick_gen #(.CLK_HZ(50_000_000), .OUT_HZ(10_000)) dut10 (.clk, .rst_n, .tick(tick10));
  sample_tick_gen #(.CLK_HZ(50_000_000), .OUT_HZ(30_000)) dut30 (.clk, .rst_n, .tick(tick30));

  function automatic logic expected(longint n, longint out_hz);
    return (n * out_hz) / 50_000_000 != ((n - 1) * out_hz) / 50_000_000;
  endfunction

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n;
    int c10, c30, coincide;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    c10 = 0; c30 = 0; coincide = 0;
    for (n = 1; n <= 30_000; n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (tick10 !== expected(n, 10_000) || tick30 !== expected(n, 30_000)) begin
        failures++;
        if (failures < 10) $display("clock %0d: tick10=%0b tick30=%0b", n, tick10, tick30);
      end
      if (n <= 10_000) begin
        c10 += tick10; c30 += tick30;
      end
      if (tick10 && tick30) coincide++;
    end
    checks++;
    if (c10 != 2 || c30 != 6) begin
      failures++; $display("strobes in 10000 clocks: %0d and %0d, expected 2 and 6", c10, c30);
    end
    checks++;
    if (coincide != 6) begin
      failures++; $display("coinciding strobes %0d, expected 6", coincide);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
