// Testbench for pwm_comparator: random references (full scale 2^21) and carriers
// (full scale 2500); checks the scaled reference floor(ref*2500 / 2^21) and, one clock later,
// gate_hi = (scaled > carrier) and gate_lo = its complement, including equal values and the
// full-scale points.
module tb_pwm_comparator;
  import cbspwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ref_t ref_in;
  carrier_t carrier;
  scaled_t ref_scaled;
  logic gate_hi, gate_lo;
  int checks = 0, failures = 0, highs = 0, lows = 0;

  always #10 clk = ~clk;

  pwm_comparator dut (.clk, .rst_n, .ref_in, .carrier, .ref_scaled, .gate_hi, .gate_lo);

  function automatic longint scaled(longint r);
    longint p;
    p = r * 2500;
    return (p >= 0) ? p / 2097152 : -((-p + 2097151) / 2097152);   // floor division
  endfunction

  task automatic check(longint r, int c);
    longint sc;
    ref_in = ref_t'(r); carrier = carrier_t'(c);
    sc = scaled(r);
    #1;
    checks++;
    if (longint'(ref_scaled) != sc) begin
      failures++;
      if (failures < 10) $display("ref %0d: scaled %0d expected %0d", r, ref_scaled, sc);
    end
    @(posedge clk);
    #1;
    checks++;
    if (gate_hi != (sc > longint'(c)) || gate_lo != !(sc > longint'(c))) begin
      failures++;
      if (failures < 10) $display("ref %0d carrier %0d: hi %0b lo %0b", r, c, gate_hi, gate_lo);
    end
    if (gate_hi) highs++; else lows++;
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_in = '0; carrier = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (gate_hi || gate_lo) begin failures++; $display("gates on during reset"); end
    rst_n <= 1'b1;
    check(2097152, 2500); check(2097152, 2499); check(-2097152, -2500); check(-2097152, -2501);
    check(0, 0); check(0, -1); check(1000000, 1192); check(1000000, 1193);
    for (int i = 0; i < 2000; i++)
      check(longint'($urandom_range(0, 6_000_000)) - 3_000_000, int'($urandom_range(0, 5000)) - 2500);
    checks++;
    if (highs == 0 || lows == 0) begin failures++; $display("only one gate state seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
