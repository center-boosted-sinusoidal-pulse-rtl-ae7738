// Testbench for boosted_reference: applies address pairs and modulation indices and compares
// the output, three clocks later, with
//   s(f)*ma + [window(f)] * s(t)*floor(ma/3),   s(k) = round(1024 sin(2 pi k/200)),
// where window(f) is pi/3 < 2 pi f/200 < 2pi/3 or 4pi/3 < 2 pi f/200 < 5pi/3, evaluated here
// in real arithmetic. Window edges (33/34, 66/67, 133/134, 166/167) are always covered; the
// output must not move before the third clock (pipeline latency).
module tb_boosted_reference;
  import cbspwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ma_t  ma;
  logic [7:0] fa, ta;
  ref_t ref_out;
  int checks = 0, failures = 0, boosted = 0;

  always #10 clk = ~clk;

  boosted_reference #(.DEPTH(200)) dut (.clk, .rst_n, .ma, .fund_addr(fa), .third_addr(ta), .ref_out);

  function automatic longint s(int k);
    real v;
    v = 1024.0 * $sin(2.0 * 3.14159265358979 * k / 200.0);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic bit in_window(int f);
    real a;
    a = 360.0 * f / 200.0;
    return (a > 60.0 && a < 120.0) || (a > 240.0 && a < 300.0);
  endfunction

  task automatic apply_check(int f, int t, int m);
    longint exp;
    @(negedge clk);
    fa = 8'(f); ta = 8'(t); ma = MA_W'(m);
    exp = s(f) * m + (in_window(f) ? s(t) * (m / 3) : 0);
    @(posedge clk); @(posedge clk); @(posedge clk);
    #1;
    checks++;
    if (longint'(ref_out) != exp) begin
      failures++;
      if (failures < 10) $display("f=%0d t=%0d ma=%0d: %0d expected %0d", f, t, m, ref_out, exp);
    end
    if (in_window(f) && s(t) != 0 && m >= 3) boosted++;
    // latency: a step to a different value must not show before the third clock
    @(negedge clk);
    fa = 8'((f + 50) % 200);
    @(posedge clk); @(posedge clk);
    #1;
    checks++;
    if (ref_out != ref_t'(exp)) begin
      failures++;
      if (failures < 10) $display("f=%0d: output changed before the third clock", f);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges [8] = '{33, 34, 66, 67, 133, 134, 166, 167};
    fa = '0; ta = '0; ma = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (edges[i]) apply_check(edges[i], (100 + 3 * edges[i]) % 200, 1638);   // ma = 0.8
    for (int f = 0; f < 200; f++) apply_check(f, (100 + 3 * f) % 200, 2048);          // ma = 1.0
    for (int i = 0; i < 300; i++)
      apply_check($urandom_range(0, 199), $urandom_range(0, 199), $urandom_range(0, 4095));
    checks++;
    if (boosted == 0) begin failures++; $display("no boosted sample was checked"); end
    $display("boosted samples checked: %0d", boosted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
