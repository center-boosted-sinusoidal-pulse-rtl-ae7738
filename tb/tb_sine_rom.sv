// Testbench for sine_rom: reads all 200 entries (one clock read latency) and compares each
// with round(1024*sin(2*pi*k/200)) computed here with $sin, then checks the quarter-wave
// values 32, 64, 96, 724, 1022, 1023, 1024 at 1.8, 3.6, 5.4, 45, 86.4, 88.2 and 90 degrees.
module tb_sine_rom;
  logic clk = 1'b0;
  logic [7:0] addr = '0;
  logic signed [11:0] data;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  sine_rom #(.DEPTH(200), .DATA_W(12)) dut (.clk, .addr, .data);

  function automatic int ref_sample(int k);
    real v;
    v = 1024.0 * $sin(2.0 * 3.14159265358979 * k / 200.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  task automatic read_check(int k, int exp);
    addr = 8'(k);
    @(posedge clk);
    #1;
    checks++;
    if (int'(data) != exp) begin
      failures++;
      if (failures < 10) $display("entry %0d: %0d expected %0d", k, data, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int k = 0; k < 200; k++) read_check(k, ref_sample(k));
    read_check(1, 32);   read_check(2, 64);   read_check(3, 96);  read_check(25, 724);
    read_check(48, 1022); read_check(49, 1023); read_check(50, 1024);
    read_check(150, -1024); read_check(100, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
