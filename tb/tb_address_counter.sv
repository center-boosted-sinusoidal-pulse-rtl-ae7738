// Testbench for address_counter: a 150 Hz style counter (DEPTH 200, START 100) driven by
// random enables; each cycle the address is compared with a reference count, and the
// wrap 199 -> 0 and the start value after reset are checked explicitly.
module tb_address_counter;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] addr;
  int checks = 0, failures = 0;
  int model, wraps;

  always #10 clk = ~clk;

  address_counter #(.DEPTH(200), .START(100)) dut (.clk, .rst_n, .en, .addr);

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (addr != 8'd100) begin failures++; $display("reset value %0d", addr); end
    rst_n <= 1'b1;
    model = 100; wraps = 0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (en) begin
        model = (model + 1) % 200;
        if (model == 0) wraps++;
      end
      #1;
      checks++;
      if (addr != 8'(model)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: addr %0d expected %0d", i, addr, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
