// Testbench for lfsr_prbs: steps the register at random times and compares every state with a
// model written as a Fibonacci register over the polynomial x^8+x^6+x^5+x^4+1 (feedback =
// parity of state & 8'hB8). Also checks the seed, that the sequence repeats after exactly 255
// steps, that all 255 non-zero states occur, and that prbs is the newest bit.
module tb_lfsr_prbs;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [7:0] state;
  logic prbs;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  lfsr_prbs #(.WIDTH(8), .SEED(8'h02)) dut (.clk, .rst_n, .step, .state, .prbs);

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model;
    bit seen [256];
    int steps, distinct, first_return;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (state != 8'h02) begin failures++; $display("seed %h", state); end
    rst_n <= 1'b1;
    model = 8'h02; steps = 0; first_return = 0;
    while (steps < 600) begin
      step = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (step) begin
        model = {model[6:0], ^(model & 8'hB8)};
        steps++;
        if (model == 8'h02 && first_return == 0) first_return = steps;
        if (steps <= 255) seen[model] = 1'b1;
      end
      #1;
      checks++;
      if (state != model || prbs != model[0]) begin
        failures++;
        if (failures < 10) $display("step %0d: state %h prbs %0b expected %h", steps, state, prbs, model);
      end
    end
    distinct = 0;
    foreach (seen[i]) distinct += seen[i];
    checks++;
    if (first_return != 255 || distinct != 255 || seen[0]) begin
      failures++; $display("period %0d, distinct states %0d", first_return, distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
