// Testbench for carrier_selector: feeds a short triangle (amplitude 20) and its negative with
// a peak strobe, and checks each clock that the output carrier is the triangle while the
// model PRBS bit is 1 and the inverted triangle while it is 0, that the choice changes only
// in the clock after a peak, and that both choices occur.
module tb_carrier_selector;
  import cbspwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  carrier_t tri_in, tri_inv, carrier;
  logic at_peak, prbs;
  logic [7:0] lfsr_state;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  carrier_selector dut (.clk, .rst_n, .tri_in, .tri_inv, .at_peak, .carrier, .prbs, .lfsr_state);

  assign tri_inv = -tri_in;
  assign at_peak = (tri_in == 20);

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model;
    int ph, n_tri, n_inv, switches;
    logic prev_prbs;
    tri_in = -20;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    model = 8'h02; n_tri = 0; n_inv = 0; switches = 0; prev_prbs = 0;
    for (int n = 0; n < 80 * 100; n++) begin
      @(negedge clk);
      ph = n % 80;
      tri_in = carrier_t'((ph <= 40) ? ph - 20 : 60 - ph);
      #1;
      checks++;
      if (carrier != (model[0] ? tri_in : -tri_in) || prbs != model[0]) begin
        failures++;
        if (failures < 10) $display("clock %0d: carrier %0d prbs %0b model %h", n, carrier, prbs, model);
      end
      if (n > 0 && prbs != prev_prbs) begin
        switches++;
        checks++;
        if (ph != 41) begin failures++; $display("choice changed at phase %0d", ph); end
      end
      prev_prbs = prbs;
      if (model[0]) n_tri++; else n_inv++;
      if (at_peak) model = {model[6:0], model[7] ^ model[5] ^ model[4] ^ model[3]};
    end
    checks++;
    if (n_tri == 0 || n_inv == 0 || switches == 0) begin
      failures++; $display("triangle %0d, inverted %0d, switches %0d", n_tri, n_inv, switches);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
