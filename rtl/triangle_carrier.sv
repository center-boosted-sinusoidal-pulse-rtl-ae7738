// Triangle carrier and inverted triangle.
//
// An up/down counter moves one count per clock between -AMP and +AMP, so one carrier period
// is 2 * HALF_PERIOD clocks: 10000 clocks, i.e. 5 kHz at 50 MHz, as published. The inverted
// carrier is the negated count. Counting from -AMP to +AMP in steps of one clock makes
// AMP = HALF_PERIOD / 2; that amplitude, the signed count and the start at -AMP after reset
// are this implementation's choices.
//
// Timing: `tri_out` is registered. After reset it reads -AMP, reaches +AMP HALF_PERIOD
// clocks later, and is back at -AMP after 2*HALF_PERIOD clocks. `at_peak` is high in
// exactly the clock where `tri_out` equals +AMP, once per period.
module triangle_carrier
  import cbspwm_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = CARRIER_HALF_PERIOD
) (
  input  logic     clk,
  input  logic     rst_n,     // synchronous, active low
  output carrier_t tri_out,
  output carrier_t tri_inv,
  output logic     at_peak
);

  localparam int AMP = int'(HALF_PERIOD / 2);

  logic counting_up;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tri_out     <= carrier_t'(-AMP);
      counting_up <= 1'b1;
    end else if (counting_up) begin
      if (tri_out == carrier_t'(AMP - 1)) counting_up <= 1'b0;
      tri_out <= tri_out + 1'b1;
    end else begin
      if (tri_out == carrier_t'(-AMP + 1)) counting_up <= 1'b1;
      tri_out <= tri_out - 1'b1;
    end
  end

  assign tri_inv = -tri_out;
  assign at_peak = (tri_out == carrier_t'(AMP));

  initial assert (HALF_PERIOD % 2 == 0 && HALF_PERIOD / 2 < 2 ** (CAR_W - 1))
    else $error("HALF_PERIOD must be even and fit the carrier width");

endmodule
