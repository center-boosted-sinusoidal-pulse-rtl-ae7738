// Random carrier selector: PRBS generator plus 2x1 multiplexer.
//
// Once per carrier period, in the clock where the regular triangle is at its positive peak
// (`at_peak`), the LFSR is stepped. Its new bit then chooses the carrier for the whole next
// period: 1 passes the regular triangle, 0 the inverted triangle. Changing the choice only
// at the peak means a switch from the triangle to its inverse jumps from +peak to -peak, the
// "resultant carrier" of the published figure. The rule "1 selects the regular triangle" is
// the published one; switching exactly at the peak is this implementation's choice.
//
// Timing: `prbs` and `carrier` switch in the clock after `at_peak`; the multiplexer itself
// is combinational.
module carrier_selector
  import cbspwm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,     // synchronous, active low
  input  carrier_t   tri_in,
  input  carrier_t   tri_inv,
  input  logic       at_peak,
  output carrier_t   carrier,
  output logic       prbs,
  output logic [7:0] lfsr_state
);

  lfsr_prbs #(.WIDTH(8), .SEED(8'h02)) u_bitgen (
    .clk(clk), .rst_n(rst_n), .step(at_peak), .state(lfsr_state), .prbs(prbs));

  always_comb carrier = prbs ? tri_in : tri_inv;

endmodule
