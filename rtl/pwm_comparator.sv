// Reference-to-carrier comparator for one inverter leg.
//
// The reference (2^REF_SHIFT = 1.0) is first converted to carrier units by multiplying by
// CARRIER_AMP and shifting right by REF_SHIFT, so that a modulation index of 1 gives a
// reference peak equal to the carrier peak (M_a = V_sin / V_tri). The upper switch is on
// while the reference is above the carrier; the lower switch gets the complement. Comparing
// reference with carrier is the published method; the scaling, the ">" rule and the absence
// of dead time are this implementation's choices. Both gates are off during reset.
//
// Timing: `ref_scaled` is combinational from `ref_in`; the gates are registered, one clock
// after the inputs.
module pwm_comparator
  import cbspwm_pkg::*;
#(
  parameter int unsigned CARRIER_AMP_P = CARRIER_AMP,
  parameter int unsigned SHIFT         = REF_SHIFT
) (
  input  logic     clk,
  input  logic     rst_n,     // synchronous, active low
  input  ref_t     ref_in,
  input  carrier_t carrier,
  output scaled_t  ref_scaled,
  output logic     gate_hi,
  output logic     gate_lo
);

  localparam int unsigned PROD_W = REF_W + 14;

  logic signed [PROD_W-1:0] product;

  assign product    = PROD_W'(ref_in) * $signed({1'b0, 13'(CARRIER_AMP_P)});
  assign ref_scaled = scaled_t'(product >>> SHIFT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gate_hi <= 1'b0;
      gate_lo <= 1'b0;
    end else begin
      gate_hi <= (ref_scaled > SCALED_W'(carrier));
      gate_lo <= !(ref_scaled > SCALED_W'(carrier));
    end
  end

  // Shoot-through guard: the two switches of a leg are never on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(gate_hi && gate_lo));

endmodule
