// 8-bit linear feedback shift register: pseudo random binary sequence for carrier selection.
//
// Cells b1..b8 are state[0]..state[7]. On each `step` the register shifts from b1 towards
// b8 and the feedback bit b4 ^ b5 ^ b6 ^ b8 enters b1 (polynomial x^8 + x^6 + x^5 + x^4 + 1,
// period 255 for any non-zero seed). The PRBS bit `prbs` is b1, the newest bit. The taps and
// register length are the published ones; the seed (8'h02) and the reset are this
// implementation's choices. An all-zero state would lock up, so the seed must be non-zero.
//
// Timing: `state` and `prbs` change in the clock after `step` is sampled high.
module lfsr_prbs #(
  parameter int unsigned WIDTH = 8,
  parameter logic [WIDTH-1:0] SEED = 8'h02
) (
  input  logic             clk,
  input  logic             rst_n,    // synchronous, active low
  input  logic             step,
  output logic [WIDTH-1:0] state,
  output logic             prbs
);

  logic feedback;

  assign feedback = state[3] ^ state[4] ^ state[5] ^ state[7];   // x(4), x(5), x(6), x(8)
  assign prbs     = state[0];

  always_ff @(posedge clk) begin
    if (!rst_n)
      state <= SEED;
    else if (step)
      state <= {state[WIDTH-2:0], feedback};
  end

  initial assert (WIDTH == 8) else $error("feedback taps are those of an 8-bit register");
  initial assert (SEED != '0) else $error("SEED must be non-zero");

  a_no_lockup: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
