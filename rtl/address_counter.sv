// Sine-memory address generator.
//
// A modulo-DEPTH up counter that advances by one on each sample strobe `en`, wrapping from
// DEPTH-1 to 0. Reset loads START. The published design uses one counter running 0..199
// for the 50 Hz fundamental (START = 0) and one running 100..199, 0..99 for the 150 Hz third
// harmonic (START = 100, i.e. a 180 degree shift of that wave). Starting at other addresses
// for the second and third phase is this implementation's choice.
//
// Timing: `addr` is registered and changes in the clock after `en` is sampled high.
module address_counter #(
  parameter int unsigned DEPTH = 200,
  parameter int unsigned START = 0,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,   // synchronous, active low
  input  logic          en,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      addr <= AW'(START);
    else if (en)
      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
  end

  initial assert (START < DEPTH) else $error("START must be below DEPTH");

endmodule
