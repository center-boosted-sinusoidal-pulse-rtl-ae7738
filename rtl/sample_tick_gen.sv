// Sample-rate strobe generator (the "10 kHz / 30 kHz clock generation" of the reference path).
//
// Divides the system clock down to OUT_HZ. Because 50 MHz / 30 kHz is not an integer, the
// divider is fractional: an accumulator adds OUT_HZ every clock and, when the sum reaches
// CLK_HZ, subtracts CLK_HZ and raises `tick` for one clock. Over any CLK_HZ clocks exactly
// OUT_HZ strobes come out, and the spacing differs by at most one clock (1667/1667/1666 for
// 30 kHz). A 10 kHz and a 30 kHz instance started by the same reset strobe together every
// 5000 clocks, which keeps the 150 Hz third harmonic locked to the 50 Hz fundamental.
//
// The published design uses divided clocks; here the output is a clock enable in the
// system clock domain (this implementation's choice).
//
// Timing: `tick` is registered. After reset the first strobe comes ceil(CLK_HZ/OUT_HZ)
// clocks later (5000 clocks for 10 kHz, 1667 for 30 kHz).
module sample_tick_gen #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned OUT_HZ = 10_000
) (
  input  logic clk,
  input  logic rst_n,    // synchronous, active low
  output logic tick
);

  localparam int unsigned ACC_W = $clog2(CLK_HZ + OUT_HZ + 1);

  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] acc_sum;

  assign acc_sum = acc + ACC_W'(OUT_HZ);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (acc_sum >= ACC_W'(CLK_HZ)) begin
      acc  <= acc_sum - ACC_W'(CLK_HZ);
      tick <= 1'b1;
    end else begin
      acc  <= acc_sum;
      tick <= 1'b0;
    end
  end

  initial assert (OUT_HZ > 0 && OUT_HZ < CLK_HZ) else $error("OUT_HZ must be below CLK_HZ");

endmodule
