// Center-boosted reference for one inverter phase.
//
//   ref = ma * sin(a)                                  outside the boost windows
//   ref = ma * sin(a) + (ma/3) * sin(3a + 180 deg)     for pi/3 < a < 2pi/3 and 4pi/3 < a < 5pi/3
//
// The fundamental sample comes from the sine memory at `fund_addr` (50 Hz address counter),
// the third-harmonic sample from a second sine memory at `third_addr` (150 Hz counter that
// starts at address 100, which supplies the 180 degree shift). Inside the two centre windows
// the shifted third harmonic is positive in the positive half cycle and negative in the
// negative one, so it raises the centre of each half wave; outside them it is dropped
// ("extracting one positive and one negative portion"). Two multipliers, a divide-by-3 of the
// modulation index and one adder form the datapath, as in the published block diagram.
//
// The window test uses the phase's own sample index i: inside when 200 < 6i < 400 or
// 800 < 6i < 1000 (i = 34..66 and 134..166 for 200 samples).
//
// Formats: `ma` unsigned Q1.11; `ref_out` signed with 2^21 = 1.0 (sine peak 1024 times
// ma 2048). ma/3 is truncated to Q1.11.
//
// Timing: three-stage pipeline. A change of the addresses or of `ma` reaches `ref_out`
// three clocks later (memory read, multiply, add). The sample rate is set by the address
// counters, so this latency is 60 ns against a 100 us sample period.
module boosted_reference
  import cbspwm_pkg::*;
#(
  parameter int unsigned DEPTH = SAMPLES,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,        // synchronous, active low
  input  ma_t           ma,
  input  logic [AW-1:0] fund_addr,
  input  logic [AW-1:0] third_addr,
  output ref_t          ref_out
);

  // Stage 1: memory reads, window flag and ma/3 registered alongside.
  sine_t fund_s, third_s;
  logic  in_window_s;
  ma_t   ma_s, ma_div3_s;

  sine_rom #(.DEPTH(DEPTH), .DATA_W(SINE_W)) u_fund_rom (
    .clk(clk), .addr(fund_addr), .data(fund_s));

  sine_rom #(.DEPTH(DEPTH), .DATA_W(SINE_W)) u_third_rom (
    .clk(clk), .addr(third_addr), .data(third_s));

  function automatic logic boost_window(input logic [AW-1:0] idx);
    int unsigned six_i;
    six_i = 6 * int'(idx);
    return (six_i > DEPTH     && six_i < 2 * DEPTH) ||
           (six_i > 4 * DEPTH && six_i < 5 * DEPTH);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_window_s <= 1'b0;
      ma_s        <= '0;
      ma_div3_s   <= '0;
    end else begin
      in_window_s <= boost_window(fund_addr);
      ma_s        <= ma;
      ma_div3_s   <= ma / MA_W'(3);
    end
  end

  // Stage 2: the two multipliers.
  localparam int unsigned PROD_W = SINE_W + MA_W + 1;
  logic signed [PROD_W-1:0] fund_p, third_p;
  logic signed [PROD_W-1:0] fund_m, third_m;

  always_comb begin
    fund_m  = fund_s  * $signed({1'b0, ma_s});
    third_m = third_s * $signed({1'b0, ma_div3_s});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fund_p  <= '0;
      third_p <= '0;
    end else begin
      fund_p  <= fund_m;
      third_p <= in_window_s ? third_m : '0;
    end
  end

  // Stage 3: the summer.
  always_ff @(posedge clk) begin
    if (!rst_n)
      ref_out <= '0;
    else
      ref_out <= REF_W'(fund_p) + REF_W'(third_p);
  end

endmodule
