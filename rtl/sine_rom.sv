// Sine memory: 200 samples of one sine cycle, one every 1.8 degrees.
//
// Entry k holds round(1024 * sin(2*pi*k/200)) as a 12-bit two's-complement number, so the
// peak at k = 50 is 1024 and the trough at k = 150 is -1024. Table size, sampling step and
// peak value follow the published design; storing the whole signed cycle (rather than a
// quarter) and the registered read port are this implementation's choices. The contents are
// loaded from sine_table.hex, generated by the formula above.
//
// Timing: synchronous read; `data` shows the entry at `addr` one clock after `addr` is
// presented.
module sine_rom #(
  parameter int unsigned DEPTH  = 200,
  parameter int unsigned DATA_W = 12,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic [AW-1:0]            addr,
  output logic signed [DATA_W-1:0] data
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial $readmemh("rtl/sine_table.hex", mem);

  always_ff @(posedge clk)
    data <= $signed(mem[addr]);

endmodule
