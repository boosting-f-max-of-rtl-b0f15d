// Fibonacci LFSR counter with synchronous load.
//
// On each rising clk edge: if load, the state becomes seed; otherwise if
// step, the state shifts left by one and the XOR of the tapped bits (TAPS,
// bit i = state bit i) enters at bit 0. With maximal-length taps and a
// non-zero seed the counter walks all 2^W-1 non-zero states before it
// repeats, which the test circuit uses as a one-pass index counter and as
// the source of pseudo-random addresses and data. There is no reset: the
// owner loads a seed before use. Widths and taps are this design's choice.
module lfsr #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'(skew_mem_pkg::TAPS8)
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic [W-1:0] state
);

  logic feedback;

  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (load)      state <= seed;
    else if (step) state <= {state[W-2:0], feedback};
  end

endmodule
