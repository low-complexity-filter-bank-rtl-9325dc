// ss_mult_block: shared minimum-adder multiplier block.
//
// Multiplies the wideband input sample x1 by the six constants of sse_pkg
// using five adders: two for the 2-bit common subexpressions
//   x2 = x1 + x1>>2   ([1 0 1])        x3 = x1 - x1>>2   ([1 0 -1])
// and three for the super-subexpressions built from them
//   x4 = x2 - x1>>4   ([1 0 1 0 -1], CS [1 0 1] and a single digit)
//   x5 = x2 + x3>>5   ([1 0 1 0 0 1 0 -1], two CS)
//   x6 = -x3 + x2>>4  ([-1 0 1 0 1 0 1], two CS).
// The decomposition is the one the channel filters of the example use. Each
// output is an integer at its own scale, xs[i] = x_(i+1) * 2^ss_exp(i): the
// shift that aligns a subexpression is applied after its addition, so every
// adder here is only a few bits wider than the input. Two adder steps deep.
//
// Interface: x1 in (signed, W bits); xs[0..5] out, x1..x6 in that order,
// sign-extended to W+SS_GUARD bits. Purely combinational; the channel
// filters register the result. The choice of an unpipelined block and of the
// output width is this design's own.
module ss_mult_block
  import sse_pkg::*;
#(
  parameter int W = 8
) (
  input  logic signed [W-1:0]          x1,
  output logic signed [W+SS_GUARD-1:0] xs [NUM_SS]
);

  // Narrow intermediate results, width = W + scale exponent + 1.
  logic signed [W+2:0] x2s;  // x2 * 4  = 5 * x1
  logic signed [W+2:0] x3s;  // x3 * 4  = 3 * x1
  logic signed [W+4:0] x4s;  // x4 * 16 = 19 * x1
  logic signed [W+7:0] x5s;  // x5 * 128 = 163 * x1
  logic signed [W+6:0] x6s;  // x6 * 64 = -43 * x1

  always_comb begin
    x2s = ((W+3)'(x1) <<< 2) + (W+3)'(x1);
    x3s = ((W+3)'(x1) <<< 2) - (W+3)'(x1);
    x4s = ((W+5)'(x2s) <<< 2) - (W+5)'(x1);
    x5s = ((W+8)'(x2s) <<< 5) + (W+8)'(x3s);
    x6s = (W+7)'(x2s) - ((W+7)'(x3s) <<< 4);
  end

  assign xs[SRC_X1] = (W+SS_GUARD)'(x1);
  assign xs[SRC_X2] = (W+SS_GUARD)'(x2s);
  assign xs[SRC_X3] = (W+SS_GUARD)'(x3s);
  assign xs[SRC_X4] = (W+SS_GUARD)'(x4s);
  assign xs[SRC_X5] = (W+SS_GUARD)'(x5s);
  assign xs[SRC_X6] = (W+SS_GUARD)'(x6s);

endmodule
