// sse_lpfir: linear-phase FIR channel filter built on a shared multiplier
// block.
//
// The filter does no multiplication of its own. Each of its N/2 distinct
// coefficients is given, in TERMS, as a short sum of shifted, signed outputs
// of ss_mult_block (see sse_pkg). The partial product of tap k is that sum,
// aligned to F fractional bits; because the coefficient set is symmetric,
// h(N-1-k) = h(k), each partial product serves two taps. The partial
// products enter a transposed delay line of N-1 registers and N-1 structural
// adders:
//   y[n] = p0 + z1,  z_j <= p_j + z_(j+1),  z_(N-1) <= p_(N-1),
// which gives y[n] = sum_k h(k) x[n-k]. With the default TERMS (the 8-tap,
// 16-bit example) the filter uses 5 tap adders and 7 structural adders; with
// the 5 adders of the multiplier block that is 17.
//
// Interface: in_valid qualifies the multiplier-block outputs xs; the delay
// line moves only on in_valid. y is the exact product sum, as a signed
// integer with F fractional bits (y = sum h(k) x[n-k] * 2^F), registered:
// out_valid and y follow in_valid by one clock. Synchronous active-low reset
// clears the delay line. The register placement, the handshake and the
// reset are this design's own choices; N must be even.
module sse_lpfir
  import sse_pkg::*;
#(
  parameter int W     = 8,
  parameter int N     = EX_TAPS,
  parameter int F     = 16,
  parameter int ACC_W = W + F + 3,
  parameter tap_terms_t [N/2-1:0] TERMS = EX_TERMS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [W+SS_GUARD-1:0]  xs [NUM_SS],
  output logic                          out_valid,
  output logic signed [ACC_W-1:0]       y
);

  localparam int NH = N / 2;

  // Elaboration-time checks: symmetric even-length filter, every term fits
  // the F-bit fraction.
  initial begin
    assert (N % 2 == 0) else $error("sse_lpfir: N must be even");
    for (int k = 0; k < NH; k++)
      for (int t = 0; t < MAX_TERMS; t++)
        if (TERMS[k][t].used)
          assert (int'(TERMS[k][t].shift) + ss_exp(TERMS[k][t].src) <= F)
            else $error("sse_lpfir: term %0d of tap %0d exceeds F", t, k);
  end

  // Partial products of the distinct taps.
  logic signed [ACC_W-1:0] pp [NH];

  always_comb begin
    for (int k = 0; k < NH; k++) begin
      pp[k] = '0;
      for (int t = 0; t < MAX_TERMS; t++) begin
        if (TERMS[k][t].used) begin
          if (TERMS[k][t].neg)
            pp[k] = pp[k] - (ACC_W'(xs[TERMS[k][t].src])
                             <<< (F - int'(TERMS[k][t].shift) - ss_exp(TERMS[k][t].src)));
          else
            pp[k] = pp[k] + (ACC_W'(xs[TERMS[k][t].src])
                             <<< (F - int'(TERMS[k][t].shift) - ss_exp(TERMS[k][t].src)));
        end
      end
    end
  end

  // Transposed delay line, z[j] for j = 1..N-1 (z[0] unused).
  logic signed [ACC_W-1:0] z [N];

  function automatic int mirror(int j);
    return (j < NH) ? j : N - 1 - j;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) z[j] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y        <= pp[0] + z[1];
        for (int j = 1; j < N - 1; j++) z[j] <= pp[mirror(j)] + z[j+1];
        z[N-1]   <= pp[0];
        z[0]     <= '0;
      end
    end
  end

endmodule
