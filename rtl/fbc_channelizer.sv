// fbc_channelizer: filter bank channelizer with one shared multiplier block.
//
// A wideband sample stream x_in is multiplied once, in ss_mult_block, by all
// the common subexpressions and super-subexpressions that the coefficients
// of the M channel filters share. Each channel filter (sse_lpfir) then forms
// its tap partial products from those shared outputs with shifts and a few
// adders only, and runs its own transposed delay line. A single downsampler
// reduces all M filter outputs by D.
//
// The D-AMPS channelizer this structure is meant for runs at 34.02 MHz,
// decimates by 350 and uses 1180-tap, 16-bit bandpass channel filters for up
// to 1134 channels of 30 kHz. The bank has that many channels by default
// (M = 1134), but those filters' coefficients are not part of this design:
// each channel's decomposition is the parameter TERMS[m], and by default
// every channel carries the 8-tap, 16-bit example filter. Give each channel
// its own TERMS (and N) for a real band plan.
//
// Interface: x_in with in_valid, one sample per valid clock. Outputs y[m],
// one per channel, exact sums with F fractional bits, valid for one clock
// when out_valid is high: two clocks after the input sample that produced
// them, on every D-th input sample (the first one after reset included).
// Synchronous active-low reset.
module fbc_channelizer
  import sse_pkg::*;
#(
  parameter int W     = 8,
  parameter int N     = EX_TAPS,
  parameter int F     = 16,
  parameter int M     = 1134,
  parameter int D     = 350,
  parameter int ACC_W = W + F + 3,
  parameter tap_terms_t [M-1:0][N/2-1:0] TERMS = {M{EX_TERMS}}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     x_in,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y [M]
);

  logic signed [W+SS_GUARD-1:0] xs [NUM_SS];

  ss_mult_block #(.W(W)) u_mult (
    .x1 (x_in),
    .xs (xs)
  );

  logic                    ch_valid [M];
  logic signed [ACC_W-1:0] ch_y     [M];

  for (genvar m = 0; m < M; m++) begin : g_ch
    sse_lpfir #(
      .W     (W),
      .N     (N),
      .F     (F),
      .ACC_W (ACC_W),
      .TERMS (TERMS[m])
    ) u_filt (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .xs        (xs),
      .out_valid (ch_valid[m]),
      .y         (ch_y[m])
    );
  end

  downsampler #(.D(D), .LANES(M), .DW(ACC_W)) u_ds (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ch_valid[0]),
    .din       (ch_y),
    .out_valid (out_valid),
    .dout      (y)
  );

endmodule
