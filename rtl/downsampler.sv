// downsampler: keeps one of every D samples of LANES parallel channels.
//
// After the channel filters, each extracted channel is reduced in rate by D
// (350 for the D-AMPS channelizer: 34.02 MHz in, 97.2 kHz out). One modulo-D
// counter, advanced by each in_valid, serves all lanes, since every channel
// filter runs in lockstep. The sample that arrives while the counter is 0 is
// passed on; the first sample after reset is kept. out_valid and dout follow
// in_valid by one clock; dout holds its value between kept samples.
// The counter phase and the registered output are this design's own choices.
module downsampler #(
  parameter int D     = 350,
  parameter int LANES = 1,
  parameter int DW    = 27
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] din  [LANES],
  output logic                 out_valid,
  output logic signed [DW-1:0] dout [LANES]
);

  localparam int CW = (D > 1) ? $clog2(D) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) dout[l] <= '0;
    end else begin
      out_valid <= in_valid && (cnt == '0);
      if (in_valid) begin
        cnt <= (cnt == CW'(D - 1)) ? '0 : cnt + 1'b1;
        if (cnt == '0)
          for (int l = 0; l < LANES; l++) dout[l] <= din[l];
      end
    end
  end

endmodule
