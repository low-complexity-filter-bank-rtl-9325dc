// tb_fbc_full: the channelizer at its default parameters (1134 channels of
// the example 8-tap filter, decimation by 350, 8-bit input). Runs 12,000 input
// samples with random stalls and full-scale bursts, checks every kept output
// of every channel against a direct convolution with the CSD coefficients,
// checks the two-clock latency, and that exactly one output comes out per
// 350 valid input samples.
module tb_fbc_full;
  import sse_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, F = 16, N = 8, M = 1134, D = 350, ACC_W = W + F + 3;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x_in = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] y [M];

  fbc_channelizer dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint coef [N];
  longint hist [$];
  int     nsamp = 0, cycle = 0, n_out = 0, n_stall = 0, n_fullscale = 0;

  typedef struct { int due; longint v; } exp_t;
  exp_t expq [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (out_valid) begin
        n_out++;
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected output at cycle %0d", cycle); end
        else begin
          automatic exp_t e = expq.pop_front();
          if (e.due != cycle) begin failures++; $display("FAIL output at cycle %0d, due %0d", cycle, e.due); end
          for (int m = 0; m < M; m++) begin
            checks++;
            if (longint'(y[m]) != e.v) begin
              failures++;
              if (failures < 10) $display("FAIL ch%0d got %0d exp %0d", m, y[m], e.v);
            end
          end
        end
      end
      if (in_valid) begin
        hist.push_front(longint'(x_in));
        if (nsamp % D == 0) begin
          automatic exp_t e;
          e.due = cycle + 2;
          e.v = 0;
          for (int k = 0; k < N && k < hist.size(); k++) e.v += coef[k] * hist[k];
          expq.push_back(e);
        end
        nsamp++;
      end else n_stall++;
    end
  end

  initial begin
    for (int k = 0; k < N; k++) coef[k] = csd_value(EX_CSD[k]);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (nsamp < 12000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      // Every other block of D samples runs at full scale.
      if ((nsamp / D) % 2 == 1) begin
        x_in = (coef[nsamp % N] >= 0) ? W'((1 << (W-1)) - 1) : W'(-(1 << (W-1)));
        if (in_valid) n_fullscale++;
      end else
        x_in = W'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks += 4;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs never came", expq.size()); end
    if (n_out != (nsamp + D - 1) / D) begin failures++; $display("FAIL %0d outputs for %0d samples", n_out, nsamp); end
    if (n_stall == 0) begin failures++; $display("FAIL no stall happened"); end
    if (n_fullscale == 0) begin failures++; $display("FAIL no full-scale sample"); end
    $display("samples=%0d outputs=%0d stalls=%0d fullscale=%0d", nsamp, n_out, n_stall, n_fullscale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
