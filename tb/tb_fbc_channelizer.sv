// tb_fbc_channelizer: end-to-end test of a 3-channel bank decimating by 7.
// Channel 0 carries the example filter, channel 1 a different decomposition
// over the same shared multiplier block, channel 2 the example filter again.
// The input is a random stream with random stalls (in_valid low) and bursts
// of full-scale samples. For every D-th valid sample each channel's output
// is compared with a direct convolution, and it must appear exactly two
// clocks after that sample was taken. The test counts how often each
// mechanism occurred: stalls, kept outputs, dropped outputs, full-scale
// samples, and outputs where channels 0 and 1 differ (the bank really
// filters each channel with its own coefficients).
module tb_fbc_channelizer;
  import sse_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, F = 16, N = 8, M = 3, D = 7, ACC_W = W + F + 3;
  localparam tap_terms_t [M-1:0][N/2-1:0] BANK = '{2: EX_TERMS, 1: ALT8_TERMS, 0: EX_TERMS};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x_in = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] y [M];

  fbc_channelizer #(.W(W), .N(N), .F(F), .M(M), .D(D), .ACC_W(ACC_W), .TERMS(BANK)) dut (
    .clk, .rst_n, .in_valid, .x_in, .out_valid, .y
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint coef [M][N];
  longint hist [$];
  int     nsamp = 0, cycle = 0;
  int     n_stall = 0, n_kept = 0, n_dropped = 0, n_fullscale = 0, n_distinct = 0;

  typedef struct { int due; longint v [M]; } exp_t;
  exp_t expq [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected output at cycle %0d", cycle); end
        else begin
          automatic exp_t e = expq.pop_front();
          if (e.due != cycle) begin failures++; $display("FAIL output at cycle %0d, due %0d", cycle, e.due); end
          for (int m = 0; m < M; m++) begin
            checks++;
            if (longint'(y[m]) != e.v[m]) begin
              failures++;
              if (failures < 10) $display("FAIL ch%0d got %0d exp %0d", m, y[m], e.v[m]);
            end
          end
          if (y[0] != y[1]) n_distinct++;
        end
      end
      if (in_valid) begin
        hist.push_front(longint'(x_in));
        if (nsamp % D == 0) begin
          exp_t e;
          e.due = cycle + 2;
          for (int m = 0; m < M; m++) begin
            e.v[m] = 0;
            for (int k = 0; k < N && k < hist.size(); k++) e.v[m] += coef[m][k] * hist[k];
          end
          expq.push_back(e);
          n_kept++;
        end else n_dropped++;
        nsamp++;
      end else n_stall++;
    end
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      coef[0][k] = csd_value(EX_CSD[k]);
      coef[2][k] = coef[0][k];
      coef[1][k] = tap_value(ALT8_TERMS[(k < N/2) ? k : N - 1 - k], F);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      if ((i / 150) % 5 == 4) begin
        x_in = (coef[0][i % N] >= 0) ? W'((1 << (W-1)) - 1) : W'(-(1 << (W-1)));
        if (in_valid) n_fullscale++;
      end else
        x_in = W'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs never came", expq.size()); end
    $display("samples=%0d stalls=%0d kept=%0d dropped=%0d fullscale=%0d distinct=%0d",
             nsamp, n_stall, n_kept, n_dropped, n_fullscale, n_distinct);
    checks += 5;
    if (n_stall == 0)     begin failures++; $display("FAIL no stall happened"); end
    if (n_kept == 0)      begin failures++; $display("FAIL no output kept"); end
    if (n_dropped == 0)   begin failures++; $display("FAIL no output dropped"); end
    if (n_fullscale == 0) begin failures++; $display("FAIL no full-scale sample"); end
    if (n_distinct == 0)  begin failures++; $display("FAIL channels never differed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
