// tb_sse_lpfir: runs the example 8-tap filter (default TERMS) and a 6-tap
// filter with other terms on the same random input stream, with random gaps
// in in_valid and bursts of full-scale samples. Each output is compared with
// a direct convolution of the valid samples with coefficients taken from the
// CSD digits (8-tap) or from the term constants (6-tap). out_valid must
// follow in_valid by exactly one clock.
module tb_sse_lpfir;
  import sse_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, F = 16, ACC_W = W + F + 3;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x = '0;
  logic signed [W+SS_GUARD-1:0] xs [NUM_SS];
  logic ov8, ov6;
  logic signed [ACC_W-1:0] y8, y6;

  ss_mult_block #(.W(W)) u_mb (.x1(x), .xs(xs));
  sse_lpfir dut8 (.clk, .rst_n, .in_valid, .xs, .out_valid(ov8), .y(y8));
  sse_lpfir #(.W(W), .N(6), .F(F), .ACC_W(ACC_W), .TERMS(ALT_TERMS))
    dut6 (.clk, .rst_n, .in_valid, .xs, .out_valid(ov6), .y(y6));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint c8 [8], c6 [6];
  longint hist [$];          // valid samples, newest first
  logic   prev_valid = 0;
  int     fullscale = 0, gaps = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv(longint c [], int n);
    longint s = 0;
    for (int k = 0; k < n; k++) if (k < hist.size()) s += c[k] * hist[k];
    return s;
  endfunction

  // Reference update and output check at each rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      // Outputs seen at this edge come from the sample taken at the last one.
      checks++;
      if (ov8 !== prev_valid || ov6 !== prev_valid) begin
        failures++; $display("FAIL latency: out_valid %0b %0b, in_valid a clock earlier %0b", ov8, ov6, prev_valid);
      end
      if (ov8) begin
        automatic longint e8 = conv(c8, 8);
        automatic longint e6 = conv(c6, 6);
        checks += 2;
        if (longint'(y8) != e8) begin failures++; if (failures < 10) $display("FAIL y8 got %0d exp %0d", y8, e8); end
        if (longint'(y6) != e6) begin failures++; if (failures < 10) $display("FAIL y6 got %0d exp %0d", y6, e6); end
      end
      if (in_valid) hist.push_front(longint'(x));
      prev_valid = in_valid;
    end
  end

  initial begin
    for (int k = 0; k < 8; k++) c8[k] = csd_value(EX_CSD[k]);
    for (int k = 0; k < 3; k++) begin
      c6[k]     = tap_value(ALT_TERMS[k], F);
      c6[5 - k] = c6[k];
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (!in_valid) gaps++;
      if ((i / 100) % 4 == 3) begin
        // full-scale burst with the signs of the coefficients: largest |y|
        x = (c8[i % 8] >= 0) ? W'(-(1 << (W-1))) : W'((1 << (W-1)) - 1);
        fullscale++;
      end else
        x = W'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (fullscale == 0 || gaps == 0) begin failures++; $display("FAIL stimulus lacked full-scale or gaps"); end
    $display("inputs=%0d gaps=%0d fullscale=%0d", hist.size(), gaps, fullscale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
