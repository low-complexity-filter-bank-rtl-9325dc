// tb_ss_mult_block: checks the shared multiplier block against the exact
// products x1 * {1, 5/4, 3/4, 19/16, 163/128, -43/64}, each compared at the
// output's scale (times 1, 4, 4, 16, 128, 64), for every 8-bit input value
// and for random values at a wider input.
module tb_ss_mult_block;
  import sse_pkg::*;

  localparam int W  = 8;
  localparam int W2 = 14;

  logic signed [W-1:0]           x;
  logic signed [W+SS_GUARD-1:0]  xs  [NUM_SS];
  logic signed [W2-1:0]          x2;
  logic signed [W2+SS_GUARD-1:0] xs2 [NUM_SS];

  ss_mult_block #(.W(W))  dut  (.x1(x),  .xs(xs));
  ss_mult_block #(.W(W2)) dut2 (.x1(x2), .xs(xs2));

  // Integer multipliers of x1 at each output's scale, worked out by hand from
  // the CSD patterns [1], [1 0 1], [1 0 -1], [1 0 1 0 -1], [1 0 1 0 0 1 0 -1]
  // and [-1 0 1 0 1 0 1].
  int mult [NUM_SS] = '{1, 5, 3, 19, 163, -43};

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W-1)); v < (1 << (W-1)); v++) begin
      x  = W'(v);
      x2 = W2'($urandom_range(0, (1 << W2) - 1));
      #1;
      for (int i = 0; i < NUM_SS; i++) begin
        checks++;
        if (int'(xs[i]) != v * mult[i]) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 x=%0d out %0d: got %0d exp %0d", v, i, xs[i], v * mult[i]);
        end
        checks++;
        if (int'(xs2[i]) != int'(x2) * mult[i]) begin
          failures++;
          if (failures < 10) $display("FAIL W=14 x=%0d out %0d: got %0d exp %0d", x2, i, xs2[i], int'(x2) * mult[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
