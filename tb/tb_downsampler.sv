// tb_downsampler: feeds numbered samples with random gaps in in_valid into a
// 3-lane downsampler (D = 5 and D = 350) and checks that exactly every D-th
// valid sample, starting with the first, comes out, one clock later, with
// every lane intact.
module tb_downsampler;
  localparam int DW = 16;
  localparam int L  = 3;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] din [L];
  logic ov5, ov350;
  logic signed [DW-1:0] do5 [L], do350 [L];

  downsampler #(.D(5),   .LANES(L), .DW(DW)) dut5   (.clk, .rst_n, .in_valid, .din, .out_valid(ov5),   .dout(do5));
  downsampler #(.D(350), .LANES(L), .DW(DW)) dut350 (.clk, .rst_n, .in_valid, .din, .out_valid(ov350), .dout(do350));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seq = 0;            // index of the next valid sample
  int exp5 [$], exp350 [$];
  int n5 = 0, n350 = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: queue the index of every sample that must be kept.
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (seq % 5 == 0)   exp5.push_back(seq);
      if (seq % 350 == 0) exp350.push_back(seq);
      seq <= seq + 1;
    end
  end

  // Outputs are checked half a clock after the edge that updates them.
  always @(negedge clk) begin
    if (rst_n) begin
      if (ov5) begin
        int e;
        n5++;
        checks++;
        if (exp5.size() == 0) begin failures++; $display("FAIL D=5 unexpected output"); end
        else begin
          e = exp5.pop_front();
          for (int l = 0; l < L; l++)
            if (do5[l] != DW'(e * 3 + l)) begin failures++; $display("FAIL D=5 lane %0d got %0d exp %0d", l, do5[l], e*3+l); end
        end
      end
      if (ov350) begin
        int e;
        n350++;
        checks++;
        if (exp350.size() == 0) begin failures++; $display("FAIL D=350 unexpected output"); end
        else begin
          e = exp350.pop_front();
          for (int l = 0; l < L; l++)
            if (do350[l] != DW'(e * 3 + l)) begin failures++; $display("FAIL D=350 lane %0d", l); end
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < L; l++) din[l] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0, idx = 0; i < 3000; i++) begin
      @(posedge clk);
      if (in_valid) idx++;   // the sample on the bus was taken at this edge
      in_valid <= ($urandom_range(0, 3) != 0);
      for (int l = 0; l < L; l++) din[l] <= DW'(idx * 3 + l);
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (3) @(posedge clk);
    // Every expected sample must have come out, at the rate 1/D.
    checks++;
    if (exp5.size() != 0 || exp350.size() != 0) begin failures++; $display("FAIL samples not delivered"); end
    checks++;
    if (n5 != (seq + 4) / 5 || n350 != (seq + 349) / 350) begin
      failures++; $display("FAIL output counts %0d %0d for %0d inputs", n5, n350, seq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
