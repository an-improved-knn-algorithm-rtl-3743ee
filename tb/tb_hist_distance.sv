// tb_hist_distance: self-checking test of hist_distance.
// The testbench holds one test and seven trained histograms (random counts,
// one trained equal to the test) and answers the unit's bin address
// combinationally. It checks the seven squared Euclidean distances against
// sums computed here, that done comes 256 clocks after start, and that a
// second run starts again from zero.
module tb_hist_distance;
  localparam int K = 7;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] bin;
  logic [11:0] test_cnt;
  logic [11:0] train_cnt [K];
  logic [31:0] distance [K];
  logic busy, done;
  logic [11:0] th [256];
  logic [11:0] kh [K][256];
  int checks = 0, failures = 0;

  hist_distance dut (.*);
  always #5 clk = ~clk;
  assign test_cnt = th[bin];
  for (genvar k = 0; k < K; k++) assign train_cnt[k] = kh[k][bin];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      longint exp [K];
      int cycles;
      for (int b = 0; b < 256; b++) begin
        th[b] = (round == 2) ? 12'(b == 7 ? 2304 : 0) : 12'($urandom_range(40));
        for (int k = 0; k < K; k++) kh[k][b] = (k == round + 2) ? th[b] : ((round == 2) ? 12'(b == 9 ? 2304 : 0) : 12'($urandom_range(40)));
      end
      for (int k = 0; k < K; k++) begin
        exp[k] = 0;
        for (int b = 0; b < 256; b++) exp[k] += (longint'(th[b]) - longint'(kh[k][b])) ** 2;
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 257) begin failures++; $display("done after %0d clocks", cycles); end
      for (int k = 0; k < K; k++) begin
        checks++;
        if (longint'(distance[k]) != exp[k]) begin failures++; $display("round %0d class %0d got %0d exp %0d", round, k, distance[k], exp[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
