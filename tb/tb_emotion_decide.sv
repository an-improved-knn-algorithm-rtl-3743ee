// tb_emotion_decide: self-checking test of emotion_decide.
// Random distance sets, many with ties; the expected winner is the lowest
// index holding the smallest distance. Checks the one-hot output and the
// index one clock after valid, and that outputs hold while valid is low.
module tb_emotion_decide;
  localparam int K = 7;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [31:0] distance [K];
  logic [6:0] emotion;
  logic [2:0] class_idx;
  logic decided;
  int checks = 0, failures = 0;

  emotion_decide dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (emotion != 0 || decided) begin failures++; $display("not cleared by reset"); end
    for (int t = 0; t < 3000; t++) begin
      automatic int best = 0;
      for (int k = 0; k < K; k++)
        distance[k] = (t % 2) ? 32'($urandom_range(5)) : $urandom;
      for (int k = 1; k < K; k++) if (distance[k] < distance[best]) best = k;
      valid = 1; @(negedge clk); valid = 0;
      for (int k = 0; k < K; k++) distance[k] = $urandom;
      @(negedge clk);
      checks++;
      if (emotion != 7'(1 << best) || class_idx != 3'(best) || !decided) begin
        failures++; $display("t%0d got %b idx %0d exp %0d", t, emotion, class_idx, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
