// tb_min_sort: self-checking test of min_sort with seven 64-bit words.
// Each round builds seven words (random, or sharing long common prefixes, or
// with equal minima) and streams them MSB first; the expected result is the
// lowest index of the numerically smallest word, computed here with 64-bit
// compares. Also checks that the result arrives one clock after `last`.
module tb_min_sort;
  localparam int N = 7, L = 64;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0;
  logic [N-1:0] x = '0;
  logic [2:0] match_idx;
  logic match_valid;
  logic [L-1:0] words [N];
  int checks = 0, failures = 0;

  min_sort dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      automatic int best = 0;
      automatic logic [L-1:0] base = {$urandom, $urandom};
      for (int k = 0; k < N; k++) begin
        case (t % 4)
          0: words[k] = {$urandom, $urandom};
          1: words[k] = base ^ (L'(1) << $urandom_range(20));          // differ only in low bits
          2: words[k] = (k % 3 == 1) ? L'(0) : {$urandom, $urandom};    // equal zero minima
          default: words[k] = base >> $urandom_range(3);
        endcase
      end
      for (int k = 1; k < N; k++) if (words[k] < words[best]) best = k;
      for (int p = 0; p < L; p++) begin
        @(negedge clk);
        if (t % 2 == 1) while ($urandom_range(3) == 0) begin in_valid = 0; x = N'($urandom); @(negedge clk); end
        in_valid = 1; first = (p == 0); last = (p == L - 1);
        for (int k = 0; k < N; k++) x[k] = words[k][L - 1 - p];
      end
      @(negedge clk); in_valid = 0; first = 0; last = 0;
      checks++;
      if (!match_valid || match_idx != 3'(best)) begin
        failures++; $display("t%0d got %0d (valid %0d) exp %0d", t, match_idx, match_valid, best);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
