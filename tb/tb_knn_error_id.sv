// tb_knn_error_id: self-checking test of knn_error_id at the default size
// (2304-byte LBP images, seven trained images).
// The testbench models the eight LBP RAMs (one clock read latency). Each round
// makes a random test image and seven trained images: random ones, one that
// equals the test image except for a few flipped bits (or none), and in some
// rounds a decoy that matches the test image's first bytes. The expected
// match is the trained image whose XOR with the test image is numerically
// smallest (lowest index on a tie), found here by byte-wise comparison, and
// the expected error position is the first set bit of that XOR word. Also
// checks the number of clocks from start to done.
module tb_knn_error_id;
  localparam int NB = 2304, K = 7, NBITS = NB * 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] raddr;
  logic [7:0] test_byte;
  logic [7:0] train_byte [K];
  logic busy, done, error_flag;
  logic [2:0] match_idx;
  logic [14:0] error_pos;
  logic [7:0] tmem [NB];
  logic [7:0] kmem [K][NB];
  int checks = 0, failures = 0;

  knn_error_id dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    test_byte <= tmem[raddr];
    for (int k = 0; k < K; k++) train_byte[k] <= kmem[k][raddr];
  end

  // -1, 0, 1 for XOR word a smaller, equal, larger than XOR word b
  function automatic int cmp_xor(int a, int b);
    for (int i = 0; i < NB; i++) begin
      logic [7:0] xa = tmem[i] ^ kmem[a][i], xb = tmem[i] ^ kmem[b][i];
      if (xa < xb) return -1;
      if (xa > xb) return 1;
    end
    return 0;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      automatic int good = $urandom_range(K - 1);
      automatic int best = 0, exp_pos = -1, cycles = 0;
      automatic int nflip = (t % 4 == 0) ? 0 : $urandom_range(3) + 1;
      foreach (tmem[i]) tmem[i] = 8'($urandom);
      for (int k = 0; k < K; k++) foreach (tmem[i]) kmem[k][i] = 8'($urandom);
      foreach (tmem[i]) kmem[good][i] = tmem[i];
      for (int f = 0; f < nflip; f++) begin
        automatic int p = $urandom_range(NBITS - 1);
        kmem[good][p / 8][7 - p % 8] ^= 1'b1;
      end
      if (t % 2 == 1) begin       // decoy sharing the first 100 bytes
        automatic int d = (good + 1) % K;
        for (int i = 0; i < 100; i++) kmem[d][i] = tmem[i];
      end
      for (int k = 1; k < K; k++) if (cmp_xor(k, best) < 0) best = k;
      for (int i = 0; i < NB && exp_pos < 0; i++) begin
        automatic logic [7:0] xv = tmem[i] ^ kmem[best][i];
        for (int b = 7; b >= 0; b--) if (xv[b] && exp_pos < 0) exp_pos = i * 8 + 7 - b;
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!done && cycles < 3 * NBITS) begin @(negedge clk); cycles++; end
      checks += 3;
      if (match_idx != 3'(best)) begin failures++; $display("t%0d match %0d exp %0d (good %0d)", t, match_idx, best, good); end
      if (exp_pos < 0) begin
        if (error_flag) begin failures++; $display("t%0d flagged %0d on an exact match", t, error_pos); end
        if (cycles != 2 * NBITS + 6) begin failures++; $display("t%0d took %0d clocks", t, cycles); end
      end else begin
        if (!error_flag || error_pos != 15'(exp_pos)) begin failures++; $display("t%0d pos %0d/%0d exp %0d", t, error_flag, error_pos, exp_pos); end
        if (cycles != NBITS + exp_pos + 7) begin failures++; $display("t%0d took %0d clocks for pos %0d", t, cycles, exp_pos); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
