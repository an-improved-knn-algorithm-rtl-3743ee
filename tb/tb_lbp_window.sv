// tb_lbp_window: self-checking test of lbp_window at the default 48x48.
// Builds a random image (small value range, so equal neighbours are common),
// drives its zero-padded 50x50 version as a stream, with random idle clocks in
// the first frame and none in the second, and checks every LBP code, its
// address and the last flag against a reference computed here from the 3x3
// neighbourhood (I0 top-left clockwise, S(n) = In >= Ic, S(0) as MSB).
module tb_lbp_window;
  localparam int W = 48, H = 48, PW = W + 2, PH = H + 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_pix = '0;
  logic [5:0] in_row = '0, in_col = '0;
  logic out_valid, out_last;
  logic [7:0] out_code;
  logic [11:0] out_addr;
  logic [7:0] img [H][W];
  int checks = 0, failures = 0, nout = 0;

  lbp_window dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] padded(int r, int c);
    if (r == 0 || c == 0 || r == PH - 1 || c == PW - 1) return 8'h00;
    return img[r - 1][c - 1];
  endfunction

  function automatic logic [7:0] ref_lbp(int i, int j);
    int dr [8] = '{0, 0, 0, 1, 2, 2, 2, 1};
    int dc [8] = '{0, 1, 2, 2, 2, 1, 0, 0};
    logic [7:0] ic = padded(i + 1, j + 1), r = '0;
    for (int n = 0; n < 8; n++) r[7 - n] = (padded(i + dr[n], j + dc[n]) >= ic);
    return r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int i = nout / W, j = nout % W;
    checks++;
    if (out_code != ref_lbp(i, j) || out_addr != 12'(nout) || out_last != (nout == W * H - 1)) begin
      failures++;
      if (failures < 10) $display("lbp %0d: got %h @%0d last%0d exp %h", nout, out_code, out_addr, out_last, ref_lbp(i, j));
    end
    nout++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        img[r][c] = (f == 0) ? 8'($urandom_range(3) * 60) : 8'($urandom);
      nout = 0;
      for (int n = 0; n < PW * PH; n++) begin
        @(negedge clk);
        if (f == 0) while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_row = 6'(n / PW); in_col = 6'(n % PW); in_pix = padded(n / PW, n % PW);
      end
      @(negedge clk); in_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (nout != W * H) begin failures++; $display("frame %0d: %0d codes", f, nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
