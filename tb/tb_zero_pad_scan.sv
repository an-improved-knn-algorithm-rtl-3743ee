// tb_zero_pad_scan: self-checking test of zero_pad_scan at the default 48x48.
// The testbench models the image RAM (random contents, one clock read
// latency) and checks that exactly 50x50 pixels come out, one per clock, in
// raster order, with 0 on the one-pixel border and image[r-1][c-1] inside.
// A second scan checks that the block restarts.
module tb_zero_pad_scan;
  localparam int W = 48, H = 48, PW = W + 2, PH = H + 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] raddr;
  logic [7:0] rdata;
  logic pix_valid, busy;
  logic [7:0] pix;
  logic [5:0] row, col;
  logic [7:0] img [W * H];
  int checks = 0, failures = 0;

  zero_pad_scan #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= img[raddr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan_once();
    int n = 0, first_cyc = -1, last_cyc = 0, cyc = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (n < PW * PH && cyc < 4000) begin
      @(posedge clk); #1; cyc++;
      if (pix_valid) begin
        int r = n / PW, c = n % PW;
        logic [7:0] exp = (r == 0 || r == PH - 1 || c == 0 || c == PW - 1) ? 8'h00 : img[(r - 1) * W + c - 1];
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        checks++;
        if (row != 6'(r) || col != 6'(c) || pix != exp) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got r%0d c%0d %h exp r%0d c%0d %h", n, row, col, pix, r, c, exp);
        end
        n++;
      end
    end
    // one pixel per clock, nothing extra afterwards
    checks++;
    if (last_cyc - first_cyc != PW * PH - 1) begin failures++; $display("rate: %0d clocks", last_cyc - first_cyc + 1); end
    @(posedge clk); #1; @(posedge clk); #1;
    checks++;
    if (pix_valid || busy) begin failures++; $display("still active after the scan"); end
  endtask

  initial begin
    for (int i = 0; i < W * H; i++) img[i] = 8'($urandom_range(254) + 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    scan_once();
    for (int i = 0; i < W * H; i++) img[i] = 8'($urandom);
    scan_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
