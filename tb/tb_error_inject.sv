// tb_error_inject: self-checking test of error_inject at the default size.
// Streams 50x50 random frames through the block. With err high at
// frame_start exactly one pixel, at (err_row, err_col), must change, by
// err_mask, and the position must lie in the padded image with a non-zero
// mask; with err low nothing may change. Output must follow input by one
// clock. Over many frames the position must vary.
module tb_error_inject;
  localparam int PW = 50, PH = 50;
  logic clk = 0, rst_n = 0, err = 0, frame_start = 0;
  logic in_valid = 0;
  logic [7:0] in_pix = '0;
  logic [5:0] in_row = '0, in_col = '0;
  logic out_valid, err_armed;
  logic [7:0] out_pix, err_mask;
  logic [5:0] out_row, out_col, err_row, err_col;
  int checks = 0, failures = 0;
  int positions [int];

  error_inject dut (.*);
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
    for (int f = 0; f < 30; f++) begin
      int changed;
      changed = 0;
      repeat ($urandom_range(20)) @(negedge clk);
      @(negedge clk); err = (f % 3 != 2); frame_start = 1;
      @(negedge clk); frame_start = 0;
      checks++;
      if (err_armed != err || err_row >= 6'(PH) || err_col >= 6'(PW) || err_mask == 8'h00) begin
        failures++; $display("bad error setup armed=%0d r=%0d c=%0d m=%h", err_armed, err_row, err_col, err_mask);
      end
      positions[int'(err_row) * PW + int'(err_col)] = 1;
      for (int n = 0; n < PW * PH; n++) begin
        automatic logic [7:0] exp;
        in_valid = 1; in_row = 6'(n / PW); in_col = 6'(n % PW); in_pix = 8'($urandom);
        exp = in_pix;
        if (err && in_row == err_row && in_col == err_col) begin
          exp = in_pix ^ err_mask;
          changed++;
        end
        @(posedge clk); #1;
        checks++;
        if (!out_valid || out_pix != exp || out_row != in_row || out_col != in_col) begin
          failures++;
          if (failures < 10) $display("frame %0d r%0d c%0d got %h exp %h", f, in_row, in_col, out_pix, exp);
        end
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (changed != (err ? 1 : 0)) begin failures++; $display("frame %0d: %0d pixels changed", f, changed); end
    end
    checks++;
    if (positions.num() < 10) begin failures++; $display("only %0d distinct positions", positions.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
