// tb_lbp_histogram: self-checking test of lbp_histogram.
// Counts 2304 random codes (with a bias towards a few values) and compares
// every bin with a testbench count; checks that clear zeroes all bins, and
// that a bin receiving all 4095 counts saturates instead of wrapping.
module tb_lbp_histogram;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [7:0] code = '0, rd_bin = '0;
  logic [11:0] rd_count;
  int model [256];
  int checks = 0, failures = 0;

  lbp_histogram dut (.*);
  always #5 clk = ~clk;

  task automatic compare_all(string what);
    for (int b = 0; b < 256; b++) begin
      rd_bin = 8'(b); #1;
      checks++;
      if (rd_count != 12'(model[b])) begin
        failures++;
        if (failures < 10) $display("%s bin %0d got %0d exp %0d", what, b, rd_count, model[b]);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      foreach (model[b]) model[b] = 0;
      compare_all("after clear");
      for (int n = 0; n < 2304; n++) begin
        @(negedge clk);
        inc = ($urandom_range(4) != 0);
        code = ($urandom_range(1) == 0) ? 8'($urandom_range(3)) : 8'($urandom);
        if (inc) model[code]++;
      end
      @(negedge clk); inc = 0;
      compare_all("after count");
    end
    // saturation
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    inc = 1; code = 8'hA5;
    repeat (4100) @(negedge clk);
    inc = 0;
    rd_bin = 8'hA5; #1;
    checks++;
    if (rd_count != 12'hFFF) begin failures++; $display("saturation: got %0d", rd_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
