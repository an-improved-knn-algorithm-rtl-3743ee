// tb_piso_reg: self-checking test of piso_reg (8 bits and 18 bits wide).
// Loads random words and checks that they come out MSB first, one bit per
// shift, that load wins over shift, and that the register holds without shift.
module tb_piso_reg;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [7:0] din8 = '0;
  logic [17:0] din18 = '0;
  logic s8, s18;
  int checks = 0, failures = 0;

  piso_reg #(.WIDTH(8))  dut8  (.clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .din(din8),  .sout(s8));
  piso_reg #(.WIDTH(18)) dut18 (.clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .din(din18), .sout(s18));
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
    for (int t = 0; t < 300; t++) begin
      logic [7:0] w8;
      logic [17:0] w18;
      w8 = 8'($urandom); w18 = 18'($urandom);
      @(negedge clk); din8 = w8; din18 = w18; load = 1; shift = (t % 2 == 0);
      @(negedge clk); load = 0; shift = 0;
      for (int b = 17; b >= 0; b--) begin
        if ($urandom_range(2) == 0) begin
          @(negedge clk);      // hold: nothing may move
        end
        checks++;
        if (s18 != w18[b] || (b >= 10 && s8 != w8[b - 10])) begin
          failures++; $display("t%0d bit %0d: got %b %b", t, b, s8, s18);
        end
        shift = 1; @(negedge clk); shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
