// tb_sipo_reg: self-checking test of sipo_reg with a 40-byte store.
// Shifts in random serial words (with idle clocks in between bits), reads
// every byte back and checks it against the bits packed here, first bit in
// bit 7 of byte 0; a clear between words must restart at byte 0.
module tb_sipo_reg;
  localparam int NB = 40;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, sin = 0;
  logic [5:0] raddr = '0;
  logic [7:0] rdata;
  logic [7:0] model [NB];
  int checks = 0, failures = 0;

  sipo_reg #(.NBYTES(NB)) dut (.*);
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
    for (int w = 0; w < 4; w++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < NB; i++) model[i] = 8'($urandom);
      for (int p = 0; p < NB * 8; p++) begin
        if (w % 2 == 1) while ($urandom_range(2) == 0) begin in_valid = 0; sin = 1'($urandom); @(negedge clk); end
        in_valid = 1; sin = model[p / 8][7 - p % 8];
        @(negedge clk);
      end
      in_valid = 0;
      for (int i = 0; i < NB; i++) begin
        raddr = 6'(i); @(negedge clk);
        checks++;
        if (rdata != model[i]) begin failures++; $display("word %0d byte %0d got %h exp %h", w, i, rdata, model[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
