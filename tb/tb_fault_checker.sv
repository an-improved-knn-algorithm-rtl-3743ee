// tb_fault_checker: self-checking test of fault_checker at the default
// 18432 bits. The testbench models the SIPO RAM (one clock read latency) and
// fills it with zeros plus, in most rounds, one or a few set bits. It checks
// error_flag, error_pos (the first set bit, counted from bit 7 of byte 0)
// and that done arrives p+1 clocks after start for a first set bit at p, or
// 18432 clocks after start for an all-zero word.
module tb_fault_checker;
  localparam int NBITS = 18432, NB = NBITS / 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] raddr;
  logic [7:0] rdata;
  logic busy, done, error_flag;
  logic [14:0] error_pos;
  logic [7:0] mem [NB];
  int checks = 0, failures = 0;

  fault_checker dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= mem[raddr];

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      automatic int first_p = NBITS;
      automatic int nset = (t % 4 == 0) ? 0 : $urandom_range(3) + 1;
      automatic int cycles = 0;
      foreach (mem[i]) mem[i] = 8'h00;
      for (int s = 0; s < nset; s++) begin
        automatic int p = (t == 1) ? 0 : (t == 2) ? NBITS - 1 : $urandom_range(NBITS - 1);
        mem[p / 8][7 - p % 8] = 1'b1;
        if (p < first_p) first_p = p;
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!done && cycles < NBITS + 10) begin @(negedge clk); cycles++; end
      checks += 2;
      if (nset == 0) begin
        if (error_flag || error_pos != 0) begin failures++; $display("t%0d clean word flagged at %0d", t, error_pos); end
        if (cycles != NBITS + 1) begin failures++; $display("t%0d clean scan took %0d", t, cycles); end
      end else begin
        if (!error_flag || error_pos != 15'(first_p)) begin failures++; $display("t%0d got %0d/%0d exp %0d", t, error_flag, error_pos, first_p); end
        if (cycles != first_p + 2) begin failures++; $display("t%0d scan took %0d for p=%0d", t, cycles, first_p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
