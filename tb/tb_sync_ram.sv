// tb_sync_ram: self-checking test of sync_ram.
// Fills a small RAM at random addresses, mirrors it in a testbench array and
// checks random reads one clock after the address, including a read and a
// write of the same address in one clock (old data must be returned).
module tb_sync_ram;
  localparam int DEPTH = 100;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  sync_ram #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [7:0] exp;
      @(negedge clk);
      raddr = AW'($urandom_range(DEPTH - 1));
      exp = model[raddr];
      we = $urandom_range(1);
      waddr = ($urandom_range(3) == 0) ? raddr : AW'($urandom_range(DEPTH - 1));
      wdata = 8'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("mismatch addr %0d got %h exp %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
