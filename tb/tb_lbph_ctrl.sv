// tb_lbph_ctrl: self-checking test of lbph_ctrl.
// The testbench plays the datapath: it answers scan_start with lbp_last,
// dist_start with dist_done and knn_start with knn_done after random delays,
// and records the order of the pulses. TRAIN must give clear, scan, done; TEST
// must give clear, scan, distance, KNN, done. It also checks the latched
// operation, class and inject (err only in TEST), busy, and that a start
// while busy is ignored.
module tb_lbph_ctrl;
  import lbph_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, err = 0;
  op_e mode = OP_TRAIN;
  logic [2:0] cls = '0;
  logic lbp_last = 0, dist_done = 0, knn_done = 0;
  op_e op;
  logic [2:0] op_cls;
  logic inject, hist_clear, scan_start, dist_start, knn_start, busy, done;
  int checks = 0, failures = 0;
  string trace;

  lbph_ctrl dut (.*);
  always #5 clk = ~clk;

  // datapath stand-in
  always @(posedge clk) begin
    if (hist_clear) trace = {trace, "C"};
    if (scan_start) begin trace = {trace, "S"}; fork begin repeat ($urandom_range(30) + 10) @(negedge clk); lbp_last = 1; @(negedge clk); lbp_last = 0; end join_none end
    if (dist_start) begin trace = {trace, "D"}; fork begin repeat ($urandom_range(30) + 10) @(negedge clk); dist_done = 1; @(negedge clk); dist_done = 0; end join_none end
    if (knn_start)  begin trace = {trace, "K"}; fork begin repeat ($urandom_range(30) + 10) @(negedge clk); knn_done = 1; @(negedge clk); knn_done = 0; end join_none end
    if (done) trace = {trace, "E"};
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
    for (int t = 0; t < 40; t++) begin
      automatic op_e m = op_e'(t % 2);
      automatic logic [2:0] c = 3'($urandom_range(6));
      automatic logic e = 1'($urandom);
      automatic int cyc = 0;
      trace = "";
      @(negedge clk); start = 1; mode = m; cls = c; err = e;
      @(negedge clk); start = 0; mode = op_e'(~m); cls = ~c; err = ~e;
      checks++;
      if (!busy || op != m || op_cls != c || inject != (e && m == OP_TEST)) begin
        failures++; $display("t%0d latched op %0d cls %0d inject %0d", t, op, op_cls, inject);
      end
      repeat (5) @(negedge clk);
      start = 1; @(negedge clk); start = 0;      // ignored while busy
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks += 2;
      if (trace != ((m == OP_TEST) ? "CSDKE" : "CSE")) begin failures++; $display("t%0d mode %0d sequence %s", t, m, trace); end
      if (busy) begin failures++; $display("t%0d still busy", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
