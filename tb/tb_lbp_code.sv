// tb_lbp_code: self-checking test of lbp_code.
// Random and edge-case 3x3 windows; the expected code is built in the
// testbench from the clockwise neighbour order I0 top-left .. I7 left,
// S(n) = (In >= Ic), S(0) as MSB (default) and S(0) as LSB (S0_MSB = 0).
module tb_lbp_code;
  logic [7:0] win [9];
  logic [7:0] code_msb, code_lsb;
  int checks = 0, failures = 0;

  lbp_code #(.S0_MSB(1'b1)) dut_msb (.win(win), .code(code_msb));
  lbp_code #(.S0_MSB(1'b0)) dut_lsb (.win(win), .code(code_lsb));

  function automatic logic [7:0] ref_code(input logic [7:0] w [9], input bit msb);
    int idx [8] = '{0, 1, 2, 5, 8, 7, 6, 3};
    logic [7:0] r = '0;
    for (int n = 0; n < 8; n++) begin
      bit s = (w[idx[n]] >= w[4]);
      if (msb) r[7 - n] = s; else r[n] = s;
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked case: centre 50, neighbours I0..I7 = 10,60,50,49,200,0,51,50
    // S = 0,1,1,0,1,0,1,1 -> MSB-first 8'b0110_1011 = 8'h6B
    win = '{8'd10, 8'd60, 8'd50, 8'd50, 8'd50, 8'd49, 8'd51, 8'd0, 8'd200};
    #1; checks++;
    if (code_msb !== 8'h6B) begin failures++; $display("hand case got %h", code_msb); end
    checks++;
    if (code_lsb !== 8'hD6) begin failures++; $display("hand case lsb got %h", code_lsb); end
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 9; i++)
        win[i] = (t % 3 == 0) ? 8'($urandom_range(3) + 100) : 8'($urandom);
      #1;
      checks += 2;
      if (code_msb !== ref_code(win, 1)) begin failures++; $display("msb mismatch %h", code_msb); end
      if (code_lsb !== ref_code(win, 0)) begin failures++; $display("lsb mismatch %h", code_lsb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
