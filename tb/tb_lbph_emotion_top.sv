// tb_lbph_emotion_top: end-to-end test of lbph_emotion_top at its default
// size (48x48 images, seven classes), with no parameter overrides.
//
// Seven random grey images are trained as the seven emotions. Then several
// TEST operations run: a trained image tested as it is, the same with a
// random error induced, and an unrelated image with and without an error.
// A reference model in this testbench recomputes, from the pixels and the
// reported error position and mask, the padded image, every LBP code, the
// histograms, the squared distances, the decision, the smallest XOR word and
// its first set bit, and compares them with the design's outputs and the
// read-back test LBP image. It also checks the operation lengths and counts
// how often each mechanism happened: training, testing, error induction,
// error flag raised, clean match with the flag low, LBP read-back.
module tb_lbph_emotion_top;
  import lbph_pkg::*;
  localparam int W = 48, H = 48, NP = W * H, PW = W + 2, PH = H + 2, NBITS = NP * 8;

  logic clk = 0, rst_n = 0;
  logic img_we = 0;
  logic [11:0] img_waddr = '0;
  logic [7:0] img_wdata = '0;
  logic start = 0, err = 0;
  op_e mode = OP_TRAIN;
  logic [2:0] train_class = '0;
  logic busy, done;
  logic anger, contempt, disgust, fear, happy, sad, surprise;
  logic error_flag;
  logic [14:0] error_position;
  logic [2:0] match_class;
  logic err_armed;
  logic [5:0] err_row, err_col;
  logic [7:0] err_mask;
  logic [11:0] lbp_raddr = '0;
  logic [7:0] lbp_rdata;

  lbph_emotion_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_train = 0, n_test = 0, n_inject = 0, n_flag_on = 0, n_clean = 0, n_readback = 0;

  logic [7:0] gray  [NP];
  logic [7:0] lbp_k [N_CLASS][NP];
  logic [7:0] lbp_t [NP];
  int         hist_k [N_CLASS][256];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // reference LBP of the current gray image, optionally with one padded
  // pixel XORed with mask
  function automatic void ref_lbp(output logic [7:0] out [NP], input bit inj, input int er, input int ec, input logic [7:0] mask);
    int dr [8] = '{0, 0, 0, 1, 2, 2, 2, 1};
    int dc [8] = '{0, 1, 2, 2, 2, 1, 0, 0};
    logic [7:0] pad [PH][PW];
    for (int r = 0; r < PH; r++) for (int c = 0; c < PW; c++)
      pad[r][c] = (r == 0 || c == 0 || r == PH - 1 || c == PW - 1) ? 8'h00 : gray[(r - 1) * W + c - 1];
    if (inj) pad[er][ec] ^= mask;
    for (int i = 0; i < H; i++) for (int j = 0; j < W; j++) begin
      logic [7:0] code = '0;
      for (int n = 0; n < 8; n++) code[7 - n] = (pad[i + dr[n]][j + dc[n]] >= pad[i + 1][j + 1]);
      out[i * W + j] = code;
    end
  endfunction

  task automatic load_image();
    for (int i = 0; i < NP; i++) begin
      @(negedge clk); img_we = 1; img_waddr = 12'(i); img_wdata = gray[i];
    end
    @(negedge clk); img_we = 0;
  endtask

  task automatic run_op(op_e m, int cls, bit e, output int cycles);
    @(negedge clk); start = 1; mode = m; train_class = 3'(cls); err = e;
    @(negedge clk); start = 0; err = 0;
    cycles = 1;
    while (!done && cycles < 100000) begin @(negedge clk); cycles++; end
  endtask

  task automatic train(int k);
    int cyc;
    logic [7:0] ref_img [NP];
    load_image();
    run_op(OP_TRAIN, k, 1'b1, cyc);   // err is ignored in TRAIN
    ref_lbp(ref_img, 0, 0, 0, 8'h00);
    for (int b = 0; b < 256; b++) hist_k[k][b] = 0;
    for (int i = 0; i < NP; i++) begin
      lbp_k[k][i] = ref_img[i];
      hist_k[k][ref_img[i]]++;
    end
    check(cyc == PW * PH + 7, $sformatf("train %0d took %0d clocks", k, cyc));
    check(!err_armed, "error armed during TRAIN");
    n_train++;
  endtask

  task automatic test(bit e, string name);
    int cyc, hist_t [256], best_d, best_x, exp_pos;
    longint d [N_CLASS];
    logic [6:0] emo;
    load_image();
    run_op(OP_TEST, 0, e, cyc);
    n_test++;
    check(err_armed == e, {name, ": err_armed"});
    if (e) n_inject++;
    ref_lbp(lbp_t, e, int'(err_row), int'(err_col), err_mask);
    // histogram distances and decision
    for (int b = 0; b < 256; b++) hist_t[b] = 0;
    for (int i = 0; i < NP; i++) hist_t[lbp_t[i]]++;
    best_d = 0;
    for (int k = 0; k < N_CLASS; k++) begin
      d[k] = 0;
      for (int b = 0; b < 256; b++) d[k] += longint'(hist_t[b] - hist_k[k][b]) ** 2;
      if (d[k] < d[best_d]) best_d = k;
    end
    emo = {surprise, sad, happy, fear, disgust, contempt, anger};
    check(emo == 7'(1 << best_d), $sformatf("%s: emotions %b, expected class %0d", name, emo, best_d));
    // smallest XOR word and its first set bit
    best_x = 0;
    for (int k = 1; k < N_CLASS; k++) begin
      for (int i = 0; i < NP; i++) begin
        logic [7:0] a = lbp_t[i] ^ lbp_k[k][i], b = lbp_t[i] ^ lbp_k[best_x][i];
        if (a < b) begin best_x = k; break; end
        if (a > b) break;
      end
    end
    exp_pos = -1;
    for (int i = 0; i < NP && exp_pos < 0; i++) begin
      logic [7:0] x = lbp_t[i] ^ lbp_k[best_x][i];
      for (int b = 7; b >= 0; b--) if (x[b] && exp_pos < 0) exp_pos = i * 8 + 7 - b;
    end
    check(match_class == 3'(best_x), $sformatf("%s: match %0d exp %0d", name, match_class, best_x));
    if (exp_pos < 0) begin
      check(!error_flag, $sformatf("%s: flag raised at %0d on a clean match", name, error_position));
      check(cyc == PW * PH + 6 + 257 + 2 * NBITS + 9, $sformatf("%s: clean test took %0d clocks", name, cyc));
      n_clean++;
    end else begin
      check(error_flag && error_position == 15'(exp_pos), $sformatf("%s: error %0d at %0d exp %0d", name, error_flag, error_position, exp_pos));
      check(cyc == PW * PH + 6 + 257 + NBITS + exp_pos + 10, $sformatf("%s: test took %0d clocks", name, cyc));
      if (error_flag) n_flag_on++;
    end
    $display("%s: class %0d, KNN match %0d, error_flag %0d pos %0d (induced at r%0d c%0d mask %h armed %0d)",
             name, best_d, match_class, error_flag, error_position, err_row, err_col, err_mask, err_armed);
    // read the test LBP image back
    for (int i = 0; i < NP; i += 7) begin
      @(negedge clk); lbp_raddr = 12'(i); @(negedge clk);
      check(lbp_rdata == lbp_t[i], $sformatf("%s: read-back %0d got %h exp %h", name, i, lbp_rdata, lbp_t[i]));
    end
    n_readback++;
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] saved [NP];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // seven trained images, each a different smooth ramp plus noise
    for (int k = 0; k < N_CLASS; k++) begin
      for (int i = 0; i < NP; i++)
        gray[i] = 8'(((i / W) * (k + 1) + (i % W) * (7 - k)) / 2 + $urandom_range(40));
      train(k);
      if (k == int'(FEAR)) saved = gray;
    end
    gray = saved;
    test(1'b0, "fear image, no error");
    test(1'b1, "fear image, error 1");
    test(1'b1, "fear image, error 2");
    test(1'b1, "fear image, error 3");
    for (int i = 0; i < NP; i++) gray[i] = 8'($urandom);
    test(1'b0, "noise image");
    test(1'b1, "noise image, error");
    check(n_train > 0,    "no TRAIN operation");
    check(n_test > 0,     "no TEST operation");
    check(n_inject > 0,   "no error induced");
    check(n_flag_on > 0,  "error flag never raised");
    check(n_clean > 0,    "no clean match");
    check(n_readback > 0, "no LBP read-back");
    $display("mechanisms: train %0d test %0d inject %0d flag_on %0d clean %0d readback %0d",
             n_train, n_test, n_inject, n_flag_on, n_clean, n_readback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
