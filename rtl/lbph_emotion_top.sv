// lbph_emotion_top: LBP-histogram emotion recogniser with improved-KNN error
// identification.
//
// A 48x48 grey face image (8-bit pixels, raster order) is written into the
// image buffer. A TRAIN operation computes its LBP image and histogram and
// stores both as trained class train_class (0 anger, 1 contempt, 2 disgust,
// 3 fear, 4 happy, 5 sad, 6 surprise). A TEST operation computes the LBP image
// and histogram of the loaded image, optionally with one pixel of the padded
// image corrupted (err), compares the histogram with the seven trained ones by
// Euclidean distance and raises the output of the closest emotion, and then
// runs the improved-KNN error identifier: the test LBP image is XORed bit by
// bit with every trained LBP image, the smallest XOR word picks the matching
// trained image, and the first differing bit of that word is reported on
// error_flag / error_position.
//
// Datapath: sync_ram (image) -> zero_pad_scan (50x50 stream) -> error_inject
// -> lbp_window -> LBP RAM + lbp_histogram of the target (test or trained k)
// -> hist_distance -> emotion_decide; LBP RAMs -> knn_error_id. lbph_ctrl
// sequences the phases.
//
// Interface and timing: load pixels with img_we/img_waddr/img_wdata while
// busy is low (writes during busy are ignored and flagged by an assertion).
// Pulse start with mode, train_class and err while busy is low; done pulses
// when the operation ends. A TRAIN takes
// about (IMG_H+2)*(IMG_W+2) + 6 clocks, a TEST adds 256 distance clocks and
// 2*IMG_W*IMG_H*8 + ~6 clocks at most for the error identifier. The emotion
// outputs and error results hold until the next TEST. While idle, the test
// LBP image can be read back through lbp_raddr/lbp_rdata (one clock latency).
// The error bit position is 15 bits wide, as specified; position p is bit
// 7 - p%8 of LBP pixel p/8.
module lbph_emotion_top
  import lbph_pkg::*;
#(
  parameter int IMG_W = 48,
  parameter int IMG_H = 48,
  localparam int NPIX = IMG_W * IMG_H,
  localparam int AW   = $clog2(NPIX),
  localparam int CW   = $clog2((IMG_W > IMG_H ? IMG_W : IMG_H) + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // image load
  input  logic                 img_we,
  input  logic [AW-1:0]        img_waddr,
  input  logic [7:0]           img_wdata,
  // operation
  input  logic                 start,
  input  op_e                  mode,
  input  logic [CLASS_W-1:0]   train_class,
  input  logic                 err,
  output logic                 busy,
  output logic                 done,
  // emotion decision
  output logic                 anger,
  output logic                 contempt,
  output logic                 disgust,
  output logic                 fear,
  output logic                 happy,
  output logic                 sad,
  output logic                 surprise,
  // improved-KNN error identification
  output logic                 error_flag,
  output logic [POS_W-1:0]     error_position,
  output logic [CLASS_W-1:0]   match_class,
  // induced error, for observation
  output logic                 err_armed,
  output logic [CW-1:0]        err_row,
  output logic [CW-1:0]        err_col,
  output logic [7:0]           err_mask,
  // test LBP image read-back
  input  logic [AW-1:0]        lbp_raddr,
  output logic [7:0]           lbp_rdata
);

  // ---- control ----------------------------------------------------------
  op_e                op;
  logic [CLASS_W-1:0] op_cls;
  logic               inject, hist_clear, scan_start, dist_start, knn_start;
  logic               lbp_last, dist_done, knn_done;

  lbph_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .cls(train_class), .err(err),
    .lbp_last(lbp_last), .dist_done(dist_done), .knn_done(knn_done),
    .op(op), .op_cls(op_cls), .inject(inject), .hist_clear(hist_clear),
    .scan_start(scan_start), .dist_start(dist_start), .knn_start(knn_start),
    .busy(busy), .done(done)
  );

  // ---- image buffer and padded scan -------------------------------------
  logic [AW-1:0] img_raddr;
  logic [7:0]    img_rdata;
  logic          p_valid, e_valid;
  logic [7:0]    p_pix, e_pix;
  logic [CW-1:0] p_row, p_col, e_row, e_col;

  sync_ram #(.DEPTH(NPIX), .WIDTH(8)) u_img (
    .clk(clk), .we(img_we && !busy), .waddr(img_waddr), .wdata(img_wdata),
    .raddr(img_raddr), .rdata(img_rdata)
  );

  zero_pad_scan #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_pad (
    .clk(clk), .rst_n(rst_n), .start(scan_start), .raddr(img_raddr), .rdata(img_rdata),
    .pix_valid(p_valid), .pix(p_pix), .row(p_row), .col(p_col), .busy()
  );

  error_inject #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_err (
    .clk(clk), .rst_n(rst_n), .err(inject), .frame_start(scan_start),
    .in_valid(p_valid), .in_pix(p_pix), .in_row(p_row), .in_col(p_col),
    .out_valid(e_valid), .out_pix(e_pix), .out_row(e_row), .out_col(e_col),
    .err_armed(err_armed), .err_row(err_row), .err_col(err_col), .err_mask(err_mask)
  );

  // ---- LBP engine ---------------------------------------------------------
  logic          l_valid;
  logic [7:0]    l_code;
  logic [AW-1:0] l_addr;

  lbp_window #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_lbp (
    .clk(clk), .rst_n(rst_n), .in_valid(e_valid), .in_pix(e_pix), .in_row(e_row), .in_col(e_col),
    .out_valid(l_valid), .out_code(l_code), .out_addr(l_addr), .out_last(lbp_last)
  );

  // ---- LBP images and histograms: test and trained ----------------------
  logic              is_test;
  logic [7:0]        bin;
  logic [CNT_W-1:0]  test_cnt;
  logic [CNT_W-1:0]  train_cnt  [N_CLASS];
  logic [AW-1:0]     knn_raddr;
  logic              knn_busy;
  logic [7:0]        test_byte;
  logic [7:0]        train_byte [N_CLASS];

  assign is_test = (op == OP_TEST);

  sync_ram #(.DEPTH(NPIX), .WIDTH(8)) u_test_lbp (
    .clk(clk), .we(l_valid && is_test), .waddr(l_addr), .wdata(l_code),
    .raddr(knn_busy ? knn_raddr : lbp_raddr), .rdata(test_byte)
  );
  assign lbp_rdata = test_byte;

  lbp_histogram #(.BINS(BINS), .CNT_W(CNT_W)) u_test_hist (
    .clk(clk), .rst_n(rst_n), .clear(hist_clear && is_test), .inc(l_valid && is_test),
    .code(l_code), .rd_bin(bin), .rd_count(test_cnt)
  );

  for (genvar k = 0; k < N_CLASS; k++) begin : g_train
    logic sel;
    assign sel = !is_test && (op_cls == CLASS_W'(k));

    sync_ram #(.DEPTH(NPIX), .WIDTH(8)) u_lbp_ram (
      .clk(clk), .we(l_valid && sel), .waddr(l_addr), .wdata(l_code),
      .raddr(knn_raddr), .rdata(train_byte[k])
    );

    lbp_histogram #(.BINS(BINS), .CNT_W(CNT_W)) u_hist (
      .clk(clk), .rst_n(rst_n), .clear(hist_clear && sel), .inc(l_valid && sel),
      .code(l_code), .rd_bin(bin), .rd_count(train_cnt[k])
    );
  end

  // ---- Euclidean distance and decision ----------------------------------
  logic [DIST_W-1:0]  distance [N_CLASS];
  logic [N_CLASS-1:0] emotion;

  hist_distance #(.N_CLASS(N_CLASS), .BINS(BINS), .CNT_W(CNT_W), .DIST_W(DIST_W)) u_dist (
    .clk(clk), .rst_n(rst_n), .start(dist_start), .bin(bin), .test_cnt(test_cnt),
    .train_cnt(train_cnt), .distance(distance), .busy(), .done(dist_done)
  );

  emotion_decide #(.N_CLASS(N_CLASS), .DIST_W(DIST_W)) u_decide (
    .clk(clk), .rst_n(rst_n), .valid(dist_done), .distance(distance),
    .emotion(emotion), .class_idx(), .decided()
  );

  assign anger    = emotion[ANGER];
  assign contempt = emotion[CONTEMPT];
  assign disgust  = emotion[DISGUST];
  assign fear     = emotion[FEAR];
  assign happy    = emotion[HAPPY];
  assign sad      = emotion[SAD];
  assign surprise = emotion[SURPRISE];

  // ---- improved-KNN error identifier ------------------------------------
  knn_error_id #(.NBYTES(NPIX), .N_CLASS(N_CLASS), .POS_W(POS_W)) u_knn (
    .clk(clk), .rst_n(rst_n), .start(knn_start), .raddr(knn_raddr),
    .test_byte(test_byte), .train_byte(train_byte), .busy(knn_busy), .done(knn_done),
    .match_idx(match_class), .error_flag(error_flag), .error_pos(error_position)
  );

  // Host rules: images are loaded and operations started only while idle.
  a_load_idle:  assert property (@(posedge clk) disable iff (!rst_n) img_we |-> !busy);
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
