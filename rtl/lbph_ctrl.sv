// lbph_ctrl: sequencer for one train or test operation.
//
// An operation starts with a start pulse while idle; mode, class and err are
// latched then.
//   TRAIN (mode = OP_TRAIN): clear the histogram of trained class `cls`, run
//     the padded scan through the LBP engine with error induction off; the LBP
//     image and its histogram become trained image `cls`. Then done.
//   TEST (mode = OP_TEST): clear the test histogram, run the scan with error
//     induction armed if err was high, then the Euclidean-distance walk (whose
//     end also latches the emotion decision), then the improved-KNN error
//     identifier. Then done.
// Phase handshakes are single-clock pulses: scan_start (also the error
// inductor's frame_start) until lbp_last, dist_start until dist_done,
// knn_start until knn_done. done pulses for one clock at the end; busy is high
// in between. The order of the phases follows the design flow; the controller
// itself and training through the same LBP path are this design's choices.
module lbph_ctrl
  import lbph_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  op_e           mode,
  input  logic [CLASS_W-1:0] cls,
  input  logic          err,
  input  logic          lbp_last,
  input  logic          dist_done,
  input  logic          knn_done,
  output op_e           op,
  output logic [CLASS_W-1:0] op_cls,
  output logic          inject,
  output logic          hist_clear,
  output logic          scan_start,
  output logic          dist_start,
  output logic          knn_start,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {C_IDLE, C_CLEAR, C_LBP, C_DIST, C_KNN} cstate_e;
  cstate_e state;

  assign busy = (state != C_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      op         <= OP_TRAIN;
      op_cls     <= '0;
      inject     <= 1'b0;
      hist_clear <= 1'b0;
      scan_start <= 1'b0;
      dist_start <= 1'b0;
      knn_start  <= 1'b0;
      done       <= 1'b0;
    end else begin
      hist_clear <= 1'b0;
      scan_start <= 1'b0;
      dist_start <= 1'b0;
      knn_start  <= 1'b0;
      done       <= 1'b0;
      case (state)
        C_IDLE:  if (start) begin
                   op         <= mode;
                   op_cls     <= cls;
                   inject     <= err && (mode == OP_TEST);
                   hist_clear <= 1'b1;
                   state      <= C_CLEAR;
                 end
        C_CLEAR: begin
                   scan_start <= 1'b1;
                   state      <= C_LBP;
                 end
        C_LBP:   if (lbp_last) begin
                   if (op == OP_TEST) begin
                     dist_start <= 1'b1;
                     state      <= C_DIST;
                   end else begin
                     done  <= 1'b1;
                     state <= C_IDLE;
                   end
                 end
        C_DIST:  if (dist_done) begin
                   knn_start <= 1'b1;
                   state     <= C_KNN;
                 end
        C_KNN:   if (knn_done) begin
                   done  <= 1'b1;
                   state <= C_IDLE;
                 end
        default: state <= C_IDLE;
      endcase
    end
  end

  // At most one phase starts per clock, and done ends the operation.
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({hist_clear, scan_start, dist_start, knn_start}));
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
