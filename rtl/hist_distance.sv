// hist_distance: Euclidean distance between the test histogram and each
// trained histogram.
//
// After start, the unit walks the bins b = 0 .. BINS-1, one per clock. It
// presents b on `bin`; the histograms answer combinationally with the test
// count and the N_CLASS trained counts, and for every class k it accumulates
// (test[b] - train_k[b])^2. The square root is never taken: the decision only
// needs the smallest distance, and the smallest squared distance belongs to
// the same class.
//
// Timing: BINS clocks after start, done pulses for one clock and distance holds the
// N_CLASS squared distances until the next start. busy covers the walk.
// Comparing histograms by Euclidean distance follows the document; the
// sequential walk and the squared form are this design's choices.
module hist_distance #(
  parameter int N_CLASS = 7,
  parameter int BINS    = 256,
  parameter int CNT_W   = 12,
  parameter int DIST_W  = 32,
  localparam int BW     = $clog2(BINS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [BW-1:0]     bin,
  input  logic [CNT_W-1:0]  test_cnt,
  input  logic [CNT_W-1:0]  train_cnt [N_CLASS],
  output logic [DIST_W-1:0] distance      [N_CLASS],
  output logic              busy,
  output logic              done
);

  logic [BW-1:0] b;
  logic          run;

  assign bin  = b;
  assign busy = run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      b    <= '0;
      done <= 1'b0;
      for (int k = 0; k < N_CLASS; k++) distance[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1;
        b   <= '0;
        for (int k = 0; k < N_CLASS; k++) distance[k] <= '0;
      end else if (run) begin
        for (int k = 0; k < N_CLASS; k++) begin
          logic signed [DIST_W-1:0] d;
          d = $signed(DIST_W'(test_cnt)) - $signed(DIST_W'(train_cnt[k]));
          distance[k] <= distance[k] + DIST_W'(d * d);
        end
        if (b == BW'(BINS - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        b <= b + 1'b1;
      end
    end
  end

endmodule
