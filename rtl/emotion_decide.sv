// emotion_decide: the emotion decision from the histogram distances.
//
// When valid is high, the class with the smallest distance wins (the lowest
// index on a tie) and its bit of the one-hot `emotion` output is set, with
// class_idx giving its number. With the default seven classes the bits are
// 0 anger, 1 contempt, 2 disgust, 3 fear, 4 happy, 5 sad, 6 surprise, each an
// active-high YES for that emotion. Outputs are registered (one clock after
// valid) and hold until the next valid; reset clears them. Choosing the
// minimum distance follows the design's description; the tie rule is this
// design's own.
module emotion_decide #(
  parameter int N_CLASS = 7,
  parameter int DIST_W  = 32,
  localparam int IW     = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [DIST_W-1:0] distance [N_CLASS],
  output logic [N_CLASS-1:0] emotion,
  output logic [IW-1:0]     class_idx,
  output logic              decided
);

  logic [IW-1:0]     best;
  logic [DIST_W-1:0] best_d;

  always_comb begin
    best   = '0;
    best_d = distance[0];
    for (int k = 1; k < N_CLASS; k++) begin
      if (distance[k] < best_d) begin
        best   = IW'(k);
        best_d = distance[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      emotion   <= '0;
      class_idx <= '0;
      decided   <= 1'b0;
    end else if (valid) begin
      emotion   <= N_CLASS'(1) << best;
      class_idx <= best;
      decided   <= 1'b1;
    end
  end

endmodule
