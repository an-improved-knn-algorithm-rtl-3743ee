// min_sort: finds the numerically smallest of N serial words.
//
// The N XOR words arrive side by side, one bit of each per clock, most
// significant bit first (first marks the first bit, last the final one). A
// word stays a candidate for the minimum as long as, at every bit so far, it
// has had a 0 wherever some other candidate had a 0: at the first bit where
// candidates disagree, those with a 1 are larger and drop out. After the last
// bit the surviving candidates are all equal; the lowest index among them is
// reported.
//
// Timing: match_idx and a one-clock match_valid pulse follow the clock that
// carries `last`. Nothing is stored but the N-bit candidate mask, so the
// words can be of any length. Picking the smallest XOR word follows the
// design's description; doing the comparison serially and breaking ties
// towards the lowest index are this design's choices.
module min_sort #(
  parameter int N  = 7,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          first,
  input  logic          last,
  input  logic [N-1:0]  x,
  output logic [IW-1:0] match_idx,
  output logic          match_valid
);

  logic [N-1:0] alive, cur, zeros, nxt;
  logic [IW-1:0] low;

  assign cur   = first ? '1 : alive;
  assign zeros = cur & ~x;
  assign nxt   = (zeros != '0) ? zeros : cur;

  always_comb begin
    low = '0;
    for (int k = N - 1; k >= 0; k--)
      if (nxt[k]) low = IW'(k);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alive       <= '1;
      match_idx   <= '0;
      match_valid <= 1'b0;
    end else begin
      match_valid <= 1'b0;
      if (in_valid) begin
        alive <= nxt;
        if (last) begin
          match_idx   <= low;
          match_valid <= 1'b1;
        end
      end
    end
  end

endmodule
