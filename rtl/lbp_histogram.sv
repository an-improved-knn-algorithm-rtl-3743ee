// lbp_histogram: occurrence counters for the 256 LBP codes of one image.
//
// One counter per code value 8'h00..8'hFF. A clear pulse zeroes all bins in
// one clock; each clock with inc high adds one to bin[code]. Counters are
// CNT_W = 12 bits wide, enough for all 2304 pixels of a 48x48 image falling in
// one bin, and saturate rather than wrap. The read port is combinational:
// rd_count = bin[rd_bin]. Counting codes 00..FF follows the document; the
// widths, the saturation and the synchronous clear are this design's choices.
module lbp_histogram #(
  parameter int BINS  = 256,
  parameter int CNT_W = 12,
  localparam int BW   = $clog2(BINS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  input  logic [BW-1:0]    code,
  input  logic [BW-1:0]    rd_bin,
  output logic [CNT_W-1:0] rd_count
);

  logic [CNT_W-1:0] bin [BINS];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int b = 0; b < BINS; b++) bin[b] <= '0;
    end else if (inc && (bin[code] != '1)) begin
      bin[code] <= bin[code] + 1'b1;
    end
  end

  assign rd_count = bin[rd_bin];

endmodule
