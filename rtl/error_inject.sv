// error_inject: random error induction on the zero-padded pixel stream.
//
// To show that the error identifier works, one pixel of the padded
// (IMG_H+2) x (IMG_W+2) test image can be corrupted. When frame_start is
// pulsed, the block latches a pseudo-random position (err_row, err_col) and a
// non-zero 8-bit XOR pattern (err_mask) from a free-running 16-bit LFSR
// (x^16 + x^14 + x^13 + x^11 + 1). While the frame streams through, the pixel
// at that position is XORed with err_mask if the 1-bit input err was high at
// frame_start; every other pixel passes unchanged. The position may fall on a
// padding pixel, since the error is induced on the padded image.
//
// Timing: one register stage, out_* follow in_* by one clock. err_row,
// err_col, err_mask and err_armed hold from frame_start to the next one, so a
// test can predict the corrupted pixel. Inducing one error per frame on the
// padded image follows the document; the LFSR, the modulo folding of the
// position and the replacement of a zero mask by 8'h01 are this design's own.
module error_inject #(
  parameter int          IMG_W = 48,
  parameter int          IMG_H = 48,
  parameter logic [15:0] SEED  = 16'hACE1,
  localparam int PW = IMG_W + 2,
  localparam int PH = IMG_H + 2,
  localparam int CW = $clog2(PW > PH ? PW : PH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          err,          // ERR: induce an error in the next frame
  input  logic          frame_start,
  input  logic          in_valid,
  input  logic [7:0]    in_pix,
  input  logic [CW-1:0] in_row,
  input  logic [CW-1:0] in_col,
  output logic          out_valid,
  output logic [7:0]    out_pix,
  output logic [CW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          err_armed,
  output logic [CW-1:0] err_row,
  output logic [CW-1:0] err_col,
  output logic [7:0]    err_mask
);

  logic [15:0] lfsr;
  logic        hit;

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= (SEED == 16'h0) ? 16'h1 : SEED;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err_armed <= 1'b0;
      err_row   <= '0;
      err_col   <= '0;
      err_mask  <= 8'h01;
    end else if (frame_start) begin
      err_armed <= err;
      err_row   <= CW'(int'(lfsr[5:0]) % PH);
      err_col   <= CW'(int'(lfsr[11:6]) % PW);
      err_mask  <= (lfsr[15:8] == 8'h00) ? 8'h01 : lfsr[15:8];
    end
  end

  assign hit = err_armed && (in_row == err_row) && (in_col == err_col);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= hit ? (in_pix ^ err_mask) : in_pix;
      out_row   <= in_row;
      out_col   <= in_col;
    end
  end

endmodule
