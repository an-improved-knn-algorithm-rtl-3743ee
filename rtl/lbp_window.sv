// lbp_window: streaming LBP engine for the zero-padded image.
//
// Input is the padded (IMG_H+2) x (IMG_W+2) image, one pixel per clock in
// raster order with its row/column. Each LBP pixel (i, j) of the IMG_H x IMG_W
// result is the code of the 3x3 window on padded rows i..i+2 and columns
// j..j+2, so LBP row 1 comes from padded rows 1-3, row 2 from rows 2-4, and
// so on. Two line buffers keep the previous two padded rows; for each
// incoming pixel the column (two rows up, one row up, current) is shifted
// into a 3x3 window register. Once at least three rows and three columns have
// arrived, the window is complete and its code (lbp_code) is emitted.
//
// Timing: two clocks from a padded pixel to the code whose window it
// completes; one code per clock during the rows 2.. of the padded stream.
// out_addr is the LBP pixel index row*IMG_W+col, out_last marks the last one.
// The 3-row window follows the document; line buffers are this design's way
// of getting it from a stream.
module lbp_window #(
  parameter int IMG_W  = 48,
  parameter int IMG_H  = 48,
  parameter bit S0_MSB = 1'b1,
  localparam int PW = IMG_W + 2,
  localparam int PH = IMG_H + 2,
  localparam int CW = $clog2(PW > PH ? PW : PH),
  localparam int AW = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    in_pix,
  input  logic [CW-1:0] in_row,
  input  logic [CW-1:0] in_col,
  output logic          out_valid,
  output logic [7:0]    out_code,
  output logic [AW-1:0] out_addr,
  output logic          out_last
);

  logic [7:0]    lb1 [PW];     // padded row r-1
  logic [7:0]    lb2 [PW];     // padded row r-2
  logic [7:0]    win [9];      // row-major 3x3 window
  logic          w_valid;
  logic [AW-1:0] w_addr;
  logic          w_last;
  logic [7:0]    code;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb2[in_col] <= lb1[in_col];
      lb1[in_col] <= in_pix;
      // shift the window left and bring in the new column on the right
      win[0] <= win[1];  win[1] <= win[2];  win[2] <= lb2[in_col];
      win[3] <= win[4];  win[4] <= win[5];  win[5] <= lb1[in_col];
      win[6] <= win[7];  win[7] <= win[8];  win[8] <= in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_valid <= 1'b0;
      w_addr  <= '0;
      w_last  <= 1'b0;
    end else begin
      w_valid <= in_valid && (in_row >= CW'(2)) && (in_col >= CW'(2));
      w_addr  <= AW'((int'(in_row) - 2) * IMG_W + int'(in_col) - 2);
      w_last  <= (in_row == CW'(PH - 1)) && (in_col == CW'(PW - 1));
    end
  end

  lbp_code #(.S0_MSB(S0_MSB)) u_code (.win(win), .code(code));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_code  <= '0;
      out_addr  <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= w_valid;
      out_code  <= code;
      out_addr  <= w_addr;
      out_last  <= w_valid && w_last;
    end
  end

endmodule
