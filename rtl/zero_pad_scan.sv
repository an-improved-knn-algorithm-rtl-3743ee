// zero_pad_scan: produces the zero-padded image as a pixel stream.
//
// The LBP of a border pixel needs neighbours outside the image, so the
// IMG_H x IMG_W image is surrounded by one row of zeros at top and bottom and
// one column of zeros at left and right, giving (IMG_H+2) x (IMG_W+2) pixels
// (50x50 for the default 48x48). Instead of building the padded copy, this
// block walks the padded raster with a row and a column counter, reads the
// interior pixels from the image RAM (raddr = (row-1)*IMG_W + col-1) and
// substitutes 0 on the border.
//
// Timing: a start pulse begins the scan; one padded pixel leaves per clock,
// (IMG_H+2)*(IMG_W+2) in all, raster order. The RAM has one clock of read
// latency, so pix_valid/pix/row/col appear one clock after the counters.
// busy is high from start until the last pixel has left. The padding follows
// the document; scanning on the fly and the one-pixel-per-clock rate are this
// design's choices.
module zero_pad_scan #(
  parameter int IMG_W = 48,
  parameter int IMG_H = 48,
  localparam int PW   = IMG_W + 2,
  localparam int PH   = IMG_H + 2,
  localparam int AW   = $clog2(IMG_W * IMG_H),
  localparam int CW   = $clog2(PW > PH ? PW : PH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] raddr,
  input  logic [7:0]    rdata,
  output logic          pix_valid,
  output logic [7:0]    pix,
  output logic [CW-1:0] row,
  output logic [CW-1:0] col,
  output logic          busy
);

  logic          run;
  logic [CW-1:0] r, c;
  logic          interior;
  logic          v_q, int_q;
  logic [CW-1:0] r_q, c_q;

  assign interior = (r != '0) && (r != CW'(PH - 1)) && (c != '0) && (c != CW'(PW - 1));
  assign raddr    = interior ? AW'((int'(r) - 1) * IMG_W + int'(c) - 1) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0;
      r   <= '0;
      c   <= '0;
    end else if (start && !run) begin
      run <= 1'b1;
      r   <= '0;
      c   <= '0;
    end else if (run) begin
      if (c == CW'(PW - 1)) begin
        c <= '0;
        if (r == CW'(PH - 1)) run <= 1'b0;
        else                  r   <= r + 1'b1;
      end else begin
        c <= c + 1'b1;
      end
    end
  end

  // Align position and border flag with the RAM's read latency.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      int_q <= 1'b0;
      r_q   <= '0;
      c_q   <= '0;
    end else begin
      v_q   <= run;
      int_q <= interior;
      r_q   <= r;
      c_q   <= c;
    end
  end

  assign pix_valid = v_q;
  assign pix       = int_q ? rdata : 8'h00;
  assign row       = r_q;
  assign col       = c_q;
  assign busy      = run | v_q;

endmodule
