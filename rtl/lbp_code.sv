// lbp_code: the local binary pattern of one 3x3 window.
//
// The window is given row-major, win[0] top-left .. win[8] bottom-right, with
// the centre Ic = win[4]. The neighbours are numbered clockwise from the
// top-left corner:
//     I0 I1 I2
//     I7 Ic I3
//     I6 I5 I4
// Each neighbour gives S(N) = 1 when IN >= Ic (unsigned 8-bit compare) and 0
// otherwise, and the eight bits are concatenated into the code. With
// S0_MSB = 1 (default) S(0) is the MSB and S(7) the LSB, the bit order the
// design is specified with; S0_MSB = 0 gives the textbook weighting
// sum S(N)*2^N. Purely combinational.
module lbp_code #(
  parameter bit S0_MSB = 1'b1
) (
  input  logic [7:0] win [9],
  output logic [7:0] code
);

  logic [7:0] nb [8];
  logic [7:0] s;         // s[n] = S(n)

  assign nb[0] = win[0];
  assign nb[1] = win[1];
  assign nb[2] = win[2];
  assign nb[3] = win[5];
  assign nb[4] = win[8];
  assign nb[5] = win[7];
  assign nb[6] = win[6];
  assign nb[7] = win[3];

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      if (nb[n] >= win[4]) s[n] = 1'b1;
      else                 s[n] = 1'b0;
    end
    for (int n = 0; n < 8; n++)
      code[n] = S0_MSB ? s[7-n] : s[n];
  end

endmodule
