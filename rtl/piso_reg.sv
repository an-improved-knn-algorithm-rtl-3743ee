// piso_reg: parallel-in serial-out shift register, MSB first.
//
// load copies din into the register; shift moves it one place towards the
// MSB, filling with 0. sout is always the current MSB, so after a load the
// first bit is visible at once and each later shift presents the next one.
// load wins over shift. In the error identifier a WIDTH = 8 instance sits
// after each LBP image RAM and is reloaded every eight clocks, which turns the
// whole 2304-pixel image into one 18432-bit serial stream.
module piso_reg #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic             sout
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {sr[WIDTH-2:0], 1'b0};
  end

  assign sout = sr[WIDTH-1];

endmodule
