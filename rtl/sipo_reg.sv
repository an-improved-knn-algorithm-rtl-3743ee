// sipo_reg: serial-in parallel-out register holding one 18432-bit XOR word.
//
// Serial bits (in_valid/sin) are gathered MSB first into an 8-bit shift
// register; every eighth bit the completed byte is written into a RAM of
// NBYTES bytes at the next byte address, so the first serial bit ends up in
// bit 7 of byte 0. clear restarts at byte 0 and empties the partial byte. The
// stored word is read back a byte at a time: rdata = byte[raddr] one clock
// after raddr. With the default NBYTES = 2304 it holds the 18432 XOR bits of
// one LBP-image comparison; keeping them in a RAM rather than in 18432
// flip-flops is this design's choice.
module sipo_reg #(
  parameter int NBYTES = 2304,
  localparam int AW    = $clog2(NBYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic          sin,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [6:0]    part;     // bits of the byte received so far
  logic [2:0]    nbit;
  logic [AW-1:0] waddr;
  logic          we;
  logic [7:0]    wbyte;

  assign we    = in_valid && (nbit == 3'd7);
  assign wbyte = {part, sin};

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      part  <= '0;
      nbit  <= '0;
      waddr <= '0;
    end else if (in_valid) begin
      part <= {part[5:0], sin};
      nbit <= nbit + 1'b1;
      if (nbit == 3'd7) waddr <= waddr + 1'b1;
    end
  end

  sync_ram #(.DEPTH(NBYTES), .WIDTH(8)) u_mem (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wbyte), .raddr(raddr), .rdata(rdata)
  );

  // The serial word must not be longer than the store.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !clear |-> int'(waddr) < NBYTES);

endmodule
