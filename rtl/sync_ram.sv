// sync_ram: one write port, one read port, synchronous read.
//
// Used for every image-sized store of the design: the grey input image, the
// test LBP image, the seven trained LBP images and the storage behind the
// SIPO registers. A write and a read may happen in the same clock; rdata
// shows mem[raddr] one clock after raddr is presented (read-before-write when
// both addresses are equal). The contents are not reset. Depth and width
// default to one 48x48 image of 8-bit pixels.
module sync_ram #(
  parameter int DEPTH = 2304,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
