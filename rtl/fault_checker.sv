// fault_checker: conditional checker and fault indicator.
//
// After start, a POS_W-bit position counter walks the bits 0 .. NBITS-1 of
// the selected XOR word, one per clock, reading the word a byte at a time
// from its SIPO RAM (bit p is bit 7 - p%8 of byte p/8, so position 0 is the
// first serial bit). A 0 bit means test and trained image agree there. At the
// first 1 the scan stops, error_flag is set and error_pos holds the position;
// if all NBITS bits are 0, error_flag stays 0 and error_pos is 0.
//
// Timing: the RAM has one clock of read latency, so raddr runs one byte ahead
// and is 0 while idle (the byte-0 read is already under way when start
// arrives). done pulses one clock after the deciding bit: p + 1 clocks after
// start for a first set bit at p, NBITS clocks when the word is all zeros.
// Outputs hold until the next start. The 15-bit position and the error flag
// follow the design's description; stopping at the first set bit is this
// design's choice.
module fault_checker #(
  parameter int NBITS = 18432,
  parameter int POS_W = 15,
  localparam int AW   = $clog2(NBITS / 8)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [AW-1:0]    raddr,
  input  logic [7:0]       rdata,
  output logic             busy,
  output logic             done,
  output logic             error_flag,
  output logic [POS_W-1:0] error_pos
);

  logic             run;
  logic [POS_W-1:0] pos;
  logic [POS_W-1:0] pos_n;
  logic             bit_now;

  assign pos_n   = pos + 1'b1;
  assign raddr   = run ? AW'(pos_n >> 3) : '0;
  assign bit_now = rdata[3'd7 - pos[2:0]];
  assign busy    = run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run        <= 1'b0;
      pos        <= '0;
      done       <= 1'b0;
      error_flag <= 1'b0;
      error_pos  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run        <= 1'b1;
        pos        <= '0;
        error_flag <= 1'b0;
        error_pos  <= '0;
      end else if (run) begin
        if (bit_now) begin
          run        <= 1'b0;
          done       <= 1'b1;
          error_flag <= 1'b1;
          error_pos  <= pos;
        end else if (pos == POS_W'(NBITS - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        pos <= pos_n;
      end
    end
  end

  // A reported position always lies inside the scanned word.
  a_pos_range: assert property (@(posedge clk) disable iff (!rst_n)
    done && error_flag |=> error_pos < POS_W'(NBITS));

endmodule
