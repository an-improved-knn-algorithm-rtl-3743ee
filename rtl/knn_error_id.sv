// knn_error_id: the improved-KNN error identifier.
//
// The test LBP image and the N_CLASS trained LBP images are each read as one
// long word of NBYTES*8 bits (18432 for a 48x48 image), pixel 0 first and
// each pixel MSB first. A PISO per image turns the image into a bit stream;
// the test stream is XORed with each trained stream, so a trained image that
// matches the test image yields an all-zero word and every differing bit is a
// 1. The N_CLASS XOR streams are stored in SIPO registers and, on the fly,
// min_sort finds the numerically smallest XOR word: the closest trained image,
// found without any distance arithmetic. fault_checker then scans that stored
// word and reports the first differing bit as the error position.
//
// Interface: on start the unit drives raddr to all eight LBP RAMs (synchronous
// read, one clock) and takes test_byte/train_byte the clock after. Phases:
//   PREF   1 clock, read byte 0
//   LOAD   1 clock, PISOs load byte 0
//   STREAM NBYTES*8 clocks, one bit per clock; the PISOs reload every 8th
//   SORT   wait for min_sort's result
//   CHECK  fault_checker scan, up to NBYTES*8 clocks
// done pulses when match_idx, error_flag and error_pos are valid; they hold
// until the next start. The PISO/XOR/SIPO/sort/check chain follows the
// design's description; the memory-backed PISO and SIPO and the phase timing
// are this design's choices.
module knn_error_id #(
  parameter int NBYTES  = 2304,
  parameter int N_CLASS = 7,
  parameter int POS_W   = 15,
  localparam int AW     = $clog2(NBYTES),
  localparam int NBITS  = NBYTES * 8,
  localparam int IW     = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [AW-1:0]    raddr,
  input  logic [7:0]       test_byte,
  input  logic [7:0]       train_byte [N_CLASS],
  output logic             busy,
  output logic             done,
  output logic [IW-1:0]    match_idx,
  output logic             error_flag,
  output logic [POS_W-1:0] error_pos
);

  typedef enum logic [2:0] {S_IDLE, S_PREF, S_LOAD, S_STREAM, S_SORT, S_CHECK} state_e;
  state_e state;

  logic [AW-1:0]    a;          // byte being shifted out
  logic [POS_W-1:0] pos;        // bit of the stream
  logic             load, shift, bit_valid, first, last;
  logic             t_bit;
  logic [N_CLASS-1:0] k_bit, x;
  logic             sort_valid;
  logic [IW-1:0]    sort_idx;
  logic             chk_start, chk_done;
  logic [AW-1:0]    chk_raddr;
  logic [7:0]       sipo_rdata [N_CLASS];
  logic [7:0]       sel_rdata;

  assign raddr     = (state == S_LOAD || state == S_STREAM) ? AW'(a + 1'b1) : '0;
  assign load      = (state == S_LOAD) || (state == S_STREAM && pos[2:0] == 3'd7);
  assign shift     = (state == S_STREAM);
  assign bit_valid = (state == S_STREAM);
  assign first     = (pos == '0);
  assign last      = (pos == POS_W'(NBITS - 1));
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      a         <= '0;
      pos       <= '0;
      chk_start <= 1'b0;
      match_idx <= '0;
      done      <= 1'b0;
    end else begin
      chk_start <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE:   if (start) begin
                    state <= S_PREF;
                    a     <= '0;
                    pos   <= '0;
                  end
        S_PREF:   state <= S_LOAD;
        S_LOAD:   state <= S_STREAM;
        S_STREAM: begin
                    if (pos[2:0] == 3'd7) a <= a + 1'b1;
                    if (last) state <= S_SORT;
                    pos <= pos + 1'b1;
                  end
        S_SORT:   if (sort_valid) begin
                    match_idx <= sort_idx;
                    chk_start <= 1'b1;
                    state     <= S_CHECK;
                  end
        S_CHECK:  if (chk_done) begin
                    done  <= 1'b1;
                    state <= S_IDLE;
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end

  // Parallel-in serial-out registers: test image and each trained image.
  piso_reg #(.WIDTH(8)) u_piso_test (
    .clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .din(test_byte), .sout(t_bit)
  );

  for (genvar k = 0; k < N_CLASS; k++) begin : g_class
    piso_reg #(.WIDTH(8)) u_piso (
      .clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .din(train_byte[k]), .sout(k_bit[k])
    );
    // bitwise XOR of the test stream with trained stream k
    assign x[k] = t_bit ^ k_bit[k];
    sipo_reg #(.NBYTES(NBYTES)) u_sipo (
      .clk(clk), .rst_n(rst_n), .clear(state == S_PREF), .in_valid(bit_valid), .sin(x[k]),
      .raddr(chk_raddr), .rdata(sipo_rdata[k])
    );
  end

  min_sort #(.N(N_CLASS)) u_sort (
    .clk(clk), .rst_n(rst_n), .in_valid(bit_valid), .first(first), .last(last), .x(x),
    .match_idx(sort_idx), .match_valid(sort_valid)
  );

  assign sel_rdata = sipo_rdata[match_idx];

  fault_checker #(.NBITS(NBITS), .POS_W(POS_W)) u_check (
    .clk(clk), .rst_n(rst_n), .start(chk_start), .raddr(chk_raddr), .rdata(sel_rdata),
    .busy(), .done(chk_done), .error_flag(error_flag), .error_pos(error_pos)
  );

  // A new comparison may only be started while the unit is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
