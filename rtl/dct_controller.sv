// dct_controller: Mealy state machine that sequences one 8x8 block through
// row DCT, transpose buffer and column DCT.
//
// States (named after the published controller):
//   IDLE            ready for a block; the first row accepted starts it and
//                   pulses start_dct.
//   ONE_DCT         accepting the remaining rows (one per nd & rfd).
//   TRANS_INTER     all N rows accepted; waiting for the last row-DCT result
//                   to reach the transpose buffer.  rfd is low.
//   TRANSPOSE_READY the buffer is full; it is switched to mode B
//                   (control = 1) and one column per clock is drawn out into
//                   the column DCT (pop).  After N columns, back to IDLE.
// Row-DCT results are written into the transpose buffer in mode A whenever
// the row DCT flags one (s1_valid), whatever the state, so rows may arrive
// with gaps.  start (the buffer enable) is high on every write and every
// read.  cordic_out marks a valid column of 2-D coefficients leaving the
// column DCT (it is the column DCT's own valid flag, passed through so that
// all status signals come from the controller); out_col numbers that column
// (0..N-1).
// Handshake: a row is taken on a clock where nd and rfd are both high
// (rfd is a Mealy output of the state).  rst is asynchronous, active high.
// The published controller waits out the row-DCT latency after every row;
// this one lets rows stream back to back through the pipelined row DCT and
// counts results instead, which is this design's choice.
module dct_controller
  import dct_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 nd,          // new row on the data inputs
  input  logic                 s1_valid,    // row-DCT result available
  input  logic                 s2_valid,    // column-DCT result available
  output logic                 rfd,         // ready for data
  output logic                 accept,      // row taken this clock
  output logic                 start_dct,   // first row of a block taken
  output logic                 start,       // transpose buffer enable
  output logic                 control,     // transpose buffer mode (1 = B)
  output logic                 pop,         // column read into column DCT
  output logic                 cordic_out,  // 2-D result valid
  output logic [$clog2(N)-1:0] out_col      // column index of the result
);

  typedef enum logic [1:0] {IDLE, ONE_DCT, TRANS_INTER, TRANSPOSE_READY} state_e;

  localparam int unsigned CW = $clog2(N);

  state_e        state;
  logic [CW-1:0] rows_in;    // rows accepted in this block
  logic [CW-1:0] rows_st;    // row results written into the buffer
  logic [CW-1:0] cols_out;   // columns drawn out of the buffer
  logic          push;

  assign rfd       = (state == IDLE) || (state == ONE_DCT);
  assign accept    = nd && rfd;
  assign start_dct = accept && (state == IDLE);
  assign push      = s1_valid;
  assign pop       = (state == TRANSPOSE_READY);
  assign start     = push || pop;
  assign control   = (state == TRANSPOSE_READY);
  assign cordic_out = s2_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= IDLE;
      rows_in  <= '0;
      rows_st  <= '0;
      cols_out <= '0;
      out_col  <= '0;
    end else begin
      if (accept) rows_in <= rows_in + 1'b1;
      if (push)   rows_st <= rows_st + 1'b1;
      if (s2_valid) out_col <= out_col + 1'b1;
      case (state)
        IDLE: begin
          if (accept) state <= ONE_DCT;
        end
        ONE_DCT: begin
          if (accept && rows_in == CW'(N - 1)) state <= TRANS_INTER;
        end
        TRANS_INTER: begin
          if (push && rows_st == CW'(N - 1)) state <= TRANSPOSE_READY;
        end
        TRANSPOSE_READY: begin
          cols_out <= cols_out + 1'b1;
          if (cols_out == CW'(N - 1)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The buffer is never written while it is being read out.
  assert property (@(posedge clk) disable iff (rst) !(push && pop))
    else $error("row result arrived while the transpose buffer was in mode B");
  // No row is accepted once a block is complete.
  assert property (@(posedge clk) disable iff (rst) !(accept && state == TRANS_INTER));

endmodule
