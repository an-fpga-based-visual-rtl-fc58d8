// raster_tracker: raster position of the beats entering a line-buffered stage,
// and the flush beats that empty the stage after a frame.
//
// A windowed stage (box filter, demosaic) can produce output row r only once
// input row r+D has arrived. To emit the last D rows of a frame it needs D more
// rows of input, which the sensor does not send. This helper supplies them: after
// the beat flagged eof it issues FLUSH_BEATS dummy beats, one per cycle in which
// no real beat arrives (vertical blanking). For each processed beat, real or
// dummy, it reports the raster position (row, beat column); the position restarts
// at (0,0) on a beat flagged sof. Positions keep counting past the last row
// during the flush, so rows >= frame height mark dummy data.
//
// Timing: combinational. adv/row/col describe the beat presented this cycle.
// The vertical blanking must last at least FLUSH_BEATS cycles; a frame that
// starts while a flush is still pending is flagged by an assertion.
module raster_tracker #(
  parameter int unsigned BPL         = 480,   // beats per line
  parameter int unsigned FLUSH_BEATS = 2402,  // dummy beats issued after eof
  parameter int unsigned ROW_W       = 16,
  parameter int unsigned COL_W       = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic             in_eof,
  output logic             adv,        // a beat (real or dummy) is processed now
  output logic             flushing,   // that beat is a dummy flush beat
  output logic [ROW_W-1:0] row,
  output logic [COL_W-1:0] col
);

  logic [ROW_W-1:0] row_q;
  logic [COL_W-1:0] col_q;
  logic [15:0]      flush_cnt;

  always_comb begin
    flushing = !in_valid && (flush_cnt != '0);
    adv      = in_valid || flushing;
    row      = (in_valid && in_sof) ? '0 : row_q;
    col      = (in_valid && in_sof) ? '0 : col_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q     <= '0;
      col_q     <= '0;
      flush_cnt <= '0;
    end else begin
      if (adv) begin
        if (col == COL_W'(BPL - 1)) begin
          col_q <= '0;
          row_q <= row + 1'b1;
        end else begin
          col_q <= col + 1'b1;
          row_q <= row;
        end
      end
      if (in_valid && in_eof)
        flush_cnt <= 16'(FLUSH_BEATS);
      else if (in_valid && in_sof)
        flush_cnt <= '0;
      else if (flushing)
        flush_cnt <= flush_cnt - 1'b1;
    end
  end

  // A new frame must not start before the previous one has been flushed out.
  a_no_early_frame: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_sof) |-> (flush_cnt == '0))
    else $error("raster_tracker: frame started during flush of the previous frame");

endmodule
