// far_gen -- frame address sequence generator for a rectangular region.
//
// Given a region (clock-region rows row0..row1, columns col0..col1) it walks
// every frame of it: for each row, for each column, minor 0 up to the number
// of frames of that column's kind minus one. The column kinds and frame counts
// come from s6_device_pkg, so the same state machine serves any family whose
// package describes it. Outputs are the two frame address words, plus flags
// marking the first frame of a row (used to restart the data pointer when one
// row of data is replicated over several rows) and the last frame.
//
// Timing: start loads the region; one cycle later valid is high and the first
// address is on the outputs. Each cycle with next high advances to the
// following frame; next on the last frame ends the walk (valid drops the cycle
// after). Coordinates are assumed ordered (row0 <= row1, col0 <= col1) and
// inside the device; ordering them is the caller's job.
module far_gen
  import s6_device_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  region_t region,
  input  logic    next,
  output logic    valid,
  output word_t   far_maj,
  output word_t   far_min,
  output logic    row_first,   // current frame is the first of its row
  output logic    last         // current frame is the last of the region
);

  region_t r;
  coord_t  row, col;
  minor_t  minor;
  minor_t  minor_last;

  assign minor_last = frames_per_col(col_type(col)) - minor_t'(1);
  assign far_maj    = far_major(row, col);
  assign far_min    = far_minor(minor);
  assign row_first  = (col == r.col0) && (minor == '0);
  assign last       = (row == r.row1) && (col == r.col1) && (minor == minor_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r     <= '0;
      row   <= '0;
      col   <= '0;
      minor <= '0;
      valid <= 1'b0;
    end else if (start) begin
      r     <= region;
      row   <= region.row0;
      col   <= region.col0;
      minor <= '0;
      valid <= 1'b1;
    end else if (valid && next) begin
      if (last) begin
        valid <= 1'b0;
      end else if (minor != minor_last) begin
        minor <= minor + minor_t'(1);
      end else begin
        minor <= '0;
        if (col != r.col1) begin
          col <= col + coord_t'(1);
        end else begin
          col <= r.col0;
          row <= row + coord_t'(1);
        end
      end
    end
  end

  a_region_ok: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> region.row0 <= region.row1 && region.col0 <= region.col1 &&
              32'(region.row1) < NUM_ROWS && 32'(region.col1) < NUM_COLS);

endmodule
