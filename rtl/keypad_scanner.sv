// keypad_scanner: 4x4 keypad scanner and song selector.
//
// One column at a time is driven high, cols = 0001, 0010, 0100, 1000, moving
// on at every scan tick (153 Hz in the music box, slow enough to ride over
// switch bounce).  A pressed key connects its row to its column, so the rows
// read back the pressed keys of the driven column.  The rows pass through a
// two-flop synchroniser and are sampled at the end of each column's period,
// on the scan tick, just before the next column is driven.  A sample with
// exactly one row high decodes to a key (layout 1 2 3 A / 4 5 6 B /
// 7 8 9 C / * 0 # D, row 0 and column 0 at the top left), which is kept
// until another key is seen.  Keys 1..5 drive one of the five song lines
// (song[k-1] for key k); any other key, * included, turns them all off.
//
// Timing: `key` and `song` change the cycle after the scan tick on which a
// key is seen.  A key held down is found within 4 scan ticks.  Scanning by
// columns, the held key and the five one-hot song lines follow the original design;
// the four-state scan, the synchroniser and ignoring multi-row samples are
// this design's choices.
module keypad_scanner
  import music_box_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 scan_tick,
  input  logic [3:0]           rows,
  output logic [3:0]           cols,
  output key_t                 key,
  output logic                 key_valid,
  output logic [NUM_SONGS-1:0] song
);
  logic [3:0] rows_meta, rows_sync;
  logic [1:0] col_idx, row_idx;

  always_ff @(posedge clk or posedge rst)
    if (rst) {rows_sync, rows_meta} <= '0;
    else     {rows_sync, rows_meta} <= {rows_meta, rows};

  always_comb begin
    col_idx = '0;
    row_idx = '0;
    for (int k = 0; k < 4; k++) begin
      if (cols[k])      col_idx = 2'(k);
      if (rows_sync[k]) row_idx = 2'(k);
    end
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      cols      <= 4'b0001;
      key       <= '0;
      key_valid <= 1'b0;
    end else if (scan_tick) begin
      cols <= {cols[2:0], cols[3]};
      if (one_hot4(rows_sync)) begin
        key       <= keypad_key(row_idx, col_idx);
        key_valid <= 1'b1;
      end
    end

  always_comb begin
    song = '0;
    if (key_valid && key >= 4'd1 && key <= key_t'(NUM_SONGS)) song[3'(key - 4'd1)] = 1'b1;
  end

  assert property (@(posedge clk) disable iff (rst) one_hot4(cols));
endmodule
