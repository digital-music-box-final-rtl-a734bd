// music_box_pkg: types and constants shared by the music-box FPGA.
//
// The FPGA computes a 32-point radix-2 FFT on 16-bit complex words.  A
// complex word is carried as one packed struct {re, im}, so a bus of
// "32 bits" in a port list is one such word.  The twiddle factors are
// Q1.15 numbers (0x7fff stands for +1).  The keypad is the usual 4x4
// telephone-style matrix; its key codes are 0..9, A..D = 10..13,
// * = 14 and # = 15.
package music_box_pkg;

  localparam int unsigned FFT_N     = 32;   // points per transform
  localparam int unsigned FFT_LOG2N = 5;    // levels of butterflies
  localparam int unsigned DATA_W    = 16;   // bits per real or imaginary part
  localparam int unsigned NUM_LEDS  = 16;   // LEDs = bins 0..15
  localparam int unsigned NUM_SONGS = 5;    // keys 1..5 select a song

  typedef logic [FFT_LOG2N-1:0]   fft_adr_t;
  typedef logic [FFT_LOG2N-2:0]   tw_adr_t;   // 16 twiddle factors

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  // A melody pin sample becomes a real value of +1023 (high) or -1023 (low).
  localparam logic signed [DATA_W-1:0] SAMPLE_HIGH = 16'sh03ff;
  localparam logic signed [DATA_W-1:0] SAMPLE_LOW  = 16'shfc01;

  typedef logic [3:0] key_t;
  localparam key_t KEY_STAR = 4'd14;
  localparam key_t KEY_HASH = 4'd15;

  // Key printed at row r, column c of the keypad (row 0 = top, column 0 = left):
  //   1 2 3 A
  //   4 5 6 B
  //   7 8 9 C
  //   * 0 # D
  function automatic key_t keypad_key(input logic [1:0] row, input logic [1:0] col);
    if (col == 2'd3)      return key_t'(4'd10 + key_t'(row));          // A, B, C, D
    else if (row != 2'd3) return key_t'(4'd3 * key_t'(row) + key_t'(col) + 4'd1); // 1..9
    else case (col)
      2'd0:    return KEY_STAR;
      2'd1:    return 4'd0;
      default: return KEY_HASH;
    endcase
  endfunction

  // True when exactly one bit of a 4-bit keypad vector is set.
  function automatic logic one_hot4(input logic [3:0] v);
    return (v != 4'b0) && ((v & (v - 4'd1)) == 4'b0);
  endfunction

  // Reverse the bits of an FFT address (decimation-in-time input order).
  function automatic fft_adr_t bit_reverse(input fft_adr_t a);
    fft_adr_t r;
    for (int k = 0; k < FFT_LOG2N; k++) r[k] = a[FFT_LOG2N-1-k];
    return r;
  endfunction

endpackage
