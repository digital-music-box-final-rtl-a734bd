// music_box_fpga: FPGA of a digital music box.
//
// The box plays a song chosen on a 4x4 keypad on three speakers and lights
// one of 16 LEDs for the strongest frequency of the melody.  A Raspberry Pi
// plays the music; this FPGA does two jobs for it:
//   * keypad: keypad_scanner scans the keypad at about 153 Hz and drives one
//     of five song lines to the Pi (keys 1..5);
//   * spectrum: the Pi sends the melody as a square wave on `data`;
//     fft_controller samples it at about 2.4 kHz, runs a 32-point FFT on
//     each 32 samples and lights LED k for the bin k (about 76 Hz wide) of
//     highest energy; `done` tells the Pi that an FFT has finished.
// Everything runs on the 40 MHz board clock; tick_gen makes the two slow
// rates as clock enables.  `data` is asynchronous and is synchronised with
// two flip-flops; the rows are synchronised inside the scanner.  `reset` is
// active high and asynchronous.
//
// With the default dividers an LED update takes 32 sample periods plus the
// FFT: 32 * 16384 + about 170 cycles, 13 ms at 40 MHz.  The pin set and the
// rates follow the original design; the single clock domain and the synchronisers
// are this design's choices.
module music_box_fpga
  import music_box_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 16384,   // 40 MHz / 16384 = 2441 Hz
  parameter int unsigned SCAN_DIV   = 262144   // 40 MHz / 262144 = 153 Hz
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 data,
  input  logic [3:0]           rows,
  output logic                 done,
  output logic [NUM_LEDS-1:0]  leds,
  output logic [3:0]           cols,
  output logic [NUM_SONGS-1:0] song
);
  logic sample_tick, scan_tick;
  logic data_meta, data_sync;

  always_ff @(posedge clk or posedge reset)
    if (reset) {data_sync, data_meta} <= '0;
    else       {data_sync, data_meta} <= {data_meta, data};

  tick_gen #(.DIV(SAMPLE_DIV)) u_sample_tick (.clk, .rst(reset), .tick(sample_tick));
  tick_gen #(.DIV(SCAN_DIV))   u_scan_tick   (.clk, .rst(reset), .tick(scan_tick));

  fft_controller u_fft_ctrl (
    .clk, .rst(reset), .sample_tick, .data_in(data_sync),
    .done, .leds, .peak_bin(), .frame_done()
  );

  keypad_scanner u_keypad (
    .clk, .rst(reset), .scan_tick, .rows, .cols, .key(), .key_valid(), .song
  );
endmodule
