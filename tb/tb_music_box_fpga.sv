// tb_music_box_fpga: end-to-end test of the music-box FPGA.
//
// The clock is slowed so that, with SAMPLE_DIV = 256, the sample rate is the
// real 2441.4 Hz (625 kHz clock); SCAN_DIV = 64 speeds up the keypad scan.
// A keypad model and a model of the Pi's melody pin drive the FPGA.  The test
// selects songs 1..5 and clears the selection with *, then plays the notes of
// the C-major test scale (C4..C5), a note below the LED range and notes above
// it (whose aliases and harmonics light an LED).  For every FFT frame the LEDs
// are checked against the reference FFT of the samples the FPGA took, and
// for the scale notes the lit bin must be within one bin of f*32/2441.4.
// Each mechanism (column scan, key decode, song select, song clear, sampling,
// FFT frame, done pulse, memory clear, out-of-range note) is counted and must
// happen at least once.
module tb_music_box_fpga;
  import music_box_pkg::*;
  import fft_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  logic data, done;
  logic [3:0] rows, cols;
  logic [15:0] leds, pressed = '0;
  logic [4:0] song;
  int unsigned freq_hz = 0;
  always #800 clk = ~clk;   // 625 kHz: 625 kHz / 256 = 2441.4 Hz sampling

  music_box_fpga #(.SAMPLE_DIV(256), .SCAN_DIV(64)) dut (
    .clk, .reset, .data, .rows, .done, .leds, .cols, .song);
  keypad_matrix_model kp (.pressed, .cols, .rows);
  pi_melody_model pi (.freq_hz, .tone(data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_scan = 0, n_key = 0, n_song = 0, n_clear_song = 0, n_samples = 0, n_frames = 0,
      n_done = 0, n_memclear = 0, n_out_of_range = 0;

  always @(posedge clk) begin
    if (dut.scan_tick) n_scan++;
    if (dut.scan_tick && $onehot(dut.u_keypad.rows_sync)) n_key++;
    if (dut.u_fft_ctrl.load_we) n_samples++;
    if (!reset && done && !$past(done)) n_done++;
  end

  // capture the samples of each frame
  vec32_t cap;
  always @(posedge clk)
    if (dut.u_fft_ctrl.load_we) cap[dut.u_fft_ctrl.count] = dut.data_sync ? 1023 : -1023;

  real  note_bin = -1.0;   // expected bin of the current note, -1: do not check
  logic in_range = 1;
  always @(posedge clk) if (!reset && dut.u_fft_ctrl.frame_done) begin
    vec32_t xi, yr, yi;
    int exp_bin, got_bin;
    bit clean;
    clean = 1;
    foreach (xi[n]) xi[n] = 0;
    fft32_ref(cap, xi, yr, yi);
    exp_bin = peak_ref(yr, yi);
    got_bin = -1;
    for (int k = 0; k < 16; k++) if (leds[k]) got_bin = k;
    check(leds == 16'(1) << exp_bin,
          $sformatf("frame %0d (%0d Hz): leds %h expected bin %0d", n_frames, freq_hz, leds, exp_bin));
    if (note_bin >= 0.0)
      check(got_bin >= 0 && real'(got_bin) - note_bin <= 1.0 && note_bin - real'(got_bin) <= 1.0,
            $sformatf("%0d Hz lit bin %0d, expected about %0.2f", freq_hz, got_bin, note_bin));
    if (!in_range && leds != 0) n_out_of_range++;
    for (int a = 0; a < 32; a++) if (dut.u_fft_ctrl.u_fft.u_mem.u_bank1.mem[a] != '0) clean = 0;
    check(clean, "FFT memory not cleared after the frame");
    if (clean) n_memclear++;
    check(done, "done not raised with a new result");
    n_frames++;
  end

  task automatic press(input int idx, input logic [4:0] exp_song, input string name);
    int waited = 0;
    pressed = 16'(1) << idx;
    while (song != exp_song && waited < 2000) begin @(negedge clk); waited++; end
    check(song == exp_song, $sformatf("key %s: song %b expected %b", name, song, exp_song));
    repeat (300) @(negedge clk);
    pressed = '0;
    repeat (300) @(negedge clk);
    check(song == exp_song, $sformatf("key %s: selection not held", name));
    if (song == exp_song && exp_song != 0) n_song++;
    if (song == exp_song && exp_song == 0) n_clear_song++;
  endtask

  task automatic play(input int unsigned f, input bit check_note, input bit inr);
    freq_hz = f;
    note_bin = -1.0;
    in_range = inr;
    @(posedge dut.u_fft_ctrl.frame_done);            // frame with the old note
    repeat (2) @(negedge clk);                       // ... has been checked
    note_bin = check_note ? real'(f) * 32.0 / 2441.40625 : -1.0;
    repeat (3) @(posedge dut.u_fft_ctrl.frame_done);
  endtask

  initial begin
    int unsigned scale [8] = '{262, 294, 330, 349, 392, 440, 494, 523};
    repeat (3) @(negedge clk);
    reset = 0;
    // keys 1..5 are at matrix positions 0, 1, 2, 4, 5; * is at 12
    press(0, 5'b00001, "1");
    press(1, 5'b00010, "2");
    press(2, 5'b00100, "3");
    press(4, 5'b01000, "4");
    press(12, 5'b00000, "*");
    press(5, 5'b10000, "5");
    // the test song: C-major scale
    foreach (scale[i]) play(scale[i], 1, 1);
    play(110, 1, 1);      // A2, low end of the LED range
    play(1047, 1, 1);     // C6, top bin
    play(1319, 0, 0);     // E6, above half the sample rate: alias lights an LED
    play(1760, 0, 0);     // A6
    play(30, 0, 0);       // below the range
    play(0, 0, 1);        // rest
    check(n_scan > 0, "no column scan");
    check(n_key > 0, "no key decoded");
    check(n_song >= 5, $sformatf("%0d song selections", n_song));
    check(n_clear_song > 0, "selection never cleared");
    check(n_samples > 0, "no samples");
    check(n_frames > 0, "no FFT frame");
    check(n_done > 0, "no done pulse");
    check(n_memclear > 0, "memory never cleared");
    check(n_out_of_range > 0, "no out-of-range note lit an LED");
    $display("scan steps %0d, keys %0d, songs %0d, clears %0d, samples %0d, frames %0d, done %0d, mem clears %0d, out of range %0d",
             n_scan, n_key, n_song, n_clear_song, n_samples, n_frames, n_done, n_memclear, n_out_of_range);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
