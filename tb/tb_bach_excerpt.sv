// tb_bach_excerpt: the opening melody of the music box's first song (Bach,
// Concerto for Two Violins, first part) played through the FPGA.
//
// Key 1 selects the song; the melody pin then carries the notes
// A4 B4 C4 D4 E4 - A5 - G#4 - E4 - B4 - D4 - C#4 - A4 - G4 (- = rest), 200 ms
// per eighth note and 800 ms for the final half note (the tempo is this
// test's choice), at standard-tuning frequencies.  The clock is slowed to
// 625 kHz with SAMPLE_DIV = 256 so that the sample rate is the real 2441.4 Hz.
// Every FFT frame's LEDs are checked against the reference FFT of the samples
// taken; frames lying entirely inside a note must light the note's bin
// (f*32/2441.4, within one bin) and frames inside a rest must light bin 0.
module tb_bach_excerpt;
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
  always #800 clk = ~clk;

  music_box_fpga #(.SAMPLE_DIV(256), .SCAN_DIV(64)) dut (
    .clk, .reset, .data, .rows, .done, .leds, .cols, .song);
  keypad_matrix_model kp (.pressed, .cols, .rows);
  pi_melody_model pi (.freq_hz, .tone(data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // note of every sample of the current frame; 0 = rest
  vec32_t cap;
  int unsigned frame_note [32];
  always @(posedge clk)
    if (dut.u_fft_ctrl.load_we) begin
      cap[dut.u_fft_ctrl.count] = dut.data_sync ? 1023 : -1023;
      frame_note[dut.u_fft_ctrl.count] = freq_hz;
    end

  int n_frames = 0, n_note_frames = 0, n_rest_frames = 0;
  always @(posedge clk) if (!reset && dut.u_fft_ctrl.frame_done) begin
    vec32_t xi, yr, yi;
    int exp_bin, got_bin;
    bit same;
    real nb;
    same = 1;
    foreach (xi[n]) xi[n] = 0;
    fft32_ref(cap, xi, yr, yi);
    exp_bin = peak_ref(yr, yi);
    got_bin = -1;
    for (int k = 0; k < 16; k++) if (leds[k]) got_bin = k;
    check(leds == 16'(1) << exp_bin, $sformatf("frame %0d: leds %h, reference bin %0d", n_frames, leds, exp_bin));
    for (int n = 1; n < 32; n++) if (frame_note[n] != frame_note[0]) same = 0;
    if (same && frame_note[0] != 0) begin
      nb = real'(frame_note[0]) * 32.0 / 2441.40625;
      check(got_bin >= 0 && real'(got_bin) - nb <= 1.0 && nb - real'(got_bin) <= 1.0,
            $sformatf("%0d Hz lit bin %0d, expected about %0.2f", frame_note[0], got_bin, nb));
      n_note_frames++;
    end else if (same) begin
      check(got_bin == 0, $sformatf("rest lit bin %0d", got_bin));
      n_rest_frames++;
    end
    n_frames++;
  end

  initial begin
    // frequency (Hz) and length in eighth notes
    int unsigned melody [21] = '{440, 494, 262, 294, 330, 0, 880, 0, 415, 0, 330, 0,
                                  494, 0, 294, 0, 277, 0, 440, 0, 392};
    int unsigned eighths [21] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 4};
    repeat (3) @(negedge clk);
    reset = 0;
    pressed[0] = 1;                        // key 1
    wait (song == 5'b00001);
    repeat (300) @(negedge clk);
    pressed = '0;
    check(song == 5'b00001, "song 1 selected");
    foreach (melody[i]) begin
      freq_hz = melody[i];
      #(200ms * eighths[i]);
    end
    freq_hz = 0;
    check(n_note_frames >= 40, $sformatf("only %0d frames inside notes", n_note_frames));
    check(n_rest_frames >= 10, $sformatf("only %0d frames inside rests", n_rest_frames));
    $display("frames %0d, inside notes %0d, inside rests %0d", n_frames, n_note_frames, n_rest_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #8s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
