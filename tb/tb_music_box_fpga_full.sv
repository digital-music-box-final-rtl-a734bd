// tb_music_box_fpga_full: the music-box FPGA at its default parameters
// (40 MHz clock, 16384-cycle sample period, 262144-cycle scan step).
// Presses key 1 on a modelled keypad and checks that song line 0 rises within
// four scan steps, then plays A4 (440 Hz) from a model of the Pi and checks
// three FFT frames: LEDs against the reference FFT of the samples taken, the
// lit bin against 440*32/2441.4 = 5.8 (bin 5 or 6), the 32-sample frame
// period (32 * 16384 cycles plus the FFT) and the done pin.
module tb_music_box_fpga_full;
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
  always #12.5 clk = ~clk;   // 40 MHz

  music_box_fpga dut (.clk, .reset, .data, .rows, .done, .leds, .cols, .song);
  keypad_matrix_model kp (.pressed, .cols, .rows);
  pi_melody_model pi (.freq_hz, .tone(data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  vec32_t cap;
  always @(posedge clk)
    if (dut.u_fft_ctrl.load_we) cap[dut.u_fft_ctrl.count] = dut.data_sync ? 1023 : -1023;

  initial begin
    longint t0, t_prev;
    repeat (3) @(negedge clk);
    reset = 0;
    pressed[0] = 1;   // key 1
    t0 = cyc;
    while (song != 5'b00001 && cyc - t0 < 5 * 262144) @(negedge clk);
    check(song == 5'b00001, $sformatf("song %b after key 1", song));
    check(cyc - t0 <= 4 * 262144 + 4, $sformatf("key 1 took %0d cycles", cyc - t0));
    pressed = '0;
    freq_hz = 440;
    @(posedge dut.u_fft_ctrl.frame_done);
    t_prev = cyc;
    for (int f = 0; f < 3; f++) begin
      vec32_t xi, yr, yi;
      int exp_bin;
      @(posedge dut.u_fft_ctrl.frame_done);
      @(negedge clk);
      foreach (xi[n]) xi[n] = 0;
      fft32_ref(cap, xi, yr, yi);
      exp_bin = peak_ref(yr, yi);
      check(leds == 16'(1) << exp_bin, $sformatf("frame %0d leds %h, reference bin %0d", f, leds, exp_bin));
      check(leds == 16'h0020 || leds == 16'h0040, $sformatf("440 Hz lit leds %h", leds));
      check(done, "done not high after the frame");
      check(cyc - t_prev >= 32 * 16384 && cyc - t_prev <= 33 * 16384 + 200,
            $sformatf("frame period %0d cycles", cyc - t_prev));
      t_prev = cyc;
    end
    check(song == 5'b00001, "song selection held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
