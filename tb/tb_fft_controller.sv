// tb_fft_controller: feeds square waves of many periods on data_in, captures
// the 32 samples the controller writes into the FFT and checks each frame's
// peak bin and LEDs against the reference FFT of those samples (+-1023).
// Also checks that frame_done is seen 164 clock edges after the edge that
// writes the 32nd sample, that `done` rises with each frame and falls at the
// next sample tick, and, in a second phase with a sample period shorter than the FFT, that ticks during
// the FFT are dropped without disturbing the result.
module tb_fft_controller;
  import music_box_pkg::*;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sample_tick = 0, data_in = 0;
  logic done, frame_done;
  logic [15:0] leds;
  fft_adr_t peak_bin;
  always #5 clk = ~clk;

  fft_controller dut (.clk, .rst, .sample_tick, .data_in, .done, .leds, .peak_bin, .frame_done);

  int tick_period = 300;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sample_tick <= !rst && ((cyc % tick_period) == tick_period - 1);
  end

  // melody: square wave of period tone_period clock cycles
  int tone_period = 3000;
  always @(posedge clk) data_in <= ((cyc % tone_period) < tone_period / 2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // capture what is loaded
  vec32_t cap;
  int last_load_cyc = 0, frames = 0, dropped = 0, done_falls = 0;
  always @(posedge clk) begin
    if (dut.load_we) begin
      cap[dut.count] = dut.data_in ? 1023 : -1023;
      if (dut.count == 5'd31) last_load_cyc = cyc;
    end
    if (sample_tick && dut.state != dut.C_LOAD) dropped++;
  end

  always @(posedge clk) if (!rst && frame_done) begin
    vec32_t xi, yr, yi;
    logic [15:0] exp_leds;
    int exp_bin;
    foreach (xi[n]) xi[n] = 0;
    fft32_ref(cap, xi, yr, yi);
    exp_bin = peak_ref(yr, yi);
    exp_leds = 16'(1) << exp_bin;
    check(int'(peak_bin) == exp_bin && leds == exp_leds,
          $sformatf("frame %0d tone %0d: bin %0d leds %h expected %0d", frames, tone_period,
                    peak_bin, leds, exp_bin));
    check(cyc - last_load_cyc == 164,
          $sformatf("frame %0d: %0d cycles from last sample to result", frames, cyc - last_load_cyc));
    check(done, "done high with frame_done");
    frames++;
  end

  // done must fall at the next sample tick
  always @(posedge clk) if (!rst && done && sample_tick && !frame_done) done_falls++;
  always @(negedge clk) if (!rst && done && $past(sample_tick) && !$past(frame_done))
    check(0, "done still high after a sample tick");

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // tones from 1 to 15 bins at 300-cycle sampling: period = 300*32/k cycles
    for (int k = 1; k <= 15; k++) begin
      tone_period = 9600 / k + (k % 3) * 7;   // not an exact bin centre
      repeat (2) @(posedge frame_done);
    end
    // fast sampling: ticks arrive during the FFT and are dropped
    tick_period = 100;
    tone_period = 1000;
    repeat (3) @(posedge frame_done);
    check(dropped > 0, "no sample tick was dropped in the fast phase");
    check(done_falls >= 30, $sformatf("done fell at a tick only %0d times", done_falls));
    check(frames >= 32, $sformatf("%0d frames", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
