// tb_led_decoder: all 32 bins; bins 0..15 light exactly LED k, others none.
module tb_led_decoder;
  import music_box_pkg::*;
  int checks = 0, failures = 0;
  fft_adr_t bin;
  logic [15:0] leds;

  led_decoder dut (.bin, .leds);

  initial begin
    for (int k = 0; k < 32; k++) begin
      logic [15:0] exp_leds;
      bin = fft_adr_t'(k);
      #1;
      exp_leds = '0;
      for (int l = 0; l < 16; l++) if (l == k) exp_leds[l] = 1'b1;
      checks++;
      if (leds !== exp_leds) begin
        failures++;
        $display("FAIL: bin %0d leds %b expected %b", k, leds, exp_leds);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
