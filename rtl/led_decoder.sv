// led_decoder: one-hot LED pattern for the peak frequency bin.
//
// Bin k (0..15) lights LED k; bins 16..31, which the peak finder never
// reports for the 16 bins it searches, light nothing.  With the 2.4 kHz
// sample rate a bin is about 76 Hz wide.  Follows the original design.
// Combinational.
module led_decoder
  import music_box_pkg::*;
(
  input  fft_adr_t              bin,
  output logic [NUM_LEDS-1:0]   leds
);
  always_comb begin
    leds = '0;
    if (bin < fft_adr_t'(NUM_LEDS)) leds[bin[3:0]] = 1'b1;
  end
endmodule
