// pi_melody_model: behavioural model of the Raspberry Pi's melody output.
//
// Not synthesizable.  Drives `tone` as a square wave of freq_hz hertz
// (integer), low when freq_hz is 0 (a rest), the way the Pi plays the first
// part of the song on a GPIO pin.  Time unit 1 ns.
module pi_melody_model (
  input  int unsigned freq_hz,
  output logic        tone
);
  timeunit 1ns;
  timeprecision 1ps;

  initial tone = 1'b0;

  always begin
    if (freq_hz == 0) begin
      tone = 1'b0;
      #1000;
    end else begin
      tone = ~tone;
      #(500000000.0 / real'(freq_hz));
    end
  end
endmodule
