// fft_controller: turns the melody pin into a peak-frequency LED.
//
// At each sample tick (2.4 kHz in the music box) the synchronised melody bit
// becomes a real sample, +1023 for high and -1023 for low, with zero
// imaginary part, and is written into the FFT memory.  After 32 samples the
// controller pulses `start`, waits for the FFT's done, latches the bin of
// highest energy (0..15) and shows it one-hot on the 16 LEDs; then it starts
// collecting the next 32 samples.  Sampling pauses while the FFT runs (about
// 165 clock cycles, far shorter than a sample period); a tick during that
// time is dropped.
//
// Outputs: leds and peak_bin change the cycle after the FFT finishes;
// frame_done pulses in that cycle.  `done` (the pin to the Pi) rises with
// frame_done and falls at the next sample tick, so it lasts about one
// sample period.  The flow follows the original design; the -1023 low level
// follows the original design's waveform, the done width is this design's
// choice.
module fft_controller
  import music_box_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_tick,
  input  logic                data_in,
  output logic                done,
  output logic [NUM_LEDS-1:0] leds,
  output fft_adr_t            peak_bin,
  output logic                frame_done
);
  typedef enum logic [1:0] {C_LOAD, C_START, C_RUN} cstate_t;

  cstate_t  state;
  fft_adr_t count;
  logic     load_we, start, fft_busy, fft_done;
  cplx_t    sample;
  fft_adr_t fft_peak;

  assign load_we   = (state == C_LOAD) && sample_tick;
  assign start     = (state == C_START);
  assign sample.re = data_in ? SAMPLE_HIGH : SAMPLE_LOW;
  assign sample.im = '0;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      state      <= C_LOAD;
      count      <= '0;
      peak_bin   <= '0;
      done       <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (sample_tick) done <= 1'b0;
      case (state)
        C_LOAD:
          if (sample_tick) begin
            count <= count + 1'b1;
            if (count == fft_adr_t'(FFT_N - 1)) state <= C_START;
          end
        C_START: state <= C_RUN;
        C_RUN:
          if (fft_done) begin
            peak_bin   <= fft_peak;
            frame_done <= 1'b1;
            done       <= 1'b1;
            count      <= '0;
            state      <= C_LOAD;
          end
        default: state <= C_LOAD;
      endcase
    end

  fft_core u_fft (
    .clk, .rst, .start, .load_we, .load_adr(count), .load_data(sample),
    .busy(fft_busy), .done(fft_done), .peak_bin(fft_peak),
    .res_valid(), .res_adr_a(), .res_adr_b(), .res_a(), .res_b()
  );

  led_decoder u_dec (.bin(peak_bin), .leds);

  assert property (@(posedge clk) disable iff (rst) start |-> !fft_busy);
endmodule
