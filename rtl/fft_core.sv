// fft_core: 32-point radix-2 decimation-in-time FFT engine.
//
// The address generating unit (fft_agu) sequences 5 levels of 16 butterflies;
// the two-bank data memory (fft_data_memory) feeds the butterfly unit
// (butterfly) and stores its results; the twiddle ROM (twiddle_rom) supplies
// the factor the AGU selects.  One butterfly is done every two cycles: in
// READ the memory reads the pair at adr_a/adr_b, in WRITE the butterfly
// result goes back to the same addresses of the other bank.
//
// In the WRITE cycles of the last level the results are final spectrum
// values: the peak finder examines out_a (bins 0..15) and, instead of the
// results, zeros are written, which clears bank 1 (the bank level 4 writes);
// bank 0 is refilled by the next load.  These results are also brought out as a stream (res_valid,
// one pair of bins per cycle) so that the spectrum can be observed.
//
// Interface: load 32 samples with load_we/load_adr/load_data (natural
// order) while idle, then pulse `start`.  `done` pulses 162 cycles after the
// start cycle; peak_bin is then valid and holds until the next start.
// Follows the original design's structure.
module fft_core
  import music_box_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  logic     load_we,
  input  fft_adr_t load_adr,
  input  cplx_t    load_data,
  output logic     busy,
  output logic     done,
  output fft_adr_t peak_bin,
  output logic     res_valid,
  output fft_adr_t res_adr_a,
  output fft_adr_t res_adr_b,
  output cplx_t    res_a,
  output cplx_t    res_b
);
  fft_adr_t adr_a, adr_b;
  tw_adr_t  tw_adr;
  logic     write, bank_sel, clear, last_level;
  cplx_t    g, h, w, out_a, out_b, wdata_a, wdata_b;

  fft_agu u_agu (
    .clk, .rst, .start,
    .adr_a, .adr_b, .tw_adr, .write, .bank_sel, .clear, .last_level, .busy, .done
  );

  fft_data_memory u_mem (
    .clk, .load_we, .load_adr, .load_data,
    .bank_sel, .wr_en(write), .adr_a, .adr_b, .wdata_a, .wdata_b,
    .rdata_a(g), .rdata_b(h)
  );

  twiddle_rom u_twiddle (.adr(tw_adr), .w);

  butterfly u_bfu (.a(g), .b(h), .w, .out_a, .out_b);

  // Clear the memory with the last level's writes.
  assign wdata_a = last_level ? '0 : out_a;
  assign wdata_b = last_level ? '0 : out_b;

  peak_finder u_peak (
    .clk, .rst, .clear, .en(last_level), .adr(adr_a), .value(out_a), .max_adr(peak_bin)
  );

  assign res_valid = last_level;
  assign res_adr_a = adr_a;
  assign res_adr_b = adr_b;
  assign res_a     = out_a;
  assign res_b     = out_b;

  assert property (@(posedge clk) disable iff (rst) !(load_we && busy))
    else $error("fft_core: sample loaded while the FFT runs");
endmodule
