// fft_data_memory: two-bank ("ping-pong") data memory of the FFT.
//
// Bank 0 and bank 1 each hold 32 complex words.  In a level with
// bank_sel = 0 the butterfly inputs are read from bank 0 and the results are
// written to the same addresses of bank 1; with bank_sel = 1 the roles swap.
// Reading one bank while writing the other lets every level read all of the
// previous level's results undisturbed.  rdata_a/rdata_b are the registered
// reads of the read bank at adr_a/adr_b (valid the cycle after the address).
//
// Loading: while load_we is high, load_data is written into bank 0 at the
// bit-reversed load_adr, so the FFT input is in decimation-in-time order.
// Loading and butterfly writes to bank 0 are never at the same time.
// Follows the original design's memory organisation; keeping {re, im} in one word
// per address instead of separate real and imaginary RAMs is this design's
// choice.
module fft_data_memory
  import music_box_pkg::*;
(
  input  logic     clk,
  input  logic     load_we,
  input  fft_adr_t load_adr,
  input  cplx_t    load_data,
  input  logic     bank_sel,
  input  logic     wr_en,
  input  fft_adr_t adr_a,
  input  fft_adr_t adr_b,
  input  cplx_t    wdata_a,
  input  cplx_t    wdata_b,
  output cplx_t    rdata_a,
  output cplx_t    rdata_b
);
  logic     we0, we1;
  fft_adr_t adr0_a;
  cplx_t    wdata0_a;
  cplx_t    q0_a, q0_b, q1_a, q1_b;

  assign we0      = wr_en &  bank_sel;
  assign we1      = wr_en & ~bank_sel;
  assign adr0_a   = load_we ? bit_reverse(load_adr) : adr_a;
  assign wdata0_a = load_we ? load_data : wdata_a;

  fft_bank_ram u_bank0 (
    .clk, .we_a(load_we | we0), .adr_a(adr0_a), .wdata_a(wdata0_a), .rdata_a(q0_a),
          .we_b(we0),           .adr_b(adr_b),  .wdata_b(wdata_b),  .rdata_b(q0_b)
  );

  fft_bank_ram u_bank1 (
    .clk, .we_a(we1), .adr_a(adr_a), .wdata_a(wdata_a), .rdata_a(q1_a),
          .we_b(we1), .adr_b(adr_b), .wdata_b(wdata_b), .rdata_b(q1_b)
  );

  assign rdata_a = bank_sel ? q1_a : q0_a;
  assign rdata_b = bank_sel ? q1_b : q0_b;

  assert property (@(posedge clk) !(load_we && we0))
    else $error("fft_data_memory: load during a bank-0 write");
endmodule
