// peak_finder: index of the largest-energy FFT bin.
//
// While `en` is high, each cycle presents one result `value` with its bin
// `adr`; the energy re^2 + im^2 (32-bit unsigned, cannot overflow) is
// compared with the largest seen so far and, if strictly larger, replaces it
// and max_adr takes `adr`.  `clear` restarts the search (maximum 0, bin 0).
// Ties keep the earlier bin.  Registered: max_adr is updated on the clock
// edge that ends the cycle in which the result is presented.  The search
// follows the original design; the unsigned energy is this design's choice.
module peak_finder
  import music_box_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     clear,
  input  logic     en,
  input  fft_adr_t adr,
  input  cplx_t    value,
  output fft_adr_t max_adr
);
  localparam int unsigned EW = 2 * DATA_W;

  logic signed [EW-1:0] re_x, im_x;          // sign-extended parts
  logic        [EW-1:0] energy, max_energy;

  always_comb begin
    re_x   = EW'(value.re);
    im_x   = EW'(value.im);
    // each square is at most 2^30, so the unsigned sum fits in EW bits
    energy = unsigned'(re_x * re_x) + unsigned'(im_x * im_x);
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      max_adr    <= '0;
      max_energy <= '0;
    end else if (clear) begin
      max_adr    <= '0;
      max_energy <= '0;
    end else if (en && energy > max_energy) begin
      max_adr    <= adr;
      max_energy <= energy;
    end
endmodule
