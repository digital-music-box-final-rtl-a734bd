// butterfly: radix-2 decimation-in-time butterfly on 16-bit complex words.
//
//   out_a = a + W*b
//   out_b = a - W*b
//
// W is a Q1.15 twiddle factor.  Each 16x16 product is full precision; the
// complex product is cut back to 16 bits by keeping bits [30:15] of the
// 32-bit sum (truncation, no rounding), and the final sums wrap in 16 bits.
// There is no scaling between FFT levels.  This arithmetic follows the
// original design.  Purely combinational.
module butterfly
  import music_box_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,
  output cplx_t out_a,
  output cplx_t out_b
);
  localparam int unsigned PW = 2 * DATA_W + 1;  // sum of two 32-bit products

  logic signed [PW-1:0]     b_re, b_im, w_re, w_im;  // sign-extended operands
  logic signed [PW-1:0]     prod_re, prod_im;
  logic signed [DATA_W-1:0] wb_re, wb_im;

  always_comb begin
    b_re = PW'(b.re);
    b_im = PW'(b.im);
    w_re = PW'(w.re);
    w_im = PW'(w.im);
    prod_re = b_re * w_re - b_im * w_im;
    prod_im = b_im * w_re + b_re * w_im;
    wb_re   = prod_re[2*DATA_W-2 -: DATA_W];
    wb_im   = prod_im[2*DATA_W-2 -: DATA_W];
    out_a.re = a.re + wb_re;
    out_a.im = a.im + wb_im;
    out_b.re = a.re - wb_re;
    out_b.im = a.im - wb_im;
  end
endmodule
