// twiddle_rom: the 16 twiddle factors of a 32-point FFT.
//
// Entry k holds round(32767*cos(2*pi*k/32)) + i*round(32767*sin(2*pi*k/32)),
// that is exp(+2*pi*i*k/32) in Q1.15, k = 0..15.  The positive sign of the
// exponent follows the reference waveform of the original design, which shows
// 0x0000 + i*0x7fff at k = 8; for a real input it only mirrors the spectrum
// (bins k and 32-k swap), so energies per bin are unchanged.
// The table is symmetric: sin(2*pi*k/32) = cos(2*pi*(8-k)/32), so only the
// nine cosine values of k = 0..8 are stored.  Combinational read.
module twiddle_rom
  import music_box_pkg::*;
(
  input  tw_adr_t adr,
  output cplx_t   w
);
  // round(32767*cos(2*pi*k/32)) for k = 0..8
  function automatic logic signed [DATA_W-1:0] cos_q15(input logic [3:0] k);
    case (k)
      4'd0:    return 16'sh7fff;
      4'd1:    return 16'sh7d89;
      4'd2:    return 16'sh7641;
      4'd3:    return 16'sh6a6d;
      4'd4:    return 16'sh5a82;
      4'd5:    return 16'sh471c;
      4'd6:    return 16'sh30fb;
      4'd7:    return 16'sh18f9;
      default: return 16'sh0000;
    endcase
  endfunction

  always_comb begin
    if (adr <= 4'd8) begin
      // first quadrant: cos(k) , sin(k) = cos(8-k)
      w.re = cos_q15(adr);
      w.im = cos_q15(4'd8 - adr);
    end else begin
      // second quadrant: cos(k) = -cos(16-k), sin(k) = cos(k-8)
      w.re = -cos_q15(4'(5'd16 - 5'(adr)));
      w.im = cos_q15(adr - 4'd8);
    end
  end
endmodule
