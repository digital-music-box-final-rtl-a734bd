// tb_twiddle_rom: every entry against round(32767*cos), round(32767*sin)
// of 2*pi*k/32 computed in floating point.
module tb_twiddle_rom;
  import music_box_pkg::*;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  tw_adr_t adr;
  cplx_t w;

  twiddle_rom dut (.adr, .w);

  initial begin
    for (int k = 0; k < 16; k++) begin
      adr = tw_adr_t'(k);
      #1;
      checks++;
      if (int'(w.re) != tw_re(k) || int'(w.im) != tw_im(k)) begin
        failures++;
        $display("FAIL: k=%0d got (%0d,%0d) expected (%0d,%0d)", k, w.re, w.im, tw_re(k), tw_im(k));
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
