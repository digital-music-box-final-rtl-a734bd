// tb_peak_finder: random result streams against a running maximum of
// re^2 + im^2 (first bin wins ties), including clear, enable gaps and
// full-scale values.
module tb_peak_finder;
  import music_box_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  fft_adr_t adr, max_adr;
  cplx_t value;
  always #5 clk = ~clk;

  peak_finder dut (.clk, .rst, .clear, .en, .adr, .value, .max_adr);

  initial begin
    longint best;
    int best_adr;
    adr = '0; value = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int frame = 0; frame < 200; frame++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (max_adr != 0) begin failures++; $display("FAIL: clear did not reset bin"); end
      best = 0; best_adr = 0;
      for (int n = 0; n < 16; n++) begin
        int re, im;
        longint e;
        case (frame % 4)
          0: begin re = int'(shortint'($urandom)); im = int'(shortint'($urandom)); end
          1: begin re = int'(shortint'($urandom)) >>> 8; im = 0; end
          2: begin re = -32768; im = (n == 7) ? -32768 : 0; end   // full scale
          default: begin re = ($urandom % 3) * 100; im = 0; end   // many ties
        endcase
        en = ($urandom % 4 != 0);
        adr = fft_adr_t'(n);
        value.re = 16'(re); value.im = 16'(im);
        e = longint'(re) * re + longint'(im) * im;
        if (en && e > best) begin best = e; best_adr = n; end
        @(negedge clk);
        checks++;
        if (int'(max_adr) != best_adr) begin
          failures++;
          $display("FAIL: frame %0d step %0d max_adr %0d expected %0d", frame, n, max_adr, best_adr);
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
