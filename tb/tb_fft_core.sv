// tb_fft_core: loads 32 samples, runs the FFT and compares every bin of the
// last-level result stream bit for bit with the fixed-point reference model;
// checks the peak bin, the 162-cycle start-to-done latency, that the memory
// bank written by the last level is cleared to zero, and, for square waves,
// that the peak is the floating-point DFT's peak.  Inputs: square waves of
// several periods (the music box's +-1023 samples), random values, impulses.
module tb_fft_core;
  import music_box_pkg::*;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, load_we = 0;
  fft_adr_t load_adr = '0, peak_bin, res_adr_a, res_adr_b;
  cplx_t load_data = '0, res_a, res_b;
  logic busy, done, res_valid;
  always #5 clk = ~clk;

  fft_core dut (.clk, .rst, .start, .load_we, .load_adr, .load_data, .busy, .done,
                .peak_bin, .res_valid, .res_adr_a, .res_adr_b, .res_a, .res_b);

  vec32_t got_r, got_i;
  bit     got [32];

  always @(posedge clk)
    if (res_valid) begin
      got_r[res_adr_a] = res_a.re; got_i[res_adr_a] = res_a.im; got[res_adr_a] = 1;
      got_r[res_adr_b] = res_b.re; got_i[res_adr_b] = res_b.im; got[res_adr_b] = 1;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_fft(input vec32_t xr, input vec32_t xi, input string name,
                         input int float_peak);
    vec32_t yr, yi;
    int cyc;
    fft32_ref(xr, xi, yr, yi);
    foreach (got[k]) got[k] = 0;
    for (int n = 0; n < 32; n++) begin
      load_we = 1; load_adr = fft_adr_t'(n);
      load_data.re = 16'(xr[n]); load_data.im = 16'(xi[n]);
      @(negedge clk);
    end
    load_we = 0;
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(cyc == 162, $sformatf("%s: start to done %0d cycles, expected 162", name, cyc));
    for (int k = 0; k < 32; k++)
      check(got[k] && got_r[k] == yr[k] && got_i[k] == yi[k],
            $sformatf("%s: bin %0d got (%0d,%0d) expected (%0d,%0d)", name, k,
                      got_r[k], got_i[k], yr[k], yi[k]));
    check(int'(peak_bin) == peak_ref(yr, yi),
          $sformatf("%s: peak %0d expected %0d", name, peak_bin, peak_ref(yr, yi)));
    if (float_peak >= 0)
      check(int'(peak_bin) == float_peak,
            $sformatf("%s: peak %0d, floating-point DFT peak %0d", name, peak_bin, float_peak));
    for (int a = 0; a < 32; a++)
      check(dut.u_mem.u_bank1.mem[a] == '0, $sformatf("%s: bank 1 word %0d not cleared", name, a));
    @(negedge clk);
  endtask

  // Peak bin 0..15 of the floating-point DFT magnitude.
  function automatic int dft_peak(input vec32_t xr);
    real best = -1.0;
    int bin = 0;
    for (int k = 0; k < 16; k++) begin
      real sr = 0.0, si = 0.0, m;
      for (int n = 0; n < 32; n++) begin
        sr += xr[n] * $cos(2.0 * 3.14159265358979 * k * n / 32.0);
        si += xr[n] * $sin(2.0 * 3.14159265358979 * k * n / 32.0);
      end
      m = sr * sr + si * si;
      if (m > best * 1.000001) begin best = m; bin = k; end
    end
    return bin;
  endfunction

  initial begin
    vec32_t xr, xi;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // square waves of period p samples (period 32/k gives bin k)
    for (int p = 2; p <= 32; p++) begin
      for (int n = 0; n < 32; n++) begin
        xr[n] = ((2 * n) % (2 * p) < p) ? 1023 : -1023;
        xi[n] = 0;
      end
      run_fft(xr, xi, $sformatf("square period %0d", p), (p > 2) ? dft_peak(xr) : -1);
    end
    // impulse, constant
    foreach (xr[n]) begin xr[n] = (n == 0) ? 1000 : 0; xi[n] = 0; end
    run_fft(xr, xi, "impulse", -1);
    foreach (xr[n]) begin xr[n] = -1023; xi[n] = 0; end
    run_fft(xr, xi, "constant", 0);
    // random complex data, small enough not to wrap
    for (int t = 0; t < 20; t++) begin
      foreach (xr[n]) begin
        xr[n] = int'(shortint'($urandom)) >>> 5;
        xi[n] = int'(shortint'($urandom)) >>> 5;
      end
      run_fft(xr, xi, $sformatf("random %0d", t), -1);
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
