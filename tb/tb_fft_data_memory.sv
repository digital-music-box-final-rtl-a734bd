// tb_fft_data_memory: loads 32 words and reads them back from bank 0 at the
// bit-reversed addresses, then writes pairs into bank 1 (bank_sel = 0) and
// checks that bank 0 is untouched and bank 1 holds them (bank_sel = 1), and
// finally writes bank 0 with bank_sel = 1.  Reads are checked one cycle after
// the address.
module tb_fft_data_memory;
  import music_box_pkg::*;
  import fft_ref_pkg::bitrev5;
  int checks = 0, failures = 0;
  logic clk = 0, load_we = 0, bank_sel = 0, wr_en = 0;
  fft_adr_t load_adr = '0, adr_a = '0, adr_b = '0;
  cplx_t load_data = '0, wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;
  always #5 clk = ~clk;

  fft_data_memory dut (.clk, .load_we, .load_adr, .load_data, .bank_sel, .wr_en,
                       .adr_a, .adr_b, .wdata_a, .wdata_b, .rdata_a, .rdata_b);

  cplx_t ref0 [32], ref1 [32];

  task automatic read_check(input int sel, input int a, input int b);
    bank_sel = sel[0]; adr_a = fft_adr_t'(a); adr_b = fft_adr_t'(b); wr_en = 0;
    @(negedge clk);
    checks++;
    if (rdata_a !== (sel ? ref1[a] : ref0[a]) || rdata_b !== (sel ? ref1[b] : ref0[b])) begin
      failures++;
      $display("FAIL: bank %0d read %0d/%0d got %h/%h expected %h/%h", sel, a, b, rdata_a, rdata_b,
               sel ? ref1[a] : ref0[a], sel ? ref1[b] : ref0[b]);
    end
  endtask

  initial begin
    @(negedge clk);
    // load natural-order samples n -> bank 0 address bitrev(n)
    for (int n = 0; n < 32; n++) begin
      load_we = 1; load_adr = fft_adr_t'(n); load_data = cplx_t'($urandom);
      ref0[bitrev5(n)] = load_data;
      @(negedge clk);
    end
    load_we = 0;
    for (int a = 0; a < 32; a += 2) read_check(0, a, a + 1);
    // level with bank_sel = 0: write to bank 1
    for (int a = 0; a < 16; a++) begin
      bank_sel = 0; wr_en = 1; adr_a = fft_adr_t'(a); adr_b = fft_adr_t'(a + 16);
      wdata_a = cplx_t'($urandom); wdata_b = cplx_t'($urandom);
      ref1[a] = wdata_a; ref1[a + 16] = wdata_b;
      @(negedge clk);
    end
    for (int a = 0; a < 32; a += 2) read_check(0, a, a + 1);   // bank 0 unchanged
    for (int a = 0; a < 16; a++) read_check(1, a, 31 - a);
    // level with bank_sel = 1: write to bank 0
    for (int a = 0; a < 16; a++) begin
      bank_sel = 1; wr_en = 1; adr_a = fft_adr_t'(2 * a); adr_b = fft_adr_t'(2 * a + 1);
      wdata_a = cplx_t'($urandom); wdata_b = cplx_t'($urandom);
      ref0[2 * a] = wdata_a; ref0[2 * a + 1] = wdata_b;
      @(negedge clk);
    end
    for (int a = 0; a < 32; a += 2) read_check(0, a, a + 1);
    for (int a = 0; a < 16; a++) read_check(1, a, a + 16);     // bank 1 unchanged
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
