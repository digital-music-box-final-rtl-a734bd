// tb_fft_agu: runs the address generator through whole transforms and checks,
// level by level, that the 16 butterflies pair every address exactly once with
// a partner differing only in bit i (textbook radix-2 DIT stage i), that the
// twiddle index is (adr_a mod 2^i) * 16 / 2^i, that READ and WRITE alternate,
// the bank select equals the level parity, last_level marks level 4, and that
// done comes 162 cycles after the start cycle.
module tb_fft_agu;
  import music_box_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  fft_adr_t adr_a, adr_b;
  tw_adr_t tw_adr;
  logic write, bank_sel, clear, last_level, busy, done;
  always #5 clk = ~clk;

  fft_agu dut (.clk, .rst, .start, .adr_a, .adr_b, .tw_adr, .write, .bank_sel,
               .clear, .last_level, .busy, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int run = 0; run < 3; run++) begin
      int cyc, nwrites, nclear, prev_write;
      bit seen [5][32];
      foreach (seen[l, a]) seen[l][a] = 0;
      repeat (4 + run) @(negedge clk);
      check(!busy && !done, "idle before start");
      start = 1; @(negedge clk); start = 0;
      cyc = 1; nwrites = 0; nclear = 0; prev_write = 1;
      while (!done && cyc < 400) begin
        if (clear) nclear++;
        if (write) begin
          int lvl, low;
          lvl = nwrites / 16;
          low = int'(adr_a) % (1 << lvl);
          check(prev_write == 0, "WRITE not preceded by READ");
          check((adr_a ^ adr_b) == (1 << lvl),
                $sformatf("level %0d pair %0d/%0d", lvl, adr_a, adr_b));
          check(!seen[lvl][adr_a] && !seen[lvl][adr_b],
                $sformatf("level %0d address repeated %0d/%0d", lvl, adr_a, adr_b));
          seen[lvl][adr_a] = 1; seen[lvl][adr_b] = 1;
          check(int'(tw_adr) == low * (16 >> lvl),
                $sformatf("level %0d adr_a %0d twiddle %0d", lvl, adr_a, tw_adr));
          check(bank_sel == lvl[0], $sformatf("level %0d bank_sel %0d", lvl, bank_sel));
          check(last_level == (lvl == 4), "last_level");
          nwrites++;
        end else check(!last_level, "last_level outside WRITE");
        prev_write = write;
        @(negedge clk);
        cyc++;
      end
      check(done, "done reached");
      check(cyc == 162, $sformatf("start to done %0d cycles, expected 162", cyc));
      check(nwrites == 80, $sformatf("%0d butterflies, expected 80", nwrites));
      check(nclear == 1, "one clear cycle");
      foreach (seen[l, a]) if (!seen[l][a]) check(0, $sformatf("level %0d address %0d unused", l, a));
      @(negedge clk);
      check(!done && !busy, "back to WAIT after DONE");
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
