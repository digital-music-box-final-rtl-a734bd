// tb_tick_gen: checks that tick_gen pulses for one cycle every DIV cycles,
// the first DIV-1 cycles after the first clock edge with reset released,
// for two dividers.
module tb_tick_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic tick5, tick16384;
  always #5 clk = ~clk;

  tick_gen #(.DIV(5))     dut5 (.clk, .rst, .tick(tick5));
  tick_gen                dutd (.clk, .rst, .tick(tick16384));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int last5 = -1, lastd = -1, n5 = 0, nd = 0;   // first tick DIV-1 cycles after release
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int cyc = 1; cyc <= 70000; cyc++) begin
      @(posedge clk);
      #1;
      if (tick5) begin
        check(cyc - last5 == 5, $sformatf("DIV=5 tick at cycle %0d, previous %0d", cyc, last5));
        last5 = cyc; n5++;
      end
      if (tick16384) begin
        check(cyc - lastd == 16384, $sformatf("DIV=16384 tick at cycle %0d, previous %0d", cyc, lastd));
        lastd = cyc; nd++;
      end
    end
    check(n5 == 14000, $sformatf("DIV=5 tick count %0d", n5));
    check(nd == 4, $sformatf("DIV=16384 tick count %0d", nd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
