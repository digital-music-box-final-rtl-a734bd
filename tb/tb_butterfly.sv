// tb_butterfly: random and corner-case operands against an integer model of
// the butterfly (W*b truncated to bits [30:15], 16-bit wrapping sums).
module tb_butterfly;
  import music_box_pkg::*;
  int checks = 0, failures = 0;
  cplx_t a, b, w, oa, ob;

  butterfly dut (.a, .b, .w, .out_a(oa), .out_b(ob));

  function automatic int w16(input longint v); return int'(shortint'(v)); endfunction

  task automatic run(input int ar, ai, br, bi, wr, wi);
    longint pr, pi;
    int tr, ti;
    a.re = 16'(ar); a.im = 16'(ai); b.re = 16'(br); b.im = 16'(bi);
    w.re = 16'(wr); w.im = 16'(wi);
    #1;
    pr = longint'(w16(br)) * w16(wr) - longint'(w16(bi)) * w16(wi);
    pi = longint'(w16(bi)) * w16(wr) + longint'(w16(br)) * w16(wi);
    tr = w16(pr >>> 15);
    ti = w16(pi >>> 15);
    checks++;
    if (int'(oa.re) != w16(w16(ar) + tr) || int'(oa.im) != w16(w16(ai) + ti) ||
        int'(ob.re) != w16(w16(ar) - tr) || int'(ob.im) != w16(w16(ai) - ti)) begin
      failures++;
      $display("FAIL: a=(%0d,%0d) b=(%0d,%0d) w=(%0d,%0d) -> A=(%0d,%0d) B=(%0d,%0d)",
               w16(ar), w16(ai), w16(br), w16(bi), w16(wr), w16(wi), oa.re, oa.im, ob.re, ob.im);
    end
  endtask

  initial begin
    // W = 1: A = a + b (less one LSB from the 0x7fff scale), B = a - b
    run(100, -50, 1000, 2000, 32767, 0);
    checks++;
    if (oa.re != 16'sd1099 || ob.re != -16'sd899) begin
      failures++; $display("FAIL: W=1 case A.re=%0d B.re=%0d", oa.re, ob.re);
    end
    // W = i: W*b = (-b.im, b.re)
    run(0, 0, 1000, 2000, 0, 32767);
    checks++;
    if (oa.re != -16'sd2000 || oa.im != 16'sd999) begin
      failures++; $display("FAIL: W=i case A=(%0d,%0d)", oa.re, oa.im);
    end
    run(-32768, -32768, -32768, -32768, 32767, 32767);
    run(32767, 32767, 32767, -32768, -32768, 32767);
    for (int n = 0; n < 5000; n++)
      run($urandom, $urandom, $urandom, $urandom, $urandom, $urandom);
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
