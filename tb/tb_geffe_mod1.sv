// tb_geffe_mod1: checks G1(3,4) (LFSR1 = x^3+x^2+1, LFSR2 = x^4+x+1, i = 0).
//  - the six printed patterns 001 101 011 001 110 100 and select bits
//    0 0 1 1 1 0;
//  - 2000 cycles with enable gaps against the reference model;
//  - pattern sequence period LCM(7, 15) = 105;
//  - both multiplexer inputs are used.
module tb_geffe_mod1;
  import geffe_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [2:0] pat;
  logic       sel;
  geffe_mod1 dut (.clk, .rst_n, .en, .pattern(pat), .sel);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string tab_pat[6] = '{"001", "101", "011", "001", "110", "100"};
  bit    tab_sel[6] = '{0, 0, 1, 1, 1, 0};
  exps_t p1 = '{3, 2, 0};
  exps_t p2 = '{4, 1, 0};
  st_t   r1, r2;
  logic [2:0] hist[$];
  int n_sel0 = 0, n_sel1 = 0;
  bit ok;

  function automatic logic [2:0] ref_pat(st_t a, st_t b);
    return (a[0] ^ b[0]) ? b[2:0] : a[2:0];
  endfunction

  initial begin
    tick(); rst_n = 1; en = 1;
    r1 = seed(3); r2 = seed(4);
    for (int t = 0; t < 6; t++) begin
      check(pat == 3'(from_str(tab_pat[t])), $sformatf("table t%0d got %s", t + 1, to_str(st_t'(pat), 3)));
      check(sel == tab_sel[t], $sformatf("table t%0d select", t + 1));
      tick();
      r1 = step(r1, p1, 0, 0); r2 = step(r2, p2, 0, 0);
    end
    for (int i = 0; i < 2000; i++) begin
      automatic bit e = ($urandom_range(0, 5) != 0);
      check(pat == ref_pat(r1, r2), $sformatf("model step %0d", i));
      if (sel) n_sel1++; else n_sel0++;
      en = e; tick();
      if (e) begin r1 = step(r1, p1, 0, 0); r2 = step(r2, p2, 0, 0); end
    end
    // period of the pattern stream
    en = 1;
    for (int i = 0; i < 400; i++) begin hist.push_back(pat); tick(); end
    ok = 1;
    for (int i = 0; i + 105 < 400; i++) if (hist[i] != hist[i + 105]) ok = 0;
    check(ok, "pattern stream repeats after 105");
    ok = 0;
    for (int i = 0; i + 35 < 400; i++) if (hist[i] != hist[i + 35]) ok = 1;
    check(ok, "pattern stream does not repeat after 35");
    ok = 0;
    for (int i = 0; i + 21 < 400; i++) if (hist[i] != hist[i + 21]) ok = 1;
    check(ok, "pattern stream does not repeat after 21");
    check(n_sel0 > 0 && n_sel1 > 0, "both LFSRs selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
