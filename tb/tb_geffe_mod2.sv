// tb_geffe_mod2: checks G2(3,7[4]) (LFSR0 = x^3+x+1, LFSR3+ = x^7+x^6+x^4+x+1
// embedding x^4+x+1).
//  - the five printed patterns 0000 0000 1100 0110 0011 and the selector
//    (last cell of LFSR0 = 1 0 1 1 1);
//  - 3000 cycles with enable gaps against the reference model of both
//    registers;
//  - the pattern period of this configuration, 63 (from an independent model).
module tb_geffe_mod2;
  import geffe_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [3:0] pat;
  logic       sel;
  geffe_mod2 dut (.clk, .rst_n, .en, .pattern(pat), .sel);

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

  string tab_pat[5] = '{"0000", "0000", "1100", "0110", "0011"};
  bit    tab_sel[5] = '{1, 0, 1, 1, 1};
  exps_t p0 = '{3, 1, 0};
  exps_t p3 = '{7, 6, 4, 1, 0};
  st_t   r0, r3;
  logic [3:0] hist[$];
  int n_sel0 = 0, n_sel1 = 0, per;
  bit ok;

  task automatic ref_step();
    bit s = r0[2];
    r3 = step(r3, p3, 4, s);
    r0 = step(r0, p0, 0, 0);
  endtask

  initial begin
    tick(); rst_n = 1; en = 1;
    r0 = seed(3); r3 = seed(7);
    for (int t = 0; t < 5; t++) begin
      check(pat == 4'(from_str(tab_pat[t])), $sformatf("table t%0d got %s", t + 1, to_str(st_t'(pat), 4)));
      check(sel == tab_sel[t], $sformatf("table t%0d select", t + 1));
      tick(); ref_step();
    end
    for (int i = 0; i < 3000; i++) begin
      automatic bit e = ($urandom_range(0, 5) != 0);
      check(pat == r3[3:0] && sel == r0[2], $sformatf("model step %0d", i));
      if (sel) n_sel1++; else n_sel0++;
      en = e; tick();
      if (e) ref_step();
    end
    check(n_sel0 > 0 && n_sel1 > 0, "both MUX inputs used");
    // smallest period of a 600-pattern window
    en = 1;
    for (int i = 0; i < 600; i++) begin hist.push_back(pat); tick(); end
    per = 0;
    for (int p = 1; p < 300 && per == 0; p++) begin
      ok = 1;
      for (int i = 0; i + p < 600; i++) if (hist[i] != hist[i + p]) begin ok = 0; break; end
      if (ok) per = p;
    end
    check(per == 63, $sformatf("pattern period %0d, expected 63", per));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
