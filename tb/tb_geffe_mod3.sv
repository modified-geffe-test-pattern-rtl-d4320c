// tb_geffe_mod3: checks G3(9[4]) (LFSR4+ = x^9+x^5+x^4+x+1 embedding x^4+x+1,
// selected by its own cell S_4).
//  - the printed states 000000001 110011000 011001100 001100110 000110011
//    and patterns 0000 1100 0110 0011 0001;
//  - 3000 cycles with enable gaps against the reference model;
//  - both multiplexer inputs are used.
module tb_geffe_mod3;
  import geffe_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [3:0] pat;
  logic       sel;
  geffe_mod3 dut (.clk, .rst_n, .en, .pattern(pat), .sel);

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

  string tab_st[5]  = '{"000000001", "110011000", "011001100", "001100110", "000110011"};
  string tab_pat[5] = '{"0000", "1100", "0110", "0011", "0001"};
  exps_t p4 = '{9, 5, 4, 1, 0};
  st_t   r;
  int n_sel0 = 0, n_sel1 = 0;

  initial begin
    tick(); rst_n = 1; en = 1;
    r = seed(9);
    for (int t = 0; t < 5; t++) begin
      check(pat == 4'(from_str(tab_pat[t])), $sformatf("table t%0d got %s", t + 1, to_str(st_t'(pat), 4)));
      check(sel == from_str(tab_st[t])[4], $sformatf("table t%0d select", t + 1));
      check(r == from_str(tab_st[t]), $sformatf("model agrees with table t%0d", t + 1));
      tick();
      r = step(r, p4, 4, r[4]);
    end
    for (int i = 0; i < 3000; i++) begin
      automatic bit e = ($urandom_range(0, 5) != 0);
      check(pat == r[3:0] && sel == r[4], $sformatf("model step %0d", i));
      if (sel) n_sel1++; else n_sel0++;
      en = e; tick();
      if (e) r = step(r, p4, 4, r[4]);
    end
    check(n_sel0 > 0 && n_sel1 > 0, "both MUX inputs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
