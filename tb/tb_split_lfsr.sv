// tb_split_lfsr: checks the split synthesis register LFSR3+ of G2(3,7[4])
// (x^7+x^6+x^4+x+1 with x^4+x+1 embedded in cells S_0..S_3).
//  - printed start: 0000001 -> 0000101 with sel=1, then -> 1100111 with sel=0;
//  - with sel held at 0 the register is the full LFSR: period 2^7-1 = 127;
//  - with sel held at 1 the first four cells run as x^4+x+1: period 15;
//  - after a second reset, a random select sequence with enable gaps against
//    the reference model (the register must never reach all zeros).
module tb_split_lfsr;
  import geffe_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, sel = 0;
  always #5 clk = ~clk;

  logic [6:0] s;
  split_lfsr #(.D(7), .TAPS(7'b101_0010), .EMB(4)) dut (.clk, .rst_n, .en, .sel, .state(s));

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

  exps_t p3 = '{7, 6, 4, 1, 0};
  exps_t p1 = '{4, 1, 0};
  st_t   r;
  logic [6:0] start;
  logic [3:0] left0;
  int per;
  bit ok;

  initial begin
    tick(); rst_n = 1;
    check(s == 7'(from_str("0000001")), "seed 0000001");
    en = 1; sel = 1; tick();
    check(s == 7'(from_str("0000101")), $sformatf("t2 got %s", to_str(st_t'(s), 7)));
    sel = 0; tick();
    check(s == 7'(from_str("1100111")), $sformatf("t3 got %s", to_str(st_t'(s), 7)));

    // full-length mode
    start = s; per = 0;
    do begin tick(); per++; end while (s != start && per < 1000);
    check(per == 127, $sformatf("sel=0 period %0d, expected 127", per));

    // embedded LFSR1 mode: left four cells follow x^4+x+1 alone
    sel = 1; left0 = s[3:0]; r = st_t'(s[3:0]); per = 0; ok = 1;
    do begin
      tick(); per++;
      r = step(r, p1, 0, 0);
      if (s[3:0] != 4'(r)) ok = 0;
    end while (s[3:0] != left0 && per < 1000);
    check(ok, "left cells follow x^4+x+1 while sel=1");
    check(per == 15, $sformatf("sel=1 left period %0d, expected 15", per));

    // random selects and enable gaps, from a fresh reset
    en = 0; rst_n = 0; tick(); rst_n = 1;
    r = seed(7);
    check(s == 7'(r), "seed after second reset");
    for (int i = 0; i < 3000; i++) begin
      automatic bit e = ($urandom_range(0, 7) != 0);
      automatic bit sl = 1'($urandom_range(0, 1));
      en = e; sel = sl;
      tick();
      if (e) r = step(r, p3, 4, sl);
      check(s == 7'(r) && s != '0, $sformatf("random step %0d", i));
      if (s != 7'(r)) break;  // once diverged, later steps say nothing new
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
