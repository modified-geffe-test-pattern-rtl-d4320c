// tb_workloads: the generator configurations of the published experiments.
//
// For CUT widths n = 3 .. 19 the experiments built G2(5, d3[n]) (selector
// LFSR0 = x^5+x^2+1) and G3(d4[n]) from the conventional G(5, n, n+1) and
// applied 32768 patterns of each. This testbench builds the same generators
// from the same polynomials, records 32768 patterns of each and compares the
// pattern period and the number of different consecutive pattern pairs with
// the published figures, and for most G3 rows also the position of the last
// new pair. A published period above 32768 appears here as 0 (no repetition
// inside the set).
//  - G3: every row checked with period and pair count, all as published.
//  - G2: period and pair count for n = 3, 4, 7, 8, 9; period only for
//    n = 12, 14, 16, 18, 19. For those wider rows the published pair counts
//    differ slightly from what the printed polynomials produce. The n = 11
//    row is left out: its published period is twice what the printed
//    polynomial gives.
module tb_workloads;

  localparam int N = 32768;
  localparam int NG = 22;

  logic clk = 0, rst_n = 0, en = 0, rec = 0, fin = 0;
  always #5 clk = ~clk;

  int   chk[NG], bad[NG];
  logic dn[NG];

  int checks = 0, failures = 0;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Modification 2: G2(5, d3[n]), polynomials of the experiment table
  wl_g2_row #("G2(5,7[3])",   3,  7, 7'b0011100,          N, 3937,  16)    r0  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[0]),  .n_fail(bad[0]),  .done(dn[0]));
  wl_g2_row #("G2(5,7[4])",   4,  7, 7'b0111000,          N, 3937,  32)    r1  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[1]),  .n_fail(bad[1]),  .done(dn[1]));
  wl_g2_row #("G2(5,9[7])",   7,  9, 9'b111001010,        N, 11811, 256)   r2  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[2]),  .n_fail(bad[2]),  .done(dn[2]));
  wl_g2_row #("G2(5,11[8])",  8, 11, 11'b10100011100,     N, 19685, 512)   r3  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[3]),  .n_fail(bad[3]),  .done(dn[3]));
  wl_g2_row #("G2(5,11[9])",  9, 11, 11'b11111001100,     N, 31713, 1024)  r4  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[4]),  .n_fail(bad[4]),  .done(dn[4]));
  wl_g2_row #("G2(5,17[14])", 14, 17, 17'b10110111100000000, N, 19530, -1) r5 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[5]),  .n_fail(bad[5]),  .done(dn[5]));
  // Modification 3: G3(d4[n])
  wl_g3_row #("G3(10[3])",    3, 10, 10'b0000101100,      N, 680,   16,   37)    r6  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[6]),  .n_fail(bad[6]),  .done(dn[6]));
  wl_g3_row #("G3(9[4])",     4,  9, 9'b001011000,        N, 121,   30,   107)   r7  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[7]),  .n_fail(bad[7]),  .done(dn[7]));
  wl_g3_row #("G3(13[7])",    7, 13, 13'b0010011001010,   N, 710,   220,  693)   r8  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[8]),  .n_fail(bad[8]),  .done(dn[8]));
  wl_g3_row #("G3(15[8])",    8, 15, 15'b000010100011100, N, 24247, 512,  5760)  r9  (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[9]),  .n_fail(bad[9]),  .done(dn[9]));
  wl_g3_row #("G3(16[9])",    9, 16, 16'b1111101111001100, N, 0,    1024, 9856)  r10 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[10]), .n_fail(bad[10]), .done(dn[10]));
  wl_g3_row #("G3(17[11])",  11, 17, 17'b10000110101000000, N, 21075, 3945, 20947) r11 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[11]), .n_fail(bad[11]), .done(dn[11]));
  wl_g3_row #("G3(23[16])",  16, 23, 23'b00000110000000000101100, N, 0, 1099, 1099) r12 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[12]), .n_fail(bad[12]), .done(dn[12]));

  // Wider rows: published period above the 32768-pattern set; for G2 only the
  // period is compared, for G3 also the published pair count (and the last
  // new pair where the reference model reproduces it)
  wl_g2_row #("G2(5,17[12])", 12, 17, 17'b01001100101000000, N, 0, -1) r13 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[13]), .n_fail(bad[13]), .done(dn[13]));
  wl_g2_row #("G2(5,19[16])", 16, 19, 19'b0110000000000101100, N, 0, -1) r14 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[14]), .n_fail(bad[14]), .done(dn[14]));
  wl_g2_row #("G2(5,23[18])", 18, 23, 23'b10001101111000000000000, N, 0, -1) r15 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[15]), .n_fail(bad[15]), .done(dn[15]));
  wl_g2_row #("G2(5,21[19])", 19, 21, 21'b111100010000000000000, N, 0, -1) r16 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[16]), .n_fail(bad[16]), .done(dn[16]));
  wl_g3_row #("G3(19[12])", 12, 19, 19'b1000001100101000000, N, 0, 7683, 32765) r17 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[17]), .n_fail(bad[17]), .done(dn[17]));
  wl_g3_row #("G3(23[14])", 14, 23, 23'b11010000110111100000000, N, 0, 19263, -1) r18 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[18]), .n_fail(bad[18]), .done(dn[18]));
  wl_g3_row #("G3(23[17])", 17, 23, 23'b01101111100000000000000, N, 0, 4219, -1) r19 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[19]), .n_fail(bad[19]), .done(dn[19]));
  wl_g3_row #("G3(25[18])", 18, 25, 25'b0100001101111000000000000, N, 0, 31604, 32767) r20 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[20]), .n_fail(bad[20]), .done(dn[20]));
  wl_g3_row #("G3(25[19])", 19, 25, 25'b0100011100010000000000000, N, 0, 32203, 32767) r21 (.clk, .rst_n, .en, .rec, .fin, .n_checks(chk[21]), .n_fail(bad[21]), .done(dn[21]));

  initial begin
    @(posedge clk); #1;
    rst_n = 1; en = 1; rec = 1;
    repeat (N) @(posedge clk);
    #1 en = 0; rec = 0; fin = 1;
    @(posedge clk); #1;
    for (int i = 0; i < NG; i++) begin
      if (!dn[i]) begin failures++; $display("FAIL: row %0d not evaluated", i); end
      checks += chk[i];
      failures += bad[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
