// tb_table_configs: the eight worked generator configurations of the
// polynomial tables for Modification 2 (LFSR3+) and Modification 3 (LFSR4+),
// for CUT widths n = 3, 4, 7 and 9. Each split register is checked by an
// emb_check helper: full period 2^D - 1 with the select at 0, and with the
// select at 1 its first n cells run as the LFSR1 the table pairs it with.
// These tables use partly different polynomials from the experiment
// configurations of tb_workloads (the n = 4 rows here equal the default
// generators). All eight run in parallel; the longest is the degree-16
// register, 65535 cycles.
module tb_table_configs;

  localparam int NC = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   chk[NC], bad[NC];
  logic dn[NC];
  int   checks = 0, failures = 0;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Modification 2: LFSR3+ of G2(5, d3[n])
  emb_check #("G2 n=3: x^7+x^4+x^3+x^2+1 [x^3+x^2+1]", 7, 7'b0011100, 3, 3'b100)
    c0 (.clk, .n_checks(chk[0]), .n_fail(bad[0]), .done(dn[0]));
  emb_check #("G2 n=4: x^7+x^6+x^4+x+1 [x^4+x+1]", 7, 7'b1010010, 4, 4'b0010)
    c1 (.clk, .n_checks(chk[1]), .n_fail(bad[1]), .done(dn[1]));
  emb_check #("G2 n=7: x^9+x^8+x^7+x^6+x^3+x+1 [x^7+x^6+x^3+x+1]", 9, 9'b111001010, 7, 7'b1001010)
    c2 (.clk, .n_checks(chk[2]), .n_fail(bad[2]), .done(dn[2]));
  emb_check #("G2 n=9: x^11+x^10+x^9+x^5+1 [x^9+x^5+1]", 11, 11'b11000100000, 9, 9'b000100000)
    c3 (.clk, .n_checks(chk[3]), .n_fail(bad[3]), .done(dn[3]));
  // Modification 3: LFSR4+ of G3(d4[n])
  emb_check #("G3 n=3: x^10+x^5+x^3+x^2+1 [x^3+x^2+1]", 10, 10'b0000101100, 3, 3'b100)
    c4 (.clk, .n_checks(chk[4]), .n_fail(bad[4]), .done(dn[4]));
  emb_check #("G3 n=4: x^9+x^5+x^4+x+1 [x^4+x+1]", 9, 9'b000110010, 4, 4'b0010)
    c5 (.clk, .n_checks(chk[5]), .n_fail(bad[5]), .done(dn[5]));
  emb_check #("G3 n=7: x^13+x^12+x^7+x^6+1 [x^7+x^6+1]", 13, 13'b1000011000000, 7, 7'b1000000)
    c6 (.clk, .n_checks(chk[6]), .n_fail(bad[6]), .done(dn[6]));
  emb_check #("G3 n=9: x^16+x^14+x^9+x^4+1 [x^9+x^4+1]", 16, 16'b0100001000010000, 9, 9'b000010000)
    c7 (.clk, .n_checks(chk[7]), .n_fail(bad[7]), .done(dn[7]));

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NC; i++) if (!dn[i]) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < NC; i++) begin
      checks += chk[i];
      failures += bad[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
