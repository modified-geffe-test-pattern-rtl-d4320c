// tb_geffe_tpg_top: end-to-end run of the three generators at their default
// configurations, G1(3,4), G2(3,7[4]) and G3(9[4]).
//
// One complete operation is one test set of 32768 patterns per generator, the
// test-set length of the published experiments. Every pattern is compared
// with the reference model. Along the way the run pauses the generators
// (enable low) and resets them once in the middle, and it counts how often
// each mechanism happened: each multiplexer input of each generator, the
// pause, and the restart after reset. A mechanism that never happened counts
// as a failure. The measured pattern periods must be G1: 105 = LCM(7, 15),
// G2: 63, and G3: longer than the 32768-pattern set.
module tb_geffe_tpg_top;
  import geffe_ref_pkg::*;

  localparam int N_PAT = 32768;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [2:0] g1_pattern;
  logic [3:0] g2_pattern, g3_pattern;
  logic g1_sel, g2_sel, g3_sel;

  geffe_tpg_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  exps_t pa = '{3, 2, 0}, pb = '{4, 1, 0};       // G1 sources
  exps_t p0 = '{3, 1, 0}, p3 = '{7, 6, 4, 1, 0}; // G2
  exps_t p4 = '{9, 5, 4, 1, 0};                  // G3
  st_t ra, rb, r0, r3, r4;

  logic [2:0] h1[N_PAT];
  logic [3:0] h2[N_PAT], h3[N_PAT];

  int cnt_g1_lfsr1 = 0, cnt_g1_lfsr2 = 0;
  int cnt_g2_full = 0, cnt_g2_emb = 0;
  int cnt_g3_full = 0, cnt_g3_emb = 0;
  int cnt_pause = 0, cnt_restart = 0;
  int per1, per2, per3;
  logic [2:0] hold1;
  logic [3:0] hold2, hold3;

  task automatic ref_reset();
    ra = seed(3); rb = seed(4); r0 = seed(3); r3 = seed(7); r4 = seed(9);
  endtask

  task automatic ref_step();
    bit s2 = r0[2], s3 = r4[4];
    ra = step(ra, pa, 0, 0); rb = step(rb, pb, 0, 0);
    r3 = step(r3, p3, 4, s2); r0 = step(r0, p0, 0, 0);
    r4 = step(r4, p4, 4, s3);
  endtask

  task automatic compare(string where);
    logic [2:0] e1 = (ra[0] ^ rb[0]) ? rb[2:0] : ra[2:0];
    check(g1_pattern == e1 && g1_sel == (ra[0] ^ rb[0]), {where, ": G1"});
    check(g2_pattern == r3[3:0] && g2_sel == r0[2], {where, ": G2"});
    check(g3_pattern == r4[3:0] && g3_sel == r4[4], {where, ": G3"});
  endtask

  function automatic int period1();
    for (int p = 1; p < N_PAT; p++) begin
      bit ok = 1;
      for (int i = 0; i + p < N_PAT; i++) if (h1[i] != h1[i + p]) begin ok = 0; break; end
      if (ok) return p;
    end
    return 0;
  endfunction
  function automatic int period2();
    for (int p = 1; p < N_PAT; p++) begin
      bit ok = 1;
      for (int i = 0; i + p < N_PAT; i++) if (h2[i] != h2[i + p]) begin ok = 0; break; end
      if (ok) return p;
    end
    return 0;
  endfunction
  function automatic int period3();
    for (int p = 1; p < N_PAT; p++) begin
      bit ok = 1;
      for (int i = 0; i + p < N_PAT; i++) if (h3[i] != h3[i + p]) begin ok = 0; break; end
      if (ok) return p;
    end
    return 0;
  endfunction

  initial begin
    // a short run, a pause, a reset in the middle of it all
    tick(); rst_n = 1; en = 1; ref_reset();
    for (int i = 0; i < 500; i++) begin
      compare($sformatf("warm-up %0d", i));
      if (i % 97 == 50) begin
        hold1 = g1_pattern; hold2 = g2_pattern; hold3 = g3_pattern;
        en = 0; repeat (3) tick();
        check(g1_pattern == hold1 && g2_pattern == hold2 && g3_pattern == hold3, "pause holds every generator");
        cnt_pause++;
        en = 1;
      end
      tick(); ref_step();
    end
    rst_n = 0; tick(); rst_n = 1; ref_reset();
    check(g1_pattern == 3'(from_str("001")) && g2_pattern == 4'b0000 && g3_pattern == 4'b0000,
          "first patterns after reset");
    cnt_restart++;

    // one complete test set of N_PAT patterns from reset
    for (int i = 0; i < N_PAT; i++) begin
      compare($sformatf("pattern %0d", i));
      h1[i] = g1_pattern; h2[i] = g2_pattern; h3[i] = g3_pattern;
      if (g1_sel) cnt_g1_lfsr2++; else cnt_g1_lfsr1++;
      if (g2_sel) cnt_g2_emb++;   else cnt_g2_full++;
      if (g3_sel) cnt_g3_emb++;   else cnt_g3_full++;
      tick(); ref_step();
    end
    per1 = period1(); per2 = period2(); per3 = period3();
    $display("periods over %0d patterns: G1 %0d, G2 %0d, G3 %0d (0 = none)", N_PAT, per1, per2, per3);
    check(per1 == 105, "G1 period 105");
    check(per2 == 63, "G2 period 63");
    check(per3 == 0, "G3 has no period within the test set");

    $display("mechanisms: G1 lfsr1=%0d lfsr2=%0d, G2 full=%0d embedded=%0d, G3 full=%0d embedded=%0d, pause=%0d, restart=%0d",
             cnt_g1_lfsr1, cnt_g1_lfsr2, cnt_g2_full, cnt_g2_emb, cnt_g3_full, cnt_g3_emb, cnt_pause, cnt_restart);
    check(cnt_g1_lfsr1 > 0, "G1 selected LFSR1");
    check(cnt_g1_lfsr2 > 0, "G1 selected LFSR2");
    check(cnt_g2_full > 0,  "G2 ran LFSR3+ at full length");
    check(cnt_g2_emb > 0,   "G2 ran the embedded LFSR1");
    check(cnt_g3_full > 0,  "G3 ran LFSR4+ at full length");
    check(cnt_g3_emb > 0,   "G3 ran the embedded LFSR1");
    check(cnt_pause > 0,    "pause happened");
    check(cnt_restart > 0,  "restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
