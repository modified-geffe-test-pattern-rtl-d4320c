// wl_stats: testbench monitor that records a pattern stream and measures the
// two sequence attributes used to compare test pattern generators:
//   period      - the smallest p with pattern[i] == pattern[i+p] for every i
//                 in the recorded set (0 when no such p exists in the set);
//   pairs       - the number of different (pattern[i], pattern[i+1]) pairs;
//   last pair   - the 1-based position i+1 at which the last new pair
//                 (pattern[i], pattern[i+1]) first appears.
// One pattern is recorded at each rising clock edge while `rec` is high; a
// rising edge with `fin` high computes the results, compares them with the
// expected values (a negative EXP_PAIRS or EXP_LAST is not compared) and raises `done`.
module wl_stats #(
  parameter string LABEL      = "",
  parameter int    W          = 4,
  parameter int    N          = 32768,
  parameter int    EXP_PERIOD = 0,
  parameter int    EXP_PAIRS  = 0,
  parameter int    EXP_LAST   = -1
) (
  input  logic         clk,
  input  logic         rec,
  input  logic         fin,
  input  logic [W-1:0] pattern,
  output int           n_checks,
  output int           n_fail,
  output logic         done
);
  logic [W-1:0] hist[N];
  int           n = 0;
  bit           seen[longint];
  int           pairs = 0, last = 0;

  initial begin n_checks = 0; n_fail = 0; done = 0; end

  always @(posedge clk) begin
    if (rec && n < N) begin
      hist[n] = pattern;
      if (n > 0) begin
        automatic longint key = (longint'(hist[n-1]) << W) | longint'(pattern);
        if (!seen.exists(key)) begin
          seen[key] = 1'b1;
          pairs++;
          last = n;
        end
      end
      n++;
    end
    if (fin && !done) begin
      automatic int per = 0;
      for (int p = 1; p < n && per == 0; p++) begin
        automatic bit ok = 1;
        for (int i = 0; i + p < n; i++) if (hist[i] != hist[i + p]) begin ok = 0; break; end
        if (ok) per = p;
      end
      $display("%s: %0d patterns, period %0d (0 = none), pairs %0d, last new pair at %0d",
               LABEL, n, per, pairs, last);
      n_checks = 2;
      n_fail = 0;
      if (n != N)            begin n_fail++; $display("FAIL: %s recorded %0d patterns", LABEL, n); end
      if (per != EXP_PERIOD) begin n_fail++; $display("FAIL: %s period %0d, expected %0d", LABEL, per, EXP_PERIOD); end
      if (EXP_PAIRS >= 0) begin
        n_checks++;
        if (pairs != EXP_PAIRS) begin n_fail++; $display("FAIL: %s pairs %0d, expected %0d", LABEL, pairs, EXP_PAIRS); end
      end
      if (EXP_LAST >= 0) begin
        n_checks++;
        if (last != EXP_LAST) begin n_fail++; $display("FAIL: %s last pair %0d, expected %0d", LABEL, last, EXP_LAST); end
      end
      done = 1;
    end
  end
endmodule
