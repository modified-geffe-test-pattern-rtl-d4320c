// emb_check: testbench helper that checks one split register against the two
// properties its construction relies on. It drives its own split_lfsr
// instance from the shared clock and reports through n_checks / n_fail / done.
//  1. With the select held at 0 the register is the full LFSR of its
//     polynomial: from the seed 0...01 it returns to the seed after exactly
//     2^D - 1 steps (the polynomial is primitive).
//  2. With the select held at 1 the first EMB cells step exactly as the
//     separately given LFSR1 (mask TAPS1) and repeat after 2^EMB - 1 steps.
//     The ring is started from a non-zero value, reached by a few full-mode
//     steps after reset, since the seed leaves the first EMB cells at zero.
// The LFSR1 reference below is a plain internal-XOR LFSR written here, not
// taken from the design.
module emb_check #(
  parameter string           LABEL = "",
  parameter int unsigned     D     = 7,
  parameter logic [D-1:0]    TAPS  = '0,
  parameter int unsigned     EMB   = 4,
  parameter logic [EMB-1:0]  TAPS1 = '0
) (
  input  logic clk,
  output int   n_checks,
  output int   n_fail,
  output logic done
);
  logic rst_n = 1'b0, en = 1'b0, sel = 1'b0;
  logic [D-1:0] s;

  split_lfsr #(.D(D), .TAPS(TAPS), .EMB(EMB)) u_dut (.clk, .rst_n, .en, .sel, .state(s));

  function automatic logic [EMB-1:0] ring_step(logic [EMB-1:0] r);
    logic [EMB-1:0] n;
    n[0] = r[EMB-1];
    for (int j = 1; j < EMB; j++) n[j] = r[j-1] ^ (TAPS1[j] & r[EMB-1]);
    return n;
  endfunction

  task automatic note(bit ok, string what);
    n_checks++;
    if (!ok) begin n_fail++; $display("FAIL: %s %s", LABEL, what); end
  endtask

  logic [D-1:0]   seed_v;
  logic [EMB-1:0] r, r0;
  longint         per;
  bit             track;

  initial begin
    n_checks = 0; n_fail = 0; done = 0;
    seed_v = '0; seed_v[D-1] = 1'b1;
    @(posedge clk); #1;
    rst_n = 1'b1;
    note(s == seed_v, "seed after reset");

    // 1: full-length mode
    en = 1'b1; sel = 1'b0; per = 0;
    do begin @(posedge clk); #1; per++; end
    while (s != seed_v && per <= (longint'(1) << D));
    note(per == (longint'(1) << D) - 1,
         $sformatf("full period %0d, expected %0d", per, (longint'(1) << D) - 1));

    // 2: embedded ring
    while (s[EMB-1:0] == '0) begin @(posedge clk); #1; end
    sel = 1'b1; r = s[EMB-1:0]; r0 = r; per = 0; track = 1'b1;
    do begin
      @(posedge clk); #1; per++;
      r = ring_step(r);
      if (s[EMB-1:0] != r || s == '0) track = 1'b0;
    end while (s[EMB-1:0] != r0 && per <= (longint'(1) << EMB));
    note(track, "first cells do not follow LFSR1 with select 1");
    note(per == (longint'(1) << EMB) - 1,
         $sformatf("ring period %0d, expected %0d", per, (longint'(1) << EMB) - 1));
    en = 1'b0;
    $display("%s: full period and embedded ring checked", LABEL);
    done = 1'b1;
  end
endmodule
