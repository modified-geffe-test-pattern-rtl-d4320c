// tb_lfsr_type2: checks the type-2 LFSR against printed state sequences and
// a reference model.
//  - x^3+x+1 must walk the printed 7-state cycle 001 110 011 111 101 100 010;
//  - x^3+x^2+1 must give the printed type-2 sequence 001 101 111 110 011;
//  - x^5+x^2+1 must match the model and have period 2^5-1 = 31 exactly;
//  - a low enable holds the state, reset reloads the seed 0...01.
module tb_lfsr_type2;
  import geffe_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [2:0] sa, sb;
  logic [4:0] sc;
  logic ma, mb, mc;

  lfsr_type2 #(.D(3), .TAPS(3'b010))   u_a (.clk, .rst_n, .en, .state(sa), .msb(ma));
  lfsr_type2 #(.D(3), .TAPS(3'b100))   u_b (.clk, .rst_n, .en, .state(sb), .msb(mb));
  lfsr_type2 #(.D(5), .TAPS(5'b00100)) u_c (.clk, .rst_n, .en, .state(sc), .msb(mc));

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

  string cyc_a[7] = '{"001", "110", "011", "111", "101", "100", "010"};
  string seq_b[5] = '{"001", "101", "111", "110", "011"};
  exps_t pc = '{5, 2, 0};
  st_t   rc;
  logic [4:0] held;
  int    per;

  initial begin
    tick(); tick();
    rst_n = 1; en = 1;
    rc = seed(5);
    for (int t = 0; t < 8; t++) begin
      check(sa == 3'(from_str(cyc_a[t % 7])), $sformatf("x3+x+1 t=%0d got %s", t, to_str(st_t'(sa), 3)));
      check(ma == sa[2], "msb is last cell");
      if (t < 5) check(sb == 3'(from_str(seq_b[t])), $sformatf("x3+x2+1 t=%0d got %s", t, to_str(st_t'(sb), 3)));
      check(sc == 5'(rc), $sformatf("x5+x2+1 t=%0d", t));
      tick();
      rc = step(rc, pc, 0, 0);
    end
    // period of the degree-5 register, measured from the current state
    held = sc; per = 0;
    do begin tick(); per++; end while (sc != held && per < 100);
    check(per == 31, $sformatf("x5+x2+1 period %0d, expected 31", per));
    // enable low: no movement
    en = 0; held = sc;
    repeat (5) tick();
    check(sc == held, "state held while enable is low");
    en = 1; tick();
    check(sc != held, "state moves again after enable returns");
    // reset reloads the seed
    rst_n = 0; tick(); rst_n = 1;
    check(sa == 3'b100 && sb == 3'b100 && sc == 5'b10000, "reset loads 0...01");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
