// wl_g3_row: one experiment row for Modification 3: a G3(d4[d1]) generator
// and a wl_stats monitor on its pattern stream.
module wl_g3_row #(
  parameter string            LABEL      = "",
  parameter int unsigned      D1         = 3,
  parameter int unsigned      D4         = 10,
  parameter logic [D4-1:0]    TAPS4      = '0,
  parameter int               N          = 32768,
  parameter int               EXP_PERIOD = 0,
  parameter int               EXP_PAIRS  = 0,
  parameter int               EXP_LAST   = -1
) (
  input  logic clk, rst_n, en, rec, fin,
  output int   n_checks, n_fail,
  output logic done
);
  logic [D1-1:0] pat;
  logic          sel;
  geffe_mod3 #(.D4(D4), .TAPS4(TAPS4), .D1(D1))
    u_gen (.clk, .rst_n, .en, .pattern(pat), .sel);
  wl_stats #(.LABEL(LABEL), .W(D1), .N(N), .EXP_PERIOD(EXP_PERIOD), .EXP_PAIRS(EXP_PAIRS),
             .EXP_LAST(EXP_LAST))
    u_mon (.clk, .rec, .fin, .pattern(pat), .n_checks, .n_fail, .done);
endmodule
