// wl_g2_row: one experiment row for Modification 2: a G2(5, d3[d1]) generator
// with the experiments' selector LFSR0 = x^5+x^2+1, and a wl_stats monitor on
// its pattern stream.
module wl_g2_row #(
  parameter string            LABEL      = "",
  parameter int unsigned      D1         = 3,
  parameter int unsigned      D3         = 7,
  parameter logic [D3-1:0]    TAPS3      = '0,
  parameter int               N          = 32768,
  parameter int               EXP_PERIOD = 0,
  parameter int               EXP_PAIRS  = 0
) (
  input  logic clk, rst_n, en, rec, fin,
  output int   n_checks, n_fail,
  output logic done
);
  logic [D1-1:0] pat;
  logic          sel;
  geffe_mod2 #(.D0(5), .TAPS0(5'b00100), .D3(D3), .TAPS3(TAPS3), .D1(D1))
    u_gen (.clk, .rst_n, .en, .pattern(pat), .sel);
  wl_stats #(.LABEL(LABEL), .W(D1), .N(N), .EXP_PERIOD(EXP_PERIOD), .EXP_PAIRS(EXP_PAIRS))
    u_mon (.clk, .rec, .fin, .pattern(pat), .n_checks, .n_fail, .done);
endmodule
