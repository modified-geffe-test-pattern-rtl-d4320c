// geffe_tpg_top: the three modified Geffe test pattern generators side by side.
//
// Modifications 1, 2 and 3 are alternative ways to cut the flip-flop count of
// the conventional Geffe generator G(d0, d1, d2); a chip would use one of them
// as the pattern source of its built-in self-test. This top holds all three,
// each in its worked-example configuration, sharing clock, reset and a
// run-enable, each with its own pattern bus towards a circuit under test:
//   G1(3,4)    3-bit patterns, 7 flip-flops   (Modification 1)
//   G2(3,7[4]) 4-bit patterns, 10 flip-flops  (Modification 2, from G(3,4,5))
//   G3(9[4])   4-bit patterns, 9 flip-flops   (Modification 3, from G(3,4,5))
//
// Interface: while `en` is high every generator produces one new pattern per
// clock cycle, registered (it appears one cycle after the edge). The `*_sel`
// outputs show each generator's multiplexer select for observation. Reset is
// synchronous and active low and loads every register with 0...01.
//
// Placing the three side by side and sharing the control signals is this
// design's choice; the circuit under test and the BIST controller are outside.
module geffe_tpg_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [2:0]  g1_pattern,
  output logic        g1_sel,
  output logic [3:0]  g2_pattern,
  output logic        g2_sel,
  output logic [3:0]  g3_pattern,
  output logic        g3_sel
);

  geffe_mod1 u_g1 (.clk, .rst_n, .en, .pattern(g1_pattern), .sel(g1_sel));
  geffe_mod2 u_g2 (.clk, .rst_n, .en, .pattern(g2_pattern), .sel(g2_sel));
  geffe_mod3 u_g3 (.clk, .rst_n, .en, .pattern(g3_pattern), .sel(g3_sel));

endmodule
