// geffe_mod2: Geffe generator G2(d0, d3[d1]) after Modification 2.
//
// The two source LFSRs of the conventional generator are merged into a single
// synthesis register LFSR3+ of degree d3 that embeds LFSR1 (degree d1) in its
// first d1 cells. The selector LFSR0 is kept; its last cell drives the
// multiplexer placed at the break point of LFSR3+'s feedback network:
//   LFSR0 last cell = 1: the first d1 cells run as LFSR1 on their own;
//   LFSR0 last cell = 0: LFSR3+ runs as one full-length LFSR.
// The test pattern is the leftmost d1 cells of LFSR3+, one per clock cycle.
// The flip-flop count is d0 + d3 instead of d0 + d1 + d2.
//
// Interface: `pattern` bit p is cell S_p of LFSR3+; `sel` is the last cell of
// LFSR0, the select applied at the next enabled edge. `pattern` changes one
// cycle after each enabled edge.
//
// The structure and select polarity follow the text, its figures and its
// worked example G2(3,7[4]), which is the default. Reset to the seed 0...01 in
// both registers follows the text; reset and enable signals are this design's.
// Only LFSR0's last cell and LFSR3+'s first d1 cells leave the module; the
// other cells are internal state, so lint reports them as unread bits.
module geffe_mod2 #(
  parameter int unsigned    D0    = 3,
  parameter logic [D0-1:0]  TAPS0 = geffe_pkg::P_X3_X1,
  parameter int unsigned    D3    = 7,
  parameter logic [D3-1:0]  TAPS3 = geffe_pkg::P_X7_X6_X4_X1,
  parameter int unsigned    D1    = geffe_pkg::EMB_DEGREE
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  output logic [D1-1:0]  pattern,
  output logic           sel
);

  logic [D0-1:0] s0;
  logic [D3-1:0] s3;

  lfsr_type2 #(.D(D0), .TAPS(TAPS0)) u_lfsr0 (
    .clk, .rst_n, .en, .state(s0), .msb(sel)
  );

  split_lfsr #(.D(D3), .TAPS(TAPS3), .EMB(D1)) u_lfsr3p (
    .clk, .rst_n, .en, .sel, .state(s3)
  );

  assign pattern = s3[D1-1:0];

endmodule
