// geffe_mod3: Geffe generator G3(d4[d1]) after Modification 3.
//
// All three LFSRs of the conventional generator are folded into one synthesis
// register LFSR4+ of degree d4 that embeds LFSR1 (degree d1) in its first d1
// cells. There is no selector LFSR: the multiplexer at the break point of the
// feedback network is driven by cell S_{d1} of LFSR4+ itself, the cell right
// after the break point.
//   S_{d1} = 1: the first d1 cells run as LFSR1 on their own;
//   S_{d1} = 0: LFSR4+ runs as one full-length LFSR.
// The test pattern is the leftmost d1 cells, one per clock cycle. The
// flip-flop count is d4 instead of d0 + d1 + d2.
//
// Interface: `pattern` bit p is cell S_p; `sel` is S_{d1}, the select applied
// at the next enabled edge. `pattern` changes one cycle after each enabled
// edge.
//
// The structure, the select cell and its polarity follow the text, its figure
// and the worked example G3(9[4]) (x^9 + x^5 + x^4 + x + 1), the default.
// Reset to 0...01 follows the text; reset and enable signals are this design's.
module geffe_mod3 #(
  parameter int unsigned    D4    = 9,
  parameter logic [D4-1:0]  TAPS4 = geffe_pkg::P_X9_X5_X4_X1,
  parameter int unsigned    D1    = geffe_pkg::EMB_DEGREE
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  output logic [D1-1:0]  pattern,
  output logic           sel
);

  logic [D4-1:0] s4;

  split_lfsr #(.D(D4), .TAPS(TAPS4), .EMB(D1)) u_lfsr4p (
    .clk, .rst_n, .en, .sel, .state(s4)
  );

  assign sel     = s4[D1];
  assign pattern = s4[D1-1:0];

endmodule
