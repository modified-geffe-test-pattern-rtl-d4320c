// geffe_mod1: Geffe generator G1(d1, d2) after Modification 1 (no selector).
//
// The conventional Geffe generator picks between two source LFSRs with a third
// (selector) LFSR. Modification 1 removes the selector: the multiplexer select
// is the XOR of cell S_{1,i} of LFSR1 and cell S_{2,i} of LFSR2. When the two
// cells are equal the pattern is the leftmost W cells of LFSR1 (MUX input 0),
// when they differ it is the leftmost W cells of LFSR2 (MUX input 1). One
// W-bit pattern is produced per clock cycle. With co-prime d1, d2 the pattern
// period is at most (2^d1 - 1)(2^d2 - 1).
//
// Interface: `pattern` bit p is cell S_p of the chosen LFSR (bit 0 is the
// leftmost bit of a printed pattern); `sel` is the current XOR select. Both
// are functions of the present state, so the pattern seen in a cycle belongs
// to that cycle's state; it changes one cycle after each enabled edge.
//
// The structure and the select rule follow the text and its figure; the
// example G1(3,4) with i = 0 is the default. W defaults to d1, the CUT width
// the text gives; reset, enable and the parameterisation are this design's.
// The source LFSRs' last-cell outputs (`msb`) are left open on purpose: this
// generator reads cells S_i and the leftmost W cells only.
module geffe_mod1 #(
  parameter int unsigned    D1      = 3,
  parameter logic [D1-1:0]  TAPS1   = geffe_pkg::P_X3_X2,
  parameter int unsigned    D2      = 4,
  parameter logic [D2-1:0]  TAPS2   = geffe_pkg::P_X4_X1,
  parameter int unsigned    SEL_BIT = 0,
  parameter int unsigned    W       = D1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [W-1:0]  pattern,
  output logic          sel
);

  if (W > D1 || W > D2 || SEL_BIT >= D1 || SEL_BIT >= D2) begin : g_bad_params
    $error("geffe_mod1: W and SEL_BIT must fit in both source LFSRs");
  end

  logic [D1-1:0] s1;
  logic [D2-1:0] s2;

  lfsr_type2 #(.D(D1), .TAPS(TAPS1)) u_lfsr1 (
    .clk, .rst_n, .en, .state(s1), .msb()
  );

  lfsr_type2 #(.D(D2), .TAPS(TAPS2)) u_lfsr2 (
    .clk, .rst_n, .en, .state(s2), .msb()
  );

  assign sel     = s1[SEL_BIT] ^ s2[SEL_BIT];
  assign pattern = sel ? s2[W-1:0] : s1[W-1:0];

endmodule
