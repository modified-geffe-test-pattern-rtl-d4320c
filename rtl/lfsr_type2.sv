// lfsr_type2: autonomous internal-XOR (type 2) linear feedback shift register.
//
// D cells S_0 .. S_{D-1}. Every cycle that `en` is high the register shifts
// towards higher indices: S_0 takes the last cell S_{D-1}, and each S_j
// (j >= 1) takes S_{j-1}, XORed with S_{D-1} when the characteristic
// polynomial has the term x^j (TAPS[j] = 1). This is the construction of a
// type-2 LFSR from its characteristic polynomial; x^3 + x + 1, for instance,
// gives S_0+ = S_2, S_1+ = S_0 ^ S_2, S_2+ = S_1. A primitive polynomial
// makes the register run through all 2^D - 1 non-zero states.
//
// Interface: `state` shows all cells (bit j = S_j, so S_0 is the leftmost
// bit of a printed pattern), `msb` is S_{D-1}, the bit a Geffe generator uses
// as its selector. Timing: a new state one cycle after each enabled edge; no
// combinational path from input to output.
//
// The structure, the bit ordering and the seed 0...01 (only the last cell set)
// follow the text. The synchronous active-low reset and the enable are this
// design's own choices.
module lfsr_type2 #(
  parameter int unsigned   D     = 3,
  parameter logic [D-1:0]  TAPS  = geffe_pkg::P_X3_X1,
  parameter logic [D-1:0]  SEED  = {1'b1, {(D-1){1'b0}}}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [D-1:0]  state,
  output logic          msb
);

  if (D < 2) begin : g_bad_degree
    $error("lfsr_type2: degree D must be at least 2");
  end

  logic [D-1:0] nxt;

  always_comb begin
    nxt[0] = state[D-1];
    for (int j = 1; j < D; j++)
      nxt[j] = state[j-1] ^ (TAPS[j] & state[D-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= nxt;
  end

  assign msb = state[D-1];

  // The transition matrix is non-singular, so a non-zero seed never decays
  // to the all-zero lock-up state.
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0)
    else $error("lfsr_type2 reached the all-zero state");

endmodule
