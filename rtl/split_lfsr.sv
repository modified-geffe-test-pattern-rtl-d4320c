// split_lfsr: the synthesis register LFSR+ of Modifications 2 and 3.
//
// A type-2 LFSR of degree D whose characteristic polynomial contains the
// polynomial of a smaller primitive LFSR1 of degree EMB (its terms below x^EMB
// are the same), so cells S_0 .. S_{EMB-1} with their XOR gates form LFSR1.
// The feedback line is cut right after S_{EMB-1}. The "left" network (the
// feedback into S_0 and into the XOR gates in front of S_1 .. S_{EMB-1}) is
// driven by a 2-to-1 multiplexer; the "right" network (XOR gates in front of
// S_EMB .. S_{D-1}) keeps the feedback from the last cell S_{D-1}.
//   sel = 0: MUX passes S_{D-1}; the register is the full degree-D LFSR.
//   sel = 1: MUX passes S_{EMB-1}; the left cells run as the stand-alone
//            LFSR1 while the right cells keep shifting with their own feedback.
//
// Interface: `sel` is sampled at the clock edge that uses it; `state` is all
// cells (bit j = S_j). Timing: one state per enabled cycle, registered output.
//
// The break point, the MUX input order (0 = S_{D-1}, 1 = S_{EMB-1}) and the
// seed 0...01 follow the text and its figures. Reset and enable are this
// design's own choices. For the register to stay clear of the all-zero state
// the polynomial must also have the term x^EMB (TAPS[EMB] = 1), as all of the
// document's examples do.
module split_lfsr #(
  parameter int unsigned   D     = 7,
  parameter logic [D-1:0]  TAPS  = geffe_pkg::P_X7_X6_X4_X1,
  parameter int unsigned   EMB   = geffe_pkg::EMB_DEGREE,
  parameter logic [D-1:0]  SEED  = {1'b1, {(D-1){1'b0}}}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          sel,
  output logic [D-1:0]  state
);

  if (EMB < 2 || EMB >= D) begin : g_bad_embedding
    $error("split_lfsr: the embedded degree EMB must satisfy 2 <= EMB < D");
  end

  logic         fb_left;   // output of the 2-to-1 MUX at the break point
  logic         fb_right;  // feedback of the right network
  logic [D-1:0] nxt;

  assign fb_right = state[D-1];
  assign fb_left  = sel ? state[EMB-1] : state[D-1];

  always_comb begin
    nxt[0] = fb_left;
    for (int j = 1; j < D; j++)
      nxt[j] = state[j-1] ^ (TAPS[j] & ((j < EMB) ? fb_left : fb_right));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= nxt;
  end

  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0)
    else $error("split_lfsr reached the all-zero state");

endmodule
