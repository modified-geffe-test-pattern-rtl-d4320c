// geffe_pkg: characteristic polynomials of the worked example generators.
//
// A type-2 (internal-XOR) LFSR of degree D is described here by a D-bit tap
// mask: bit j (1 <= j < D) is set when the polynomial has the term x^j, which
// places an XOR gate in front of cell S_j that adds the last cell S_{D-1}.
// The x^D and x^0 terms are implied by the structure, so bit 0 is always 0.
// Example: x^7 + x^6 + x^4 + x + 1 ("7 6 4 1 0") becomes 7'b101_0010.
//
// The constants below are the polynomials of the worked examples that the
// generators use as their defaults: the conventional G(3,4,5) and its
// Modification 1, 2 and 3 forms. The experiment configurations are passed in
// as parameters by the workload testbench instead.
package geffe_pkg;

  // LFSR0 selector of G(3,4,5) and G2(3,7[4]): x^3 + x + 1
  localparam logic [2:0] P_X3_X1        = 3'b010;
  // LFSR1 of G1(3,4): x^3 + x^2 + 1
  localparam logic [2:0] P_X3_X2        = 3'b100;
  // LFSR2 of G1(3,4) and LFSR1 of G(3,4,5): x^4 + x + 1
  localparam logic [3:0] P_X4_X1        = 4'b0010;
  // LFSR3+ of G2(3,7[4]): x^7 + x^6 + x^4 + x + 1, embeds x^4 + x + 1
  localparam logic [6:0] P_X7_X6_X4_X1  = 7'b101_0010;
  // LFSR4+ of G3(9[4]): x^9 + x^5 + x^4 + x + 1, embeds x^4 + x + 1
  localparam logic [8:0] P_X9_X5_X4_X1  = 9'b0_0011_0010;

  // Degree of the embedded LFSR1 in the examples (also the pattern width).
  localparam int unsigned EMB_DEGREE    = 4;

endpackage
