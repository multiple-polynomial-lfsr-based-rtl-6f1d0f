// poly_feedback: multiple-polynomial tap network of the LFSR.
//
// Given the one-hot select of one of M polynomials and the register state,
// it returns the feedback bit of the selected polynomial. For each cell the
// tap is enabled by the OR of the select lines of every polynomial that has
// the matching coefficient, the enabled taps are ANDed with the cells, and
// the products are XORed together. A coefficient that all M polynomials
// share therefore needs no gate at all after constant folding, and a
// coefficient no polynomial has drops out: with the default table only
// x^1, x^3, x^4, x^7, x^10 and x^13 keep an AND gate, while S12, S11, S6 and
// S1 (x^5, x^6, x^11, x^16) feed the XOR directly.
//
// Purely combinational. COEF[p] bit (j-1) is the coefficient of x^j of
// polynomial p+1; cell S_k (state[k-1]) is tapped by x^(N+1-k).
// From the published design: the OR-select / AND-tap / XOR-sum structure and
// the polynomial table. This design's own: the generic parameterisation.
module poly_feedback #(
  parameter int unsigned  N = prng_pkg::N_CELLS,
  parameter int unsigned  M = prng_pkg::M_POLYS,
  parameter logic [N-1:0] COEF [M] = prng_pkg::POLY_COEF
) (
  input  logic [M-1:0] sel_onehot,  // exactly one bit set
  input  logic [N-1:0] state,       // S_N..S_1
  output logic         fb
);

  logic [N-1:0] tap_en;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      tap_en[i] = 1'b0;
      for (int p = 0; p < int'(M); p++)
        tap_en[i] = tap_en[i] | (sel_onehot[p] & COEF[p][N-1-i]);
    end
  end

  assign fb = ^(state & tap_en);

endmodule
