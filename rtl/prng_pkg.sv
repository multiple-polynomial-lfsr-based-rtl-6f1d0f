// prng_pkg: sizes and feedback polynomials of the multiple-polynomial LFSR
// pseudorandom number generator.
//
// The generator is a 16-cell LFSR whose feedback polynomial is picked, at run
// time, from a wheel of eight primitive polynomials; a true random bit decides
// whether the wheel advances one or two positions once per 16-bit output.
// This package holds what the modules share: the default sizes (n = 16 cells,
// m = 8 polynomials, one output word every FR = 16 shifts, wheel update after
// L = 15 shifts), the reset state 0x0001, and the eight polynomials.
//
// Polynomial encoding: bit (j-1) of a coefficient word is the coefficient of
// x^j, j = 1..16; the constant term 1 is implicit. Cell S_k of the register
// (S1 is the output end, S16 the input end) is tapped by x^(17-k), so x^1
// taps S16 and x^16 taps S1. The polynomials, the sizes and the reset state
// are the published ones; the bit encoding is this design's own.
package prng_pkg;

  localparam int unsigned N_CELLS  = 16;   // LFSR length n
  localparam int unsigned M_POLYS  = 8;    // polynomials on the wheel m
  localparam int unsigned FRAME    = 16;   // shifts per output word (trn period)
  localparam int unsigned UPD      = 15;   // shifts before the wheel update l
  localparam logic [15:0] SEED     = 16'h0001;  // initial state v0

  // Coefficients of x^16..x^1 (MSB = x^16).
  localparam logic [15:0] POLY_COEF [M_POLYS] = '{
    16'b1000_0100_0111_0001,  // p1: 1+x+x^5+x^6+x^7+x^11+x^16
    16'b1000_0100_0111_1000,  // p2: 1+x^4+x^5+x^6+x^7+x^11+x^16
    16'b1000_0100_0111_1101,  // p3: 1+x+x^3+x^4+x^5+x^6+x^7+x^11+x^16
    16'b1000_0110_0011_0100,  // p4: 1+x^3+x^5+x^6+x^10+x^11+x^16
    16'b1000_0100_0011_0000,  // p5: 1+x^5+x^6+x^11+x^16
    16'b1001_0110_0011_0000,  // p6: 1+x^5+x^6+x^10+x^11+x^13+x^16
    16'b1000_0110_0011_1000,  // p7: 1+x^4+x^5+x^6+x^10+x^11+x^16
    16'b1000_0110_0011_1101   // p8: 1+x+x^3+x^4+x^5+x^6+x^10+x^11+x^16
  };

endpackage
