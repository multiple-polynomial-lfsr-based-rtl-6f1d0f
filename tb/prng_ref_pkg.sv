// prng_ref_pkg: bit-level reference model of the multiple-polynomial LFSR
// generator, used by the testbenches.
//
// It is written independently of the RTL: the polynomials are kept as lists
// of exponents, the register as cells S[1..16], and one step computes
// fb = XOR over the exponents e of S[17-e], shifts S[k] <= S[k+1] and puts
// fb in S[16]; the output bit of the step is the old S[1]. It also holds the
// published 32-shift example: states after shifts 1..8, 15, 16, 30, 31 and
// 32 starting from 0x0001 with p1, p2 (from shift 16), p3 (shift 31) and p4
// (shift 32), written as S16..S1 bit strings.
package prng_ref_pkg;

  // Exponents of p1..p8 other than the constant term; 0 ends a list.
  localparam int EXPS [8][9] = '{
    '{1, 5, 6, 7, 11, 16, 0, 0, 0},
    '{4, 5, 6, 7, 11, 16, 0, 0, 0},
    '{1, 3, 4, 5, 6, 7, 11, 16, 0},
    '{3, 5, 6, 10, 11, 16, 0, 0, 0},
    '{5, 6, 11, 16, 0, 0, 0, 0, 0},
    '{5, 6, 10, 11, 13, 16, 0, 0, 0},
    '{4, 5, 6, 10, 11, 16, 0, 0, 0},
    '{1, 3, 4, 5, 6, 10, 11, 16, 0}
  };

  // Feedback of polynomial p (0 = p1) for state s (s[k-1] = S_k).
  function automatic bit ref_fb(input bit [15:0] s, input int p);
    bit f = 0;
    for (int i = 0; i < 9; i++)
      if (EXPS[p][i] != 0) f ^= s[16 - EXPS[p][i]];
    return f;
  endfunction

  function automatic bit [15:0] ref_step(input bit [15:0] s, input int p);
    return {ref_fb(s, p), s[15:1]};
  endfunction

  // Published example: shift number and state S16..S1.
  localparam int        EX_N = 13;
  localparam int        EX_SHIFT [EX_N] = '{1, 2, 3, 4, 5, 6, 7, 8, 15, 16, 30, 31, 32};
  localparam bit [15:0] EX_STATE [EX_N] = '{
    16'b1000000000000000, 16'b1100000000000000, 16'b1110000000000000,
    16'b1111000000000000, 16'b1111100000000000, 16'b0111110000000000,
    16'b0011111000000000, 16'b1001111100000000, 16'b0111110100111110,
    16'b0011111010011111, 16'b0111000010111100, 16'b1011100001011110,
    16'b1101110000101111
  };

  // Polynomial (0 = p1) used for shift k (1-based) of the example.
  function automatic int ex_poly(input int k);
    if (k <= 15) return 0;
    if (k <= 30) return 1;
    if (k == 31) return 2;
    return 3;
  endfunction

endpackage
