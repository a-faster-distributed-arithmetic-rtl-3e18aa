// da_pkg: sizes and default coefficient sets shared by the distributed
// arithmetic (DA) multiply-accumulate designs.
//
// The word size n = 32 is the one used for every implemented design in the
// evaluation. The coefficient values are not given anywhere; the defaults
// below are arbitrary unsigned 32-bit constants chosen for this RTL, including
// an all-ones value so that the widest partial sums occur. Coefficients are
// packed as {A3, A2, A1, A0}: coefficient k sits in bits [k*W +: W].
package da_pkg;

  // Word size n of the data samples x_k (two's complement, LSB first).
  parameter int unsigned WORD_N = 32;
  // Width of one coefficient A_k (unsigned). Equal to n in the cost model.
  parameter int unsigned COEF_W = 32;
  // Samples that address one LUT (the LUT has 2**TAPS entries).
  parameter int unsigned TAPS = 4;
  // LUT word: a sum of TAPS coefficients needs log2(TAPS) extra bits (n+2).
  parameter int unsigned LUT_W = COEF_W + $clog2(TAPS);

  // Default coefficients of the four-product designs, {A3, A2, A1, A0}.
  parameter logic [TAPS*COEF_W-1:0] COEFS4 =
      {32'h3C6E_F372, 32'h8000_0001, 32'hFFFF_FFFF, 32'h0B50_4F33};
  // Default coefficients of the eight-product design, {A7, ..., A0}.
  parameter logic [2*TAPS*COEF_W-1:0] COEFS8 =
      {32'h0000_0001, 32'h7FFF_FFFF, 32'hA54F_F53A, 32'h1234_5678, COEFS4};

endpackage
