// eg_ldpc_pkg: constants and functions of the (15,7,5) type-I two-dimensional
// Euclidean-Geometry LDPC code shared by the encoder, detectors and correctors.
//
// The code is cyclic with length N=15, K=7 information bits and minimum
// distance 5, so a one-step majority-logic corrector repairs up to 2 bit errors
// per word and the syndrome detector sees every error pattern of up to 4 bits.
// The parity-check matrix is the 15x15 circulant whose row j checks bits
// j, j+8, j+9 and j+11 (mod 15); every bit is covered by exactly 4 rows, and
// the 4 rows covering a bit share no other bit, which is what makes both the
// simple fault-secure detector and one-step majority correction possible.
// The systematic generator matrix G=[I:X] puts the information bits in C0..C6
// and parity bits in C7..C14. X below is derived from the parity checks.
// The code, the parity-check pattern, the orthogonal check sets of bit 14 and
// the systematic form are the document's; the bit numbering conventions and
// the helper functions are this design's.
package eg_ldpc_pkg;

  localparam int unsigned N = 15;   // code length
  localparam int unsigned K = 7;    // information bits
  localparam int unsigned R = N - K; // parity bits
  localparam int unsigned J = 4;    // row weight = checks orthogonal on one bit

  typedef logic [N-1:0] codeword_t;
  typedef logic [K-1:0] info_t;

  // Offsets of the bits checked by parity row j: j + HROW_OFS[m] (mod N).
  localparam int unsigned HROW_OFS [J] = '{0, 8, 9, 11};

  // Parity part of G, one row per information bit; bit p of XROW[i] is the
  // coefficient of information bit i in parity bit C(K+p).
  localparam logic [R-1:0] XROW [K] = '{
    8'b11010001,  // i0 -> C7..C14 = 1 0 0 0 1 0 1 1
    8'b01110011,  // i1 -> 1 1 0 0 1 1 1 0
    8'b11100110,  // i2 -> 0 1 1 0 0 1 1 1
    8'b00011101,  // i3 -> 1 0 1 1 1 0 0 0
    8'b00111010,  // i4 -> 0 1 0 1 1 1 0 0
    8'b01110100,  // i5 -> 0 0 1 0 1 1 1 0
    8'b11101000   // i6 -> 0 0 0 1 0 1 1 1
  };

  // The four parity checks orthogonal on bit N-1 (C14): every set holds C14
  // and three bits that appear in no other set.
  localparam int unsigned ORTH14 [J][J] = '{
    '{ 3, 11, 12, 14},
    '{ 1,  5, 13, 14},
    '{ 0,  2,  6, 14},
    '{ 7,  8, 10, 14}
  };

  // Index arithmetic modulo N.
  function automatic int unsigned modn(input int unsigned v);
    return v % N;
  endfunction

  // Reference encoder, used by testbenches and assertions.
  function automatic codeword_t ref_encode(input info_t i);
    logic [R-1:0] p;
    p = '0;
    for (int b = 0; b < K; b++) if (i[b]) p ^= XROW[b];
    return {p, i};
  endfunction

  // Reference syndrome.
  function automatic codeword_t ref_syndrome(input codeword_t c);
    codeword_t s;
    for (int j = 0; j < N; j++) begin
      s[j] = 1'b0;
      for (int m = 0; m < J; m++) s[j] ^= c[modn(j + HROW_OFS[m])];
    end
    return s;
  endfunction

endpackage
