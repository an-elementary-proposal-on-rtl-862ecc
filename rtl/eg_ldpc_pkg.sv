// eg_ldpc_pkg: constants, types and constant functions of the (15,7) type-I
// two-dimensional Euclidean-Geometry LDPC code used by the fault-tolerant
// memory system.
//
// The code is the cyclic code of length 15 built on EG(2,2^2): 7 information
// bits, 8 parity bits, minimum distance 5, so up to two bit errors per word are
// corrected and up to four are detected. Bit b of a codeword is the coefficient
// of x^b. A codeword is {data[6:0], parity[7:0]}, with
// parity(x) = data(x)*x^8 mod g(x), g(x) = 1 + x + x^2 + x^4 + x^8.
// This reproduces the encoded data set of the design (for example 0x51 -> 0x51FB).
//
// The parity-check matrix has 15 rows, each a cyclic rotation of
// h(x) = 1 + x^4 + x^6 + x^7 (row weight 4, the points of one line of the
// geometry). Every bit lies in exactly 4 rows, and any two of those rows share
// only that bit: they are the 4 checks orthogonal on it that the one-step
// majority corrector votes on. Code length, information length and the
// generator-matrix encoding come from the design; the polynomials follow from
// the published codewords; names and layout are this implementation's.
package eg_ldpc_pkg;

  localparam int unsigned N     = 15;  // code length
  localparam int unsigned K     = 7;   // information bits
  localparam int unsigned P     = N - K;  // parity bits
  localparam int unsigned GAMMA = 4;   // parity checks orthogonal on each bit

  typedef logic [N-1:0] codeword_t;
  typedef logic [K-1:0] data_t;

  // g(x) = 1 + x + x^2 + x^4 + x^8, bit i = coefficient of x^i
  localparam logic [P:0] GEN_POLY = 9'b1_0001_0111;
  // first parity-check row: x^0 + x^4 + x^6 + x^7
  localparam codeword_t H_ROW0 = 15'b000_0000_1101_0001;
  // the 4 rows that contain bit N-1 (rotations 7, 8, 10 and 14 of H_ROW0)
  localparam int unsigned ORTH_ROT [GAMMA] = '{7, 8, 10, 14};

  // rotate a word left (towards the MSB) by k places
  function automatic codeword_t rotl(codeword_t v, int unsigned k);
    codeword_t r;
    for (int unsigned i = 0; i < N; i++) r[(i + k) % N] = v[i];
    return r;
  endfunction

  // row r of the cyclic parity-check matrix
  function automatic codeword_t h_row(int unsigned r);
    return rotl(H_ROW0, r);
  endfunction

  // row i of the systematic 7x15 generator matrix: the codeword of data bit i
  function automatic codeword_t g_row(int unsigned i);
    logic [N-1:0] rem;
    rem = '0;
    rem[P + i] = 1'b1;                // x^(8+i)
    for (int j = N - 1; j >= int'(P); j--)
      if (rem[j]) rem[j -: P + 1] = rem[j -: P + 1] ^ GEN_POLY;
    g_row = '0;
    g_row[P + i] = 1'b1;
    g_row[P-1:0] = rem[P-1:0];
  endfunction

endpackage
