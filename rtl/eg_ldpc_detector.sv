// eg_ldpc_detector: syndrome-based error detector for the (15,7) EG-LDPC code.
//
// Each of the 15 rows of the cyclic parity-check matrix is a 4-input XOR of
// the word; the 15 results form the syndrome and their OR is the error flag.
// Because every row has weight 4 and the code has minimum distance 5, any
// pattern of one to four flipped bits gives a nonzero syndrome. Using all 15
// (redundant) rows rather than 8 independent ones is what makes the checker
// itself tolerant: a fault inside one XOR tree can only hide an error that
// several other rows still see.
//
// The same module serves as the encoder-detector (on the encoder result) and
// as the corrector-detector (on the word read from memory and on the
// corrector output).
//
// Interface: cw (15 bits) in; syndrome (15 bits) and err out.
// Timing: purely combinational. The role of the detectors is the design's;
// building them from the full cyclic parity-check matrix is this
// implementation's reading of "redundancy makes the design of detectors simple".
module eg_ldpc_detector
  import eg_ldpc_pkg::*;
(
  input  codeword_t cw,
  output codeword_t syndrome,
  output logic      err
);

  always_comb begin
    for (int unsigned r = 0; r < N; r++)
      syndrome[r] = ^(cw & h_row(r));
    err = |syndrome;
  end

endmodule
