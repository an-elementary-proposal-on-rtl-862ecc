// eg_ldpc_encoder: systematic (15,7) EG-LDPC encoder.
//
// The 7-bit information vector is multiplied by the 7x15 generator matrix
// over GF(2): each codeword bit is the XOR of the data bits whose generator
// row has a one in that column. The matrix is built at elaboration from the
// generator polynomial in eg_ldpc_pkg, so the logic is a fixed XOR network.
// The codeword is {data, parity}; e.g. data 0x51 gives 0x51FB.
//
// Interface: data (7 bits) in, cw (15 bits) out.
// Timing: purely combinational. The generator-matrix encoding and the code
// sizes are the design's; the systematic bit order is taken from its
// published codewords.
module eg_ldpc_encoder
  import eg_ldpc_pkg::*;
(
  input  data_t     data,
  output codeword_t cw
);

  always_comb begin
    cw = '0;
    for (int unsigned i = 0; i < K; i++)
      cw ^= data[i] ? g_row(i) : '0;
  end

endmodule
