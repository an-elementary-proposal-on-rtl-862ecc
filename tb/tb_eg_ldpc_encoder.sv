// tb_eg_ldpc_encoder: checks the (15,7) EG-LDPC encoder.
// The five data words of the reference data set must give the published
// codewords (0x51 -> 0x51FB, 0x55 -> 0x55A7, 0x76 -> 0x7650, 0x2A -> 0x2A58,
// 0x63 -> 0x637C). All 128 inputs are then compared with a bit-serial
// polynomial-division model written here, independent of the design's
// generator matrix.
module tb_eg_ldpc_encoder;
  logic [6:0]  data;
  logic [14:0] cw;
  int checks = 0, failures = 0;

  eg_ldpc_encoder dut (.data(data), .cw(cw));

  // parity = data(x) * x^8 mod (1 + x + x^2 + x^4 + x^8), shifted in MSB first
  function automatic logic [14:0] model(logic [6:0] d);
    logic [7:0] r = '0;
    logic fb;
    for (int i = 6; i >= 0; i--) begin
      fb = d[i] ^ r[7];
      r  = {r[6:0], 1'b0};
      if (fb) r ^= 8'b0001_0111;
    end
    return {d, r};
  endfunction

  task automatic check(logic [6:0] d, logic [14:0] exp);
    data = d;
    #1;
    checks++;
    if (cw !== exp) begin
      failures++;
      $display("FAIL data=%h cw=%h expected=%h", d, cw, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(7'h51, 15'h51FB);
    check(7'h55, 15'h55A7);
    check(7'h76, 15'h7650);
    check(7'h2A, 15'h2A58);
    check(7'h63, 15'h637C);
    for (int d = 0; d < 128; d++) check(7'(d), model(7'(d)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
