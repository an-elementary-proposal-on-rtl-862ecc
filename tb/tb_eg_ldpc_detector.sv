// tb_eg_ldpc_detector: checks the syndrome detector.
// Every one of the 128 codewords must pass; every single and double error
// on a sample of codewords, and random triple and quadruple errors, must be
// flagged (minimum distance 5). The syndrome is compared with a model that
// builds the parity-check rows from h(x) = 1 + x^4 + x^6 + x^7.
module tb_eg_ldpc_detector;
  logic [14:0] cw, syn;
  logic        err;
  int checks = 0, failures = 0;

  eg_ldpc_detector dut (.cw(cw), .syndrome(syn), .err(err));

  function automatic logic [14:0] enc(logic [6:0] d);
    logic [7:0] r = '0;
    logic fb;
    for (int i = 6; i >= 0; i--) begin
      fb = d[i] ^ r[7];
      r  = {r[6:0], 1'b0};
      if (fb) r ^= 8'b0001_0111;
    end
    return {d, r};
  endfunction

  function automatic logic [14:0] syn_model(logic [14:0] c);
    logic [14:0] s;
    for (int r = 0; r < 15; r++)
      s[r] = c[r % 15] ^ c[(r + 4) % 15] ^ c[(r + 6) % 15] ^ c[(r + 7) % 15];
    return s;
  endfunction

  task automatic check(logic [14:0] w, logic exp_err);
    cw = w;
    #1;
    checks++;
    if (err !== exp_err || syn !== syn_model(w)) begin
      failures++;
      $display("FAIL cw=%h err=%b exp=%b syn=%h exp=%h", w, err, exp_err, syn, syn_model(w));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] c, e;
    int n;
    for (int d = 0; d < 128; d++) check(enc(7'(d)), 1'b0);
    for (int d = 0; d < 128; d += 21) begin
      c = enc(7'(d));
      for (int i = 0; i < 15; i++) begin
        check(c ^ (15'(1) << i), 1'b1);
        for (int j = i + 1; j < 15; j++) check(c ^ (15'(1) << i) ^ (15'(1) << j), 1'b1);
      end
    end
    for (int t = 0; t < 400; t++) begin
      c = enc(7'($urandom));
      e = '0;
      n = 3 + (t % 2);
      while ($countones(e) < n) e[$urandom % 15] = 1'b1;
      check(c ^ e, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
