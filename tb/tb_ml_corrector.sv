// tb_ml_corrector: checks the serial one-step majority-logic corrector.
// For a sample of codewords, every pattern of zero, one and two bit errors
// must be corrected, with done rising exactly 16 cycles after start and for
// one cycle only. An upset on the shift register during a pass must show up
// in the result, and start must be ignored while busy.
module tb_ml_corrector;
  logic clk = 0, rst_n = 0, start = 0;
  logic [14:0] cw_in = '0, upset = '0, cw_out;
  logic busy, done;
  int checks = 0, failures = 0;

  ml_corrector dut (.*);

  always #5 clk = ~clk;

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

  // start a correction, return the output and the cycles until done
  task automatic run(logic [14:0] w, logic [14:0] up, int up_cycle,
                     output logic [14:0] res, output int lat);
    @(negedge clk);
    start = 1; cw_in = w;
    @(negedge clk);
    start = 0; cw_in = ~w;   // a start while busy must be ignored
    start = 1;
    lat = 1;
    while (!done) begin
      upset = (lat == up_cycle) ? up : '0;
      @(negedge clk);
      start = 0;
      lat++;
      if (lat > 100) break;
    end
    upset = '0;
    res = cw_out;
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  task automatic expect_ok(logic [14:0] w, logic [14:0] exp);
    logic [14:0] res;
    int lat;
    run(w, '0, 0, res, lat);
    checks += 2;
    if (res !== exp) begin failures++; $display("FAIL in=%h out=%h exp=%h", w, res, exp); end
    if (lat != 16)   begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] c, res;
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      c = (k == 0) ? 15'h51FB : enc(7'($urandom));
      expect_ok(c, c);
      for (int i = 0; i < 15; i++) begin
        expect_ok(c ^ (15'(1) << i), c);
        for (int j = i + 1; j < 15; j++)
          expect_ok(c ^ (15'(1) << i) ^ (15'(1) << j), c);
      end
    end
    // a fault on the last step survives into the output
    run(15'h2A58, 15'h0100, 15, res, lat);
    checks++;
    if (res == 15'h2A58) begin failures++; $display("FAIL upset had no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
