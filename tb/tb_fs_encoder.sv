// tb_fs_encoder: checks the fault-secure encoder.
// Without faults every data word is done one cycle after start with the
// right codeword and no redo. A transient fault on the first encoding must be
// caught by the encoder-detector (redo_en) and cleared by one redo, done one
// cycle later with the right codeword. A fault present on every attempt must
// end in fail after MAX_REDO redos.
module tb_fs_encoder;
  localparam int MAX_REDO = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] data = '0;
  logic [14:0] upset = '0, cw;
  logic busy, done, redo_en, fail;
  int checks = 0, failures = 0;

  fs_encoder #(.MAX_REDO(MAX_REDO)) dut (.*);

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

  // up_first: fault on the first encoding only; up_all: on every attempt
  task automatic run(logic [6:0] d, logic [14:0] up_first, logic [14:0] up_all,
                     int exp_lat, int exp_redo, logic exp_fail);
    int lat = 0, redos = 0;
    @(negedge clk);
    start = 1; data = d; upset = up_first | up_all;
    @(negedge clk);
    start = 0; data = ~d; upset = up_all;
    lat = 1;
    while (!done && lat < 50) begin
      if (redo_en) redos++;
      @(negedge clk);
      lat++;
    end
    checks += 4;
    if (lat != exp_lat)     begin failures++; $display("FAIL d=%h latency %0d exp %0d", d, lat, exp_lat); end
    if (redos != exp_redo)  begin failures++; $display("FAIL d=%h redos %0d exp %0d", d, redos, exp_redo); end
    if (fail !== exp_fail)  begin failures++; $display("FAIL d=%h fail=%b", d, fail); end
    if (!exp_fail && cw !== enc(d)) begin failures++; $display("FAIL d=%h cw=%h exp=%h", d, cw, enc(d)); end
    upset = '0;
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after done"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 128; d++) run(7'(d), '0, '0, 1, 0, 1'b0);
    // transient encoder faults of 1 to 4 bits
    for (int t = 0; t < 40; t++) begin
      logic [14:0] m = '0;
      while ($countones(m) < 1 + t % 4) m[$urandom % 15] = 1'b1;
      run(7'($urandom), m, '0, 2, 1, 1'b0);
    end
    // permanent fault
    run(7'h51, '0, 15'h0004, 1 + MAX_REDO, MAX_REDO, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
