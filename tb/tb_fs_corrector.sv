// tb_fs_corrector: checks the fault-secure corrector.
// A clean codeword is done 1 cycle after start with corrected = 0 and no
// correction started. Words with one or two errors raise cor_err, are
// corrected and done 18 cycles after start with corrected = 1. A transient
// fault in the corrector during the first pass is caught by the output check
// (cor_redo) and the second pass gives the right word 17 cycles later. A fault
// on every pass ends in fail after MAX_REDO redos.
module tb_fs_corrector;
  localparam int MAX_REDO = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [14:0] cw_in = '0, upset = '0, cw_out;
  logic busy, done, corrected, fail, cor_err, cor_redo;
  int checks = 0, failures = 0;

  fs_corrector #(.MAX_REDO(MAX_REDO)) dut (.*);

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

  // up_cycles: cycles after start (counting from 1) at which upset is applied
  task automatic run(logic [14:0] w, logic [14:0] exp, logic [14:0] up, int up_every,
                     int up_first, int exp_lat, int exp_err, int exp_redo,
                     logic exp_corr, logic exp_fail);
    int lat = 0, errs = 0, redos = 0;
    @(negedge clk);
    start = 1; cw_in = w;
    @(negedge clk);
    start = 0; cw_in = '0;
    lat = 1;
    while (!done && lat < 200) begin
      if (cor_err) errs++;
      if (cor_redo) redos++;
      upset = (lat >= up_first && up_every > 0 && (lat - up_first) % up_every == 0) ? up : '0;
      @(negedge clk);
      lat++;
    end
    upset = '0;
    checks += 5;
    if (lat != exp_lat)          begin failures++; $display("FAIL w=%h latency %0d exp %0d", w, lat, exp_lat); end
    if (errs != exp_err || redos != exp_redo)
                                 begin failures++; $display("FAIL w=%h err %0d redo %0d", w, errs, redos); end
    if (corrected !== exp_corr)  begin failures++; $display("FAIL w=%h corrected=%b", w, corrected); end
    if (fail !== exp_fail)       begin failures++; $display("FAIL w=%h fail=%b", w, fail); end
    if (!exp_fail && cw_out !== exp) begin failures++; $display("FAIL w=%h out=%h exp=%h", w, cw_out, exp); end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after done"); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] c, e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      c = enc(7'($urandom));
      run(c, c, '0, 0, 0, 1, 0, 0, 1'b0, 1'b0);
      e = '0;
      while ($countones(e) < 1 + t % 2) e[$urandom % 15] = 1'b1;
      run(c ^ e, c, '0, 0, 0, 18, 1, 0, 1'b1, 1'b0);
    end
    // transient fault on the last step of the first pass (cycle 16)
    c = 15'h637C;
    run(c ^ 15'h0201, c, 15'h0010, 1000, 16, 35, 1, 1, 1'b1, 1'b0);
    // fault on the last step of every pass
    run(c ^ 15'h0201, c, 15'h0010, 17, 16, 18 + 17 * MAX_REDO, 1, MAX_REDO, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
