// tb_ft_mem_ctrl: checks the control logic on its own.
// Small models stand in for the encoder and corrector units: each answers
// with done after a delay chosen by the test. The test checks that a write
// stores the encoder's codeword at the request address and is acknowledged,
// that a failed encoding stores nothing and reports an error, that a read
// strobes the memory, starts the corrector one cycle later and returns the
// information bits, that a corrected word is written back (scrub) and that a
// failed correction is reported and not written back.
module tb_ft_mem_ctrl;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_wr = 0;
  logic [2:0] req_addr = '0;
  logic [6:0] req_data = '0, rsp_data, enc_data;
  logic rsp_valid, rsp_err, scrub_we;
  logic enc_start, enc_done = 0, enc_fail = 0;
  logic [14:0] enc_cw = '0;
  logic cor_start, cor_done = 0, cor_corrected = 0, cor_fail = 0;
  logic [14:0] cor_cw = '0;
  logic mem_we, mem_re;
  logic [2:0] mem_waddr, mem_raddr;
  logic [14:0] mem_wdata;
  int checks = 0, failures = 0;

  ft_mem_ctrl #(.DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // write: the encoder model answers after enc_lat cycles
  task automatic do_write(logic [2:0] a, logic [6:0] d, logic [14:0] cw, int enc_lat, logic ef);
    @(negedge clk);
    chk(req_ready, "ready before write");
    req_valid = 1; req_wr = 1; req_addr = a; req_data = d;
    #1;
    chk(enc_start && enc_data == d && !mem_re, "encoder started");
    @(negedge clk);
    req_valid = 0; req_addr = ~a;
    for (int i = 1; i < enc_lat; i++) begin
      chk(!mem_we && !rsp_valid && !req_ready, "waiting for encoder");
      @(negedge clk);
    end
    enc_done = 1; enc_cw = cw; enc_fail = ef;
    #1;
    chk(rsp_valid && rsp_err == ef && !scrub_we, "write acknowledged");
    chk(mem_we == !ef && (ef || (mem_waddr == a && mem_wdata == cw)), "codeword stored");
    @(negedge clk);
    enc_done = 0; enc_fail = 0;
    chk(req_ready && !rsp_valid, "idle after write");
  endtask

  // read: the corrector model answers cor_lat cycles after its start
  task automatic do_read(logic [2:0] a, logic [14:0] cw, int cor_lat, logic corr, logic cf);
    @(negedge clk);
    req_valid = 1; req_wr = 0; req_addr = a;
    #1;
    chk(mem_re && mem_raddr == a && !enc_start, "memory read");
    @(negedge clk);
    req_valid = 0; req_addr = ~a;
    #1;
    chk(cor_start && !rsp_valid, "corrector started one cycle after the read");
    @(negedge clk);
    for (int i = 1; i < cor_lat; i++) begin
      chk(!cor_start && !mem_we && !rsp_valid, "waiting for corrector");
      @(negedge clk);
    end
    cor_done = 1; cor_cw = cw; cor_corrected = corr; cor_fail = cf;
    #1;
    chk(rsp_valid && rsp_err == cf && (cf || rsp_data == cw[14:8]), "read response");
    chk(scrub_we == (corr && !cf) && mem_we == scrub_we, "scrub write-back");
    chk(!scrub_we || (mem_waddr == a && mem_wdata == cw), "scrub address and data");
    @(negedge clk);
    cor_done = 0; cor_corrected = 0; cor_fail = 0;
    chk(req_ready, "idle after read");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    do_write(3'd0, 7'h51, 15'h51FB, 1, 1'b0);
    do_write(3'd3, 7'h55, 15'h55A7, 3, 1'b0);
    do_write(3'd6, 7'h76, 15'h7650, 4, 1'b1);
    do_read(3'd0, 15'h51FB, 1, 1'b0, 1'b0);
    do_read(3'd3, 15'h55A7, 18, 1'b1, 1'b0);
    do_read(3'd7, 15'h2A58, 35, 1'b0, 1'b1);
    do_read(3'd5, 15'h637C, 2, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
