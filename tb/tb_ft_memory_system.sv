// tb_ft_memory_system: end-to-end test of the fault-tolerant memory system at
// its default size (8 words, up to 3 redos).
//
// 1. The five-word reference data set (0x51, 0x55, 0x76, 0x2A, 0x63) and three
//    more words are written; the stored words must be the published codewords
//    (0x51FB, 0x55A7, 0x7650, 0x2A58, 0x637C) and read back clean in 2 cycles.
// 2. Double errors are put into the words at addresses 0 and 2: the reads
//    must return the right data after correction (19 cycles) and write the
//    corrected codeword back (scrubbing), so a second read is clean.
// 3. A transient triple fault in the encoder must be redone (redo_en) and the
//    right codeword stored; a transient fault in the corrector must be caught
//    by the output check and the correction redone.
// 4. Faults that persist in the encoder or the corrector must end in rsp_err
//    without overwriting memory.
// 5. A random mix of writes, reads and 1-2 bit memory upsets is compared with
//    a shadow model.
// Every mechanism (redo, correction, scrub, corrector redo, both failures)
// must have happened at least once.
module tb_ft_memory_system;
  localparam int DEPTH = 8;
  localparam int MAX_REDO = 3;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_wr = 0;
  logic [2:0] req_addr = '0;
  logic [6:0] req_data = '0, rsp_data;
  logic rsp_valid, rsp_err, redo_en, cor_err, cor_redo, scrub_we;
  logic [14:0] enc_upset = '0, cor_upset = '0;
  logic mem_upset_en = 0;
  logic [2:0] mem_upset_addr = '0;
  logic [14:0] mem_upset_mask = '0;

  int checks = 0, failures = 0;
  int n_redo = 0, n_cor = 0, n_scrub = 0, n_cor_redo = 0, n_enc_fail = 0, n_cor_fail = 0;
  logic [6:0]  shadow [DEPTH];
  logic [14:0] pend_err [DEPTH];   // bits currently flipped in each stored word

  ft_memory_system dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (redo_en)  n_redo++;
    if (cor_err)  n_cor++;
    if (cor_redo) n_cor_redo++;
    if (scrub_we) n_scrub++;
    if (rsp_valid && rsp_err && dut.u_ctrl.state == dut.u_ctrl.CTL_ENC) n_enc_fail++;
    if (rsp_valid && rsp_err && dut.u_ctrl.state == dut.u_ctrl.CTL_COR) n_cor_fail++;
  end

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

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // issue one request; upsets are applied on the given cycles after acceptance
  // (enc_up on cycle 0 and, if enc_every, on every cycle; cor_up on cycles
  // cor_first, cor_first + 17, ... when cor_every)
  task automatic request(logic wr, logic [2:0] a, logic [6:0] d,
                         logic [14:0] enc_up, logic enc_every,
                         logic [14:0] cor_up, int cor_first, logic cor_every,
                         output int lat, output logic [6:0] q, output logic err);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_wr = wr; req_addr = a; req_data = d;
    enc_upset = enc_up;
    lat = 0;
    @(negedge clk);
    req_valid = 0; req_data = ~d;
    lat = 1;
    while (!rsp_valid && lat < 200) begin
      enc_upset = enc_every ? enc_up : '0;
      cor_upset = (cor_first > 0 && (lat == cor_first ||
                   (cor_every && lat > cor_first && (lat - cor_first) % 17 == 0))) ? cor_up : '0;
      #1;
      if (rsp_valid) break;
      @(negedge clk);
      lat++;
    end
    q = rsp_data; err = rsp_err;
    enc_upset = '0; cor_upset = '0;
  endtask

  task automatic write_word(logic [2:0] a, logic [6:0] d);
    int lat; logic [6:0] q; logic err;
    request(1'b1, a, d, '0, 1'b0, '0, 0, 1'b0, lat, q, err);
    chk(lat == 1 && !err, "write latency 1, no error");
    shadow[a] = d; pend_err[a] = '0;
  endtask

  task automatic upset_word(logic [2:0] a, logic [14:0] m);
    @(negedge clk);
    mem_upset_en = 1; mem_upset_addr = a; mem_upset_mask = m;
    @(negedge clk);
    mem_upset_en = 0;
    pend_err[a] ^= m;
  endtask

  // read and compare; a word with errors must be corrected and scrubbed
  task automatic read_word(logic [2:0] a);
    int lat; logic [6:0] q; logic err;
    logic dirty = (pend_err[a] != '0);
    request(1'b0, a, '0, '0, 1'b0, '0, 0, 1'b0, lat, q, err);
    chk(q == shadow[a] && !err, "read data");
    chk(lat == (dirty ? 19 : 2), "read latency");
    chk(scrub_we == dirty, "scrub only for a corrected word");
    @(negedge clk);
    chk(dut.u_memory.mem[a] == enc(shadow[a]), "memory holds a clean codeword after the read");
    pend_err[a] = '0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0]  dset [5] = '{7'h51, 7'h55, 7'h76, 7'h2A, 7'h63};
    logic [14:0] cset [5] = '{15'h51FB, 15'h55A7, 15'h7650, 15'h2A58, 15'h637C};
    int lat; logic [6:0] q; logic err;
    logic [14:0] m, old_word;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. data set
    for (int i = 0; i < 5; i++) write_word(3'(i), dset[i]);
    for (int i = 5; i < DEPTH; i++) write_word(3'(i), 7'($urandom));
    for (int i = 0; i < 5; i++) chk(dut.u_memory.mem[i] == cset[i], "stored codeword matches the data set");
    for (int i = 0; i < DEPTH; i++) read_word(3'(i));

    // 2. double errors at locations 0 and 2, scrubbed on read
    upset_word(3'd0, 15'h0810);
    upset_word(3'd2, 15'h4001);
    read_word(3'd0);
    read_word(3'd2);
    read_word(3'd0);
    read_word(3'd2);

    // 3a. transient triple fault in the encoder
    request(1'b1, 3'd4, 7'h2A, 15'h1090, 1'b0, '0, 0, 1'b0, lat, q, err);
    chk(lat == 2 && !err, "encoder redo costs one cycle");
    @(negedge clk);
    chk(dut.u_memory.mem[4] == 15'h2A58, "redone codeword stored");
    shadow[4] = 7'h2A;
    // 3b. transient double fault in the corrector (last step of the first pass)
    upset_word(3'd1, 15'h0003);
    request(1'b0, 3'd1, '0, '0, 1'b0, 15'h0101, 17, 1'b0, lat, q, err);
    chk(q == 7'h55 && !err && lat == 36, "corrector redo gives the right word");
    @(negedge clk);
    chk(dut.u_memory.mem[1] == 15'h55A7, "scrubbed after corrector redo");

    // 4a. encoder fault that persists: no write, error reported
    old_word = dut.u_memory.mem[3];
    request(1'b1, 3'd3, 7'h11, 15'h0040, 1'b1, '0, 0, 1'b0, lat, q, err);
    chk(err && lat == 1 + MAX_REDO, "persistent encoder fault reported");
    @(negedge clk);
    chk(dut.u_memory.mem[3] == old_word, "memory untouched after encoder failure");
    // 4b. corrector fault that persists: error reported, no write-back
    upset_word(3'd3, 15'h0600);
    old_word = dut.u_memory.mem[3];
    request(1'b0, 3'd3, '0, '0, 1'b0, 15'h0100, 17, 1'b1, lat, q, err);
    chk(err && lat == 19 + 17 * MAX_REDO, "persistent corrector fault reported");
    @(negedge clk);
    chk(dut.u_memory.mem[3] == old_word, "no write-back after corrector failure");
    read_word(3'd3);   // now clean corrector: corrected and scrubbed

    // 5. random traffic
    for (int t = 0; t < 300; t++) begin
      int a = $urandom % DEPTH;
      case ($urandom % 3)
        0: write_word(3'(a), 7'($urandom));
        1: begin
          m = '0;
          while ($countones(m) < 1 + $urandom % 2) m[$urandom % 15] = 1'b1;
          if ($countones(pend_err[a] ^ m) <= 2) upset_word(3'(a), m);
          read_word(3'(a));
        end
        default: read_word(3'(a));
      endcase
    end

    chk(n_redo > 0,     "encoder redo happened");
    chk(n_cor > 0,      "correction happened");
    chk(n_scrub > 0,    "scrubbing happened");
    chk(n_cor_redo > 0, "corrector redo happened");
    chk(n_enc_fail > 0, "encoder failure happened");
    chk(n_cor_fail > 0, "corrector failure happened");
    $display("mechanisms: redo=%0d correct=%0d scrub=%0d cor_redo=%0d enc_fail=%0d cor_fail=%0d",
             n_redo, n_cor, n_scrub, n_cor_redo, n_enc_fail, n_cor_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
