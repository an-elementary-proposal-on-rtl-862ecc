// tb_codeword_memory: checks the codeword memory.
// Writes random words to every address, reads them back one cycle after the
// read strobe, flips bits through the upset port, and checks a write and an
// upset to the same word in one cycle. A shadow array holds the expected data.
module tb_codeword_memory;
  localparam int DEPTH = 8;
  logic clk = 0;
  logic we = 0, re = 0, upset_en = 0;
  logic [2:0] waddr = '0, raddr = '0, upset_addr = '0;
  logic [14:0] wdata = '0, rdata, upset_mask = '0;
  logic [14:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  codeword_memory #(.DEPTH(DEPTH), .W(15)) dut (.*);

  always #5 clk = ~clk;

  task automatic read_check(int a);
    @(negedge clk);
    re = 1; raddr = 3'(a);
    @(negedge clk);
    re = 0;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL addr=%0d rdata=%h exp=%h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] m;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 3'(a); wdata = 15'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) read_check(a);
    // upsets
    for (int t = 0; t < 20; t++) begin
      int a = $urandom % DEPTH;
      m = 15'($urandom) | 15'(1);
      @(negedge clk);
      upset_en = 1; upset_addr = 3'(a); upset_mask = m; shadow[a] ^= m;
      @(negedge clk); upset_en = 0;
      read_check(a);
    end
    // write and upset of the same word together
    @(negedge clk);
    we = 1; waddr = 3'd5; wdata = 15'h51FB;
    upset_en = 1; upset_addr = 3'd5; upset_mask = 15'h0011;
    shadow[5] = 15'h51FB ^ 15'h0011;
    @(negedge clk); we = 0; upset_en = 0;
    read_check(5);
    // write and upset of different words together
    @(negedge clk);
    we = 1; waddr = 3'd1; wdata = 15'h7650; shadow[1] = 15'h7650;
    upset_en = 1; upset_addr = 3'd2; upset_mask = 15'h4001; shadow[2] ^= 15'h4001;
    @(negedge clk); we = 0; upset_en = 0;
    read_check(1);
    read_check(2);
    // rdata holds while re is low
    @(negedge clk); @(negedge clk);
    checks++;
    if (rdata !== shadow[2]) begin failures++; $display("FAIL rdata not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
