// codeword_memory: the memory unit that stores the 15-bit codewords.
//
// A plain array of DEPTH words with one synchronous write port and one
// registered read port (rdata is valid the cycle after re). A third port
// flips the bits of upset_mask in word upset_addr; it stands for transient
// errors in the memory cells and is how faults are put into stored words.
// When a write and an upset hit the same word in the same cycle, the upset
// is applied to the newly written data.
//
// The memory holding the encoded data set is the design's; the depth (8 words,
// room for the five-word data set), the port arrangement and the upset port
// are this implementation's choices. Contents are not reset.
module codeword_memory #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 15,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [W-1:0]  upset_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && upset_en && (waddr == upset_addr)) begin
      mem[waddr] <= wdata ^ upset_mask;
    end else begin
      if (we)       mem[waddr]      <= wdata;
      if (upset_en) mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    end
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
