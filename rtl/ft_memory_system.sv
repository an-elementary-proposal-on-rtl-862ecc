// ft_memory_system: fault-tolerant memory with fault-tolerant encoder and
// corrector, protected by the (15,7) EG-LDPC code.
//
// Data path: a 7-bit information vector is encoded into a 15-bit codeword by
// the fault-secure encoder, which re-encodes whenever its encoder-detector
// sees an invalid codeword (redo_en). The checked codeword is stored in the
// codeword memory. On a read, the fault-secure corrector checks the stored
// word; a word with errors is corrected serially by one-step majority logic
// (up to two bit errors per word), the corrector output is checked again, the
// information bits are returned, and the corrected codeword is written back
// into the memory (on-run scrubbing, scrub_we).
//
// Interface: req_valid/req_ready handshake with req_wr (1 write, 0 read),
// req_addr and req_data; rsp_valid for one cycle with rsp_data and rsp_err.
// redo_en, cor_err, cor_redo and scrub_we report the protection mechanisms.
// enc_upset, cor_upset and the mem_upset_* port inject transient faults into
// the encoder, the corrector and the stored words; tie them to 0 in use.
// Timing: write acknowledged 1 cycle after acceptance (+1 per redo); read
// answered after 2 cycles for a clean word and 19 for a corrected one.
// The structure follows the design; the depth, redo limits, handshake and
// fault-injection ports are this implementation's choices.
module ft_memory_system
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned MAX_REDO = 3,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_wr,
  input  logic [AW-1:0] req_addr,
  input  data_t         req_data,
  output logic          rsp_valid,
  output data_t         rsp_data,
  output logic          rsp_err,
  output logic          redo_en,
  output logic          cor_err,
  output logic          cor_redo,
  output logic          scrub_we,
  input  codeword_t     enc_upset,
  input  codeword_t     cor_upset,
  input  logic          mem_upset_en,
  input  logic [AW-1:0] mem_upset_addr,
  input  codeword_t     mem_upset_mask
);

  logic          enc_start, enc_busy, enc_done, enc_fail;
  data_t         enc_data;
  codeword_t     enc_cw;
  logic          cor_start, cor_busy, cor_done, cor_corrected, cor_fail;
  codeword_t     cor_cw;
  logic          mem_we, mem_re;
  logic [AW-1:0] mem_waddr, mem_raddr;
  codeword_t     mem_wdata, mem_rdata;

  fs_encoder #(.MAX_REDO(MAX_REDO)) u_encoder (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (enc_start),
    .data    (enc_data),
    .upset   (enc_upset),
    .busy    (enc_busy),
    .done    (enc_done),
    .cw      (enc_cw),
    .redo_en (redo_en),
    .fail    (enc_fail)
  );

  codeword_memory #(.DEPTH(DEPTH), .W(N)) u_memory (
    .clk        (clk),
    .we         (mem_we),
    .waddr      (mem_waddr),
    .wdata      (mem_wdata),
    .re         (mem_re),
    .raddr      (mem_raddr),
    .rdata      (mem_rdata),
    .upset_en   (mem_upset_en),
    .upset_addr (mem_upset_addr),
    .upset_mask (mem_upset_mask)
  );

  fs_corrector #(.MAX_REDO(MAX_REDO)) u_corrector (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (cor_start),
    .cw_in     (mem_rdata),
    .upset     (cor_upset),
    .busy      (cor_busy),
    .done      (cor_done),
    .cw_out    (cor_cw),
    .corrected (cor_corrected),
    .fail      (cor_fail),
    .cor_err   (cor_err),
    .cor_redo  (cor_redo)
  );

  ft_mem_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (req_valid),
    .req_ready     (req_ready),
    .req_wr        (req_wr),
    .req_addr      (req_addr),
    .req_data      (req_data),
    .rsp_valid     (rsp_valid),
    .rsp_data      (rsp_data),
    .rsp_err       (rsp_err),
    .scrub_we      (scrub_we),
    .enc_start     (enc_start),
    .enc_data      (enc_data),
    .enc_done      (enc_done),
    .enc_cw        (enc_cw),
    .enc_fail      (enc_fail),
    .cor_start     (cor_start),
    .cor_done      (cor_done),
    .cor_cw        (cor_cw),
    .cor_corrected (cor_corrected),
    .cor_fail      (cor_fail),
    .mem_we        (mem_we),
    .mem_waddr     (mem_waddr),
    .mem_wdata     (mem_wdata),
    .mem_re        (mem_re),
    .mem_raddr     (mem_raddr)
  );

  // the units are only started when idle
  a_enc_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    enc_start |-> !enc_busy);
  a_cor_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cor_start |-> !cor_busy);

endmodule
