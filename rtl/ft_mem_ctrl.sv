// ft_mem_ctrl: control logic of the fault-tolerant memory system.
//
// It accepts one request at a time and sequences the units around the memory:
//  - write: start the fault-secure encoder, wait until it delivers a codeword
//    that passed the encoder-detector, store it, and acknowledge;
//  - read: read the codeword, hand it to the fault-secure corrector, return
//    the 7 information bits of its result to the outside and, when the
//    corrector had to correct the word, write the corrected codeword back to
//    the same address (on-run scrubbing).
//
// Interface: req_valid/req_ready handshake with req_wr, req_addr and
// req_data; one-cycle rsp_valid with rsp_data (reads) and rsp_err (a word
// that could not be corrected, or an encoder that kept failing: nothing is
// written then). scrub_we marks a write-back.
// Timing: a request is accepted when req_ready is high; a write is
// acknowledged 1 cycle later (plus one per encoder redo); a read answers 2
// cycles later for a clean word and 19 cycles later for a corrected one.
// The write/read/scrub sequence is the design's; the handshake and the cycle
// timing are this implementation's.
module ft_mem_ctrl
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // request / response
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_wr,
  input  logic [AW-1:0] req_addr,
  input  data_t         req_data,
  output logic          rsp_valid,
  output data_t         rsp_data,
  output logic          rsp_err,
  output logic          scrub_we,
  // fault-secure encoder
  output logic          enc_start,
  output data_t         enc_data,
  input  logic          enc_done,
  input  codeword_t     enc_cw,
  input  logic          enc_fail,
  // fault-secure corrector
  output logic          cor_start,
  input  logic          cor_done,
  input  codeword_t     cor_cw,
  input  logic          cor_corrected,
  input  logic          cor_fail,
  // memory
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output codeword_t     mem_wdata,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr
);

  typedef enum logic [1:0] {CTL_IDLE, CTL_ENC, CTL_READ, CTL_COR} ctl_state_t;

  ctl_state_t    state;
  logic [AW-1:0] addr_q;

  always_comb begin
    req_ready = (state == CTL_IDLE);
    enc_start = req_ready && req_valid && req_wr;
    enc_data  = req_data;
    mem_re    = req_ready && req_valid && !req_wr;
    mem_raddr = req_addr;
    cor_start = (state == CTL_READ);

    rsp_valid = 1'b0;
    rsp_data  = '0;
    rsp_err   = 1'b0;
    scrub_we  = 1'b0;
    mem_we    = 1'b0;
    mem_waddr = addr_q;
    mem_wdata = '0;
    if (state == CTL_ENC && enc_done) begin
      rsp_valid = 1'b1;
      rsp_err   = enc_fail;
      mem_we    = !enc_fail;
      mem_wdata = enc_cw;
    end
    if (state == CTL_COR && cor_done) begin
      rsp_valid = 1'b1;
      rsp_data  = cor_cw[N-1 -: K];
      rsp_err   = cor_fail;
      scrub_we  = cor_corrected && !cor_fail;
      mem_we    = scrub_we;
      mem_wdata = cor_cw;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= CTL_IDLE;
      addr_q <= '0;
    end else begin
      unique case (state)
        CTL_IDLE: if (req_valid) begin
          addr_q <= req_addr;
          state  <= req_wr ? CTL_ENC : CTL_READ;
        end
        CTL_ENC:  if (enc_done) state <= CTL_IDLE;
        CTL_READ: state <= CTL_COR;
        CTL_COR:  if (cor_done) state <= CTL_IDLE;
        default:  state <= CTL_IDLE;
      endcase
    end
  end

  // a unit's done may only come while the controller waits for it
  a_enc_done_expected: assert property (@(posedge clk) disable iff (!rst_n)
    enc_done |-> state == CTL_ENC);
  a_cor_done_expected: assert property (@(posedge clk) disable iff (!rst_n)
    cor_done |-> state == CTL_COR);
  // a request is held until accepted
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid);

endmodule
