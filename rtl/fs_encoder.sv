// fs_encoder: fault-secure encoder unit (encoder plus encoder-detector).
//
// On start the information vector is captured and encoded, and the codeword
// is registered. In the following cycle the encoder-detector checks the
// registered codeword. If it is a valid codeword, done is raised. If not,
// redo_en is raised and the encoding is done again from the captured data,
// which clears a transient fault in the encoder. After MAX_REDO redos that
// still fail, done is raised together with fail.
//
// Interface: start/data in (accepted while not busy), done/cw/fail out, done
// held for exactly one cycle; redo_en is high for each cycle that triggers a
// redo. upset is a fault-injection input XORed into the encoder result on the
// cycle it is captured (0 in normal use).
// Timing: done one cycle after start without faults, one more cycle per redo.
// The detect-and-redo loop is the design's; the redo limit and cycle timing are
// this implementation's.
module fs_encoder
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned MAX_REDO = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  data_t     data,
  input  codeword_t upset,
  output logic      busy,
  output logic      done,
  output codeword_t cw,
  output logic      redo_en,
  output logic      fail
);

  typedef enum logic {ENC_IDLE, ENC_CHECK} enc_state_t;

  enc_state_t  state;
  data_t       data_q;
  codeword_t   cw_q;
  codeword_t   enc_cw;
  codeword_t   syndrome;
  logic        det_err;
  logic [$clog2(MAX_REDO + 1)-1:0] redo_cnt;
  logic        limit;

  eg_ldpc_encoder u_enc (
    .data (state == ENC_IDLE ? data : data_q),
    .cw   (enc_cw)
  );

  eg_ldpc_detector u_enc_det (
    .cw       (cw_q),
    .syndrome (syndrome),
    .err      (det_err)
  );

  always_comb begin
    limit   = (redo_cnt == ($bits(redo_cnt))'(MAX_REDO));
    busy    = (state == ENC_CHECK);
    redo_en = busy && det_err && !limit;
    done    = busy && (!det_err || limit);
    fail    = busy && det_err && limit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ENC_IDLE;
      data_q   <= '0;
      cw_q     <= '0;
      redo_cnt <= '0;
    end else begin
      unique case (state)
        ENC_IDLE: if (start) begin
          data_q   <= data;
          cw_q     <= enc_cw ^ upset;
          redo_cnt <= '0;
          state    <= ENC_CHECK;
        end
        ENC_CHECK: begin
          if (redo_en) begin
            cw_q     <= enc_cw ^ upset;
            redo_cnt <= redo_cnt + 1'b1;
          end else begin
            state <= ENC_IDLE;
          end
        end
        default: state <= ENC_IDLE;
      endcase
    end
  end

  assign cw = cw_q;

endmodule
