// fs_corrector: fault-secure corrector unit (corrector-detectors plus the
// serial one-step majority-logic corrector).
//
// On start the word read from memory is captured. In the next cycle the
// corrector-detector checks it. A valid word is returned at once (done,
// corrected = 0). Otherwise cor_err is raised and the serial corrector is
// started on the captured word. When it finishes, a second detector checks
// its output. A valid result is returned with corrected = 1, which tells the
// control logic to write it back (on-run scrubbing). An invalid result means
// either a transient fault inside the corrector or more errors than the code
// corrects: cor_redo is raised and the correction is run again from the
// captured word, up to MAX_REDO times, after which done is raised with fail.
//
// Interface: start/cw_in in (accepted while not busy); done high for one
// cycle with cw_out, corrected and fail valid. upset is forwarded to the
// serial corrector as a fault-injection input (0 in normal use).
// Timing: a clean word is done 1 cycle after start; a corrected word 18 cycles
// after start, plus 17 per redo.
// Detecting, then correcting serially, is the design's; checking the corrector
// output and redoing on a failed check are this implementation's completion of
// the protected corrector the design describes.
module fs_corrector
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned MAX_REDO = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  codeword_t cw_in,
  input  codeword_t upset,
  output logic      busy,
  output logic      done,
  output codeword_t cw_out,
  output logic      corrected,
  output logic      fail,
  output logic      cor_err,
  output logic      cor_redo
);

  typedef enum logic [1:0] {COR_IDLE, COR_CHECK, COR_RUN, COR_VERIFY} cor_state_t;

  cor_state_t state;
  codeword_t  word_q;
  codeword_t  ml_out;
  codeword_t  syn_in, syn_out;
  logic       err_in, err_out;
  logic       ml_start, ml_busy, ml_done;
  logic       limit;
  logic [$clog2(MAX_REDO + 1)-1:0] redo_cnt;

  // corrector-detector on the word read from memory
  eg_ldpc_detector u_det_in (
    .cw       (word_q),
    .syndrome (syn_in),
    .err      (err_in)
  );

  ml_corrector u_ml (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (ml_start),
    .cw_in  (word_q),
    .upset  (upset),
    .busy   (ml_busy),
    .done   (ml_done),
    .cw_out (ml_out)
  );

  // detector on the corrector output
  eg_ldpc_detector u_det_out (
    .cw       (ml_out),
    .syndrome (syn_out),
    .err      (err_out)
  );

  always_comb begin
    limit     = (redo_cnt == ($bits(redo_cnt))'(MAX_REDO));
    busy      = (state != COR_IDLE);
    cor_err   = (state == COR_CHECK) && err_in;
    cor_redo  = (state == COR_VERIFY) && err_out && !limit;
    ml_start  = cor_err || cor_redo;
    done      = ((state == COR_CHECK) && !err_in) ||
                ((state == COR_VERIFY) && (!err_out || limit));
    fail      = (state == COR_VERIFY) && err_out && limit;
    corrected = (state == COR_VERIFY) && !err_out;
    cw_out    = (state == COR_CHECK) ? word_q : ml_out;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= COR_IDLE;
      word_q   <= '0;
      redo_cnt <= '0;
    end else begin
      unique case (state)
        COR_IDLE: if (start) begin
          word_q   <= cw_in;
          redo_cnt <= '0;
          state    <= COR_CHECK;
        end
        COR_CHECK:  state <= err_in ? COR_RUN : COR_IDLE;
        COR_RUN:    if (ml_done) state <= COR_VERIFY;
        COR_VERIFY: begin
          if (cor_redo) begin
            redo_cnt <= redo_cnt + 1'b1;
            state    <= COR_RUN;
          end else begin
            state <= COR_IDLE;
          end
        end
        default: state <= COR_IDLE;
      endcase
    end
  end

endmodule
