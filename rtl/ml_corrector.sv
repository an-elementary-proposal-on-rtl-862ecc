// ml_corrector: serial one-step majority-logic corrector for the (15,7)
// EG-LDPC code.
//
// On start the word is loaded into a 15-bit circular shift register. In each
// of the next 15 cycles the 4 parity checks orthogonal on the top bit (bit 14)
// are computed; if more than half of them (3 or 4) fail, that bit is flipped;
// then the register rotates left by one. Since the code is cyclic, the same 4
// checks serve every bit in turn, and after 15 steps the word is back in its
// original alignment with every bit voted once. Any pattern of up to two
// errors is corrected: an erroneous bit sees at least 3 failing checks, a
// correct bit at most 2.
//
// Interface: start loads cw_in (ignored while busy); done pulses for one cycle
// when cw_out holds the corrected word; cw_out then stays stable until the
// next start. upset is a fault-injection input: its bits are XORed into the
// shift register on any busy cycle (keep it 0 in normal use).
// Timing: done rises 16 cycles after the cycle in which start is high.
// One-step majority decoding done serially is the design's; the shift-register
// form and the fault-injection input are this implementation's.
module ml_corrector
  import eg_ldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  codeword_t cw_in,
  input  codeword_t upset,
  output logic      busy,
  output logic      done,
  output codeword_t cw_out
);

  codeword_t         sr;
  logic [3:0]        step_cnt;
  logic [GAMMA-1:0]  checks;
  logic [2:0]        votes;
  logic              flip;
  codeword_t         sr_next;

  always_comb begin
    votes = '0;
    for (int unsigned g = 0; g < GAMMA; g++) begin
      checks[g] = ^(sr & h_row(ORTH_ROT[g]));
      votes += 3'(checks[g]);
    end
    flip    = votes > 3'(GAMMA / 2);
    sr_next = rotl(sr ^ {flip, {(N-1){1'b0}}}, 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr       <= '0;
      step_cnt <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        sr       <= sr_next ^ upset;
        step_cnt <= step_cnt + 4'd1;
        if (step_cnt == 4'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        sr       <= cw_in;
        step_cnt <= '0;
        busy     <= 1'b1;
      end
    end
  end

  assign cw_out = sr;

endmodule
