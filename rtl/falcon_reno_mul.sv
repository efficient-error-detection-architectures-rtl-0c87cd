// Falcon ffSampling line 13, product step: L10 (.) out1, with RENO error
// detection (recomputing with negated operands).
// In the Norm cycle the complex multiplier computes L10 (.) out1; in the RENO
// cycle it gets -L10 and -out1, whose product is the same, so no decoding is
// needed. Operands are widened before negation so that even the most negative
// fixed-point value negates exactly. The comparator checks the two full-width
// products; the Norm product is rescaled to the fixed-point format.
// Timing: start while idle latches the operands; Norm and RENO cycles follow,
// then done is high for one cycle with out and err valid until the next start.
// The scheme follows the published one; the fixed-point format and the
// widening before negation are this design's own choices.
module falcon_reno_mul
  import saber_pkg::*;
  import falcon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // operands are taken while idle
  output logic busy,
  output logic done,       // one cycle, two cycles after start
  output logic err,        // comparator: Norm and recomputed results differ
  input  cfx_t l10,
  input  cfx_t out1,
  output cfx_t out
);
  // Norm / recomputation sequencing
  typedef enum logic [1:0] {IDLE, S_NORM, S_RC} state_t;
  state_t  state;
  rc_sel_t sel;
  cfx_t   l10_q, out1_q;
  cwide_t norm_q, dp_out;
  cwide_t pa, pb;

  always_comb begin
    pa = (sel == RECOMP) ? cneg(cwiden(l10_q))  : cwiden(l10_q);
    pb = (sel == RECOMP) ? cneg(cwiden(out1_q)) : cwiden(out1_q);
    dp_out = cmul(pa, pb);
  end
  assign out = cscale_down(norm_q);

  // control: Norm cycle, then recomputation cycle, then result
  assign sel  = (state == S_RC) ? RECOMP : NORM;
  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      done     <= 1'b0;
      err      <= 1'b0;
      norm_q   <= '0;
      l10_q <= '0;
      out1_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          l10_q <= l10;
          out1_q <= out1;
          state <= S_NORM;
        end
        S_NORM: begin
          norm_q <= dp_out;
          state  <= S_RC;
        end
        S_RC: begin
          err   <= (dp_out != norm_q);   // comparator
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
