// Falcon ffSampling line 13 as one multiply-accumulate, t0' = t0 + out1 (.) L10,
// with RENO error detection on the whole MAC.
// Norm cycle: the MAC computes L10 (.) out1 + t0. RENO cycle: L10 and t0 are
// negated at the MAC inputs, giving the encoded value -L10 (.) out1 - t0, and a
// decoding negation at the MAC output turns it back into t0'. The comparator
// checks the decoded value against the Norm result. The MAC works at full
// product precision (t0 is aligned to the product's scale), and the decoding
// negation comes before the rescaling, so truncation cannot make the two
// cycles differ.
// Timing: start while idle latches the operands; Norm and RENO cycles follow,
// then done is high for one cycle with out (t0') and err valid until the next
// start.
// The scheme follows the published one; the fixed-point format and decoding
// before rescaling are this design's own choices.
module falcon_reno_mac
  import saber_pkg::*;
  import falcon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // operands are taken while idle
  output logic busy,
  output logic done,       // one cycle, two cycles after start
  output logic err,        // comparator: Norm and recomputed results differ
  input  cfx_t t0,
  input  cfx_t out1,       // t1 - z1
  input  cfx_t l10,
  output cfx_t out
);
  // Norm / recomputation sequencing
  typedef enum logic [1:0] {IDLE, S_NORM, S_RC} state_t;
  state_t  state;
  rc_sel_t sel;
  cfx_t   t0_q, out1_q, l10_q;
  cwide_t norm_q, dp_out;
  cwide_t pa, acc_in, mac;

  always_comb begin
    pa     = (sel == RECOMP) ? cneg(cwiden(l10_q)) : cwiden(l10_q);
    acc_in = (sel == RECOMP) ? cneg(cscale_up(t0_q)) : cscale_up(t0_q);
    mac    = cadd(cmul(pa, cwiden(out1_q)), acc_in);
    dp_out = (sel == RECOMP) ? cneg(mac) : mac;        // decoding
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
      t0_q <= '0;
      out1_q <= '0;
      l10_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          t0_q <= t0;
          out1_q <= out1;
          l10_q <= l10;
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
