// Falcon ffSampling line 13 in full, t0' = t0 + (t1 - z1) (.) L10, with RENO
// on the operands of the whole step (t0, t1 and z1 negated).
// Norm cycle: subtractor t1 - z1, then the MAC adds the product with L10 to t0.
// RENO cycle: t0, t1 and z1 enter negated, so the subtractor gives -(t1 - z1)
// and the MAC gives the encoded value -t0'; a decoding negation at the output
// turns it back into t0'. The comparator checks it against the Norm result.
// Arithmetic is at full product precision, and decoding precedes rescaling.
// Timing: start while idle latches the operands; Norm and RENO cycles follow,
// then done is high for one cycle with out (t0') and err valid until the next
// start.
// The scheme follows the published one; the fixed-point format and decoding
// before rescaling are this design's own choices.
module falcon_reno_ffs
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
  input  cfx_t t1,
  input  cfx_t z1,
  input  cfx_t l10,
  output cfx_t out
);
  // Norm / recomputation sequencing
  typedef enum logic [1:0] {IDLE, S_NORM, S_RC} state_t;
  state_t  state;
  rc_sel_t sel;
  cfx_t   t0_q, t1_q, z1_q, l10_q;
  cwide_t norm_q, dp_out;
  cwide_t e_t0, e_t1, e_z1, diff, mac;

  always_comb begin
    e_t0   = (sel == RECOMP) ? cneg(cscale_up(t0_q)) : cscale_up(t0_q);
    e_t1   = (sel == RECOMP) ? cneg(cwiden(t1_q))    : cwiden(t1_q);
    e_z1   = (sel == RECOMP) ? cneg(cwiden(z1_q))    : cwiden(z1_q);
    diff   = csub(e_t1, e_z1);
    mac    = cadd(cmul(diff, cwiden(l10_q)), e_t0);
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
      t1_q <= '0;
      z1_q <= '0;
      l10_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          t0_q <= t0;
          t1_q <= t1;
          z1_q <= z1;
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
