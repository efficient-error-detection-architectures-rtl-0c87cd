// Falcon ffSampling line 13, first step: out1 = t1 - z1, with RENO error
// detection (recomputing with negated operands).
// One subtractor is used twice. In the Norm cycle it computes t1 - z1. In the
// RENO cycle both operands are negated and fed as (-z1) - (-t1), which again
// equals t1 - z1, so no decoding is needed. The Norm result is registered and
// the comparator checks it against the RENO result. Values are complex
// fixed-point numbers (see falcon_pkg); two's complement wrap-around keeps the
// identity exact for every input.
// Timing: start while idle latches t1 and z1; the Norm cycle and the RENO
// cycle follow, then done is high for one cycle with out and err valid; they
// hold until the next start.
// The scheme follows the published one; the fixed-point format and the
// operand order of the RENO cycle are this design's own choices.
module falcon_reno_sub
  import saber_pkg::*;
  import falcon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // operands are taken while idle
  output logic busy,
  output logic done,       // one cycle, two cycles after start
  output logic err,        // comparator: Norm and recomputed results differ
  input  cfx_t t1,
  input  cfx_t z1,
  output cfx_t out
);
  // Norm / recomputation sequencing
  typedef enum logic [1:0] {IDLE, S_NORM, S_RC} state_t;
  state_t  state;
  rc_sel_t sel;
  cfx_t t1_q, z1_q;
  cfx_t norm_q, dp_out;
  cfx_t p, q;

  // Norm/RENO multiplexer and subtractor
  always_comb begin
    if (sel == RECOMP) begin
      p.re = -z1_q.re;  p.im = -z1_q.im;
      q.re = -t1_q.re;  q.im = -t1_q.im;
    end else begin
      p = t1_q;
      q = z1_q;
    end
    dp_out.re = p.re - q.re;
    dp_out.im = p.im - q.im;
  end
  assign out = norm_q;

  // control: Norm cycle, then recomputation cycle, then result
  assign sel  = (state == S_RC) ? RECOMP : NORM;
  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      done     <= 1'b0;
      err      <= 1'b0;
      norm_q   <= '0;
      t1_q <= '0;
      z1_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          t1_q <= t1;
          z1_q <= z1;
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
