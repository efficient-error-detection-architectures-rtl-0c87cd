// ModFalcon signing, line 4 of the signature algorithm: the difference t - z
// that is then multiplied by the secret basis, with RENO error detection.
// K coefficients of the vectors t and z (fixed-point, see falcon_pkg) are
// handled in parallel lanes. In the Norm cycle each lane's subtractor computes
// t - z. In the RENO cycle both operands are negated and fed as (-z) - (-t),
// which equals t - z, so there is no decoding. The comparator checks all lanes
// of the two cycles. Longer vectors are processed K coefficients per start.
// Timing: start while idle latches t and z; Norm and RENO cycles follow, then
// done is high for one cycle with out and err valid until the next start.
// The scheme follows the published one; the lane count K and the
// fixed-point format are this design's own choices.
module modfalcon_reno_sub
  import saber_pkg::*;
  import falcon_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // operands are taken while idle
  output logic busy,
  output logic done,       // one cycle, two cycles after start
  output logic err,        // comparator: Norm and recomputed results differ
  input  fx_t t [K],
  input  fx_t z [K],
  output fx_t out [K]
);
  // Norm / recomputation sequencing
  typedef enum logic [1:0] {IDLE, S_NORM, S_RC} state_t;
  state_t  state;
  rc_sel_t sel;
  logic    mismatch;
  fx_t t_q [K];
  fx_t z_q [K];
  fx_t norm_q [K];
  fx_t dp_out [K];

  always_comb begin
    for (int k = 0; k < int'(K); k++)
      dp_out[k] = (sel == RECOMP) ? ((-z_q[k]) - (-t_q[k])) : (t_q[k] - z_q[k]);
  end
  assign out = norm_q;

  // control: Norm cycle, then RENO cycle, then result
  assign sel  = (state == S_RC) ? RECOMP : NORM;
  assign busy = (state != IDLE);

  always_comb begin
    mismatch = 1'b0;
    for (int k = 0; k < int'(K); k++)
      if (dp_out[k] != norm_q[k]) mismatch = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      err   <= 1'b0;
      for (int k = 0; k < int'(K); k++) begin
        t_q[k]    <= '0;
        z_q[k]    <= '0;
        norm_q[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          t_q   <= t;
          z_q   <= z;
          state <= S_NORM;
        end
        S_NORM: begin
          norm_q <= dp_out;
          state  <= S_RC;
        end
        S_RC: begin
          err   <= mismatch;   // comparator
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
