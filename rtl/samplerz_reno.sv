// Constant-time Gaussian sampler (SamplerZ), line 4: z = (2b - 1) * z0 + b,
// with RENO error detection.
// z0 is the non-negative base sample and b a uniform bit; the result is a
// signed integer. In the Norm cycle the multiplier gets (2b - 1) and z0; in the
// RENO cycle it gets -(2b - 1) and -z0, whose product is the same, and b is
// added in both cycles, so no decoding is needed. The comparator checks the
// two results. The base sampler and the Bernoulli rejection step are outside.
// Timing: start while idle latches z0 and b; Norm and RENO cycles follow, then
// done is high for one cycle with z and err valid until the next start.
// The scheme follows the published one; the operand widths are this
// design's own choice.
module samplerz_reno
  import saber_pkg::*;
#(
  parameter int unsigned Z0_W = 5      // base sample width, values 0..18
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // operands are taken while idle
  output logic busy,
  output logic done,       // one cycle, two cycles after start
  output logic err,        // comparator: Norm and recomputed results differ
  input  logic [Z0_W-1:0]        z0,
  input  logic                   b,
  output logic signed [Z0_W+1:0] z
);
  // Norm / recomputation sequencing
  typedef enum logic [1:0] {IDLE, S_NORM, S_RC} state_t;
  state_t  state;
  rc_sel_t sel;
  logic [Z0_W-1:0]        z0_q;
  logic                   b_q;
  logic signed [Z0_W+1:0] norm_q, dp_out;
  logic signed [1:0]      m;           // 2b - 1, i.e. -1 or +1
  logic signed [1:0]      op_m;
  logic signed [Z0_W+1:0] op_z;

  always_comb begin
    m      = b_q ? 2'sd1 : -2'sd1;
    op_m   = (sel == RECOMP) ? -m : m;
    op_z   = (sel == RECOMP) ? -$signed({2'b00, z0_q}) : $signed({2'b00, z0_q});
    dp_out = (Z0_W+2)'(op_m * op_z) + $signed({{(Z0_W+1){1'b0}}, b_q});
  end
  assign z = norm_q;

  // control: Norm cycle, then recomputation cycle, then result
  assign sel  = (state == S_RC) ? RECOMP : NORM;
  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      done     <= 1'b0;
      err      <= 1'b0;
      norm_q   <= '0;
      z0_q <= '0;
      b_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          z0_q <= z0;
          b_q <= b;
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
