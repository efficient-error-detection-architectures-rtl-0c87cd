// Parallel schoolbook polynomial multiplier for SABER with RENO error detection.
// Computes acc(x) = s(x) * a(x) in Z_q[x]/(x^N + 1), q = 2^EQ_W.
// s(x), the small secret (4-bit sign-magnitude coefficients, 16 per 64-bit
// word), is read from data memory once and kept in a shift register, so all N
// coefficients are visible at once. a(x) is read one coefficient per cycle
// through the coefficient selector (4 coefficients per 64-bit word). Each cycle
// the N MAC cores add s(x) * a[i] into the accumulators, and s(x) is multiplied
// by x: a negacyclic shift that moves coefficient j to j+1 and returns the last
// one to position 0 with its sign bit flipped.
// Error detection (recomputing with negated operands): run1 is the Norm
// multiplication; run2 repeats it with -a[i] (negated by the selector) and
// -s(x). -s(x) costs nothing: after the N shifts of run1 every coefficient has
// wrapped once, so the shift register holds s(x) * x^N = -s(x). The product of
// the negated operands equals that of run1; run1's result is kept in a shadow
// bank and the comparator raises err on any difference. After run2 the shift
// register holds s(x) again.
// fi_and / fi_or force stuck-at-0 / stuck-at-1 bits onto the a operand after
// the Norm/RENO multiplexer; tie them to all ones / all zeros in normal use.
// They serve fault-injection campaigns.
// Timing: start (one cycle, while idle) -> N/16 + 1 cycles of secret load ->
// run1 of N + 1 cycles -> run2 of N + 1 cycles -> one compare cycle -> done
// for one cycle with
// result (run1) and err valid; they stay valid until the next start. Both
// memory ports have one cycle of read latency; s_rd_en / a_rd_en show which
// one is in use (never both), so they can share one memory read port.
// Follows the published design: secret in a shift register, one coefficient
// of a(x) per cycle, N parallel MACs, sign flip on wrap-around, two runs and a
// comparator. Own choices: forming -s(x) from the wrap-around, the shadow bank,
// the memory interface and the fault-injection hook.
module saber_polymul_reno
  import saber_pkg::*;
#(
  parameter int unsigned N_COEF = N,
  parameter int unsigned EQ_W   = EQ
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  output logic                        err,
  output logic [EQ_W-1:0]             result [N_COEF],
  // secret polynomial memory port
  output logic                        s_rd_en,
  output logic [$clog2(N_COEF/16)-1:0] s_rd_addr,
  input  logic [WORD_W-1:0]           s_rd_data,
  // public polynomial memory port
  output logic                        a_rd_en,
  output logic [$clog2(N_COEF/4)-1:0] a_rd_addr,
  input  logic [WORD_W-1:0]           a_rd_data,
  // stuck-at fault injection on the a operand
  input  logic [EQ_W-1:0]             fi_and,
  input  logic [EQ_W-1:0]             fi_or
);
  localparam int unsigned SWORDS = N_COEF / 16;
  localparam int unsigned CW     = $clog2(N_COEF + 2);

  typedef enum logic [1:0] {IDLE, LOAD, RUN, CMP} state_t;
  state_t  state;
  rc_sel_t run;                 // NORM = run1, RECOMP = run2 (RENO)

  logic [CW-1:0] cnt;           // issue counter
  logic          pend;          // a memory word / s word in flight
  logic [CW-1:0] pend_idx;      // its coefficient or word index

  sm4_t            sreg   [N_COEF];
  logic [EQ_W-1:0] acc    [N_COEF];
  logic [EQ_W-1:0] acc_nx [N_COEF];
  logic [EQ_W-1:0] a_sel, a_op;

  assign busy = (state != IDLE);

  // the two ports are never read in the same cycle, so they may share one
  // memory read port
  assign s_rd_en   = (state == LOAD);
  assign a_rd_en   = (state == RUN);
  assign s_rd_addr = cnt[$clog2(SWORDS)-1:0];
  assign a_rd_addr = cnt[2 +: $clog2(N_COEF/4)];

  coef_selector #(.EQ_W(EQ_W)) u_sel (
    .word (a_rd_data),
    .idx  (pend_idx[1:0]),
    .sel  (run),
    .coef (a_sel)
  );
  assign a_op = (a_sel & fi_and) | fi_or;

  for (genvar g = 0; g < int'(N_COEF); g++) begin : g_mac
    saber_mac_core #(.EQ_W(EQ_W)) u_mac (
      .acc_in  (acc[g]),
      .a       (a_op),
      .s       (sreg[g]),
      .acc_out (acc_nx[g])
    );
  end

  logic mismatch;
  always_comb begin
    mismatch = 1'b0;
    for (int k = 0; k < int'(N_COEF); k++)
      if (acc[k] != result[k]) mismatch = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      run      <= NORM;
      cnt      <= '0;
      pend     <= 1'b0;
      pend_idx <= '0;
      done     <= 1'b0;
      err      <= 1'b0;
      for (int k = 0; k < int'(N_COEF); k++) begin
        sreg[k]   <= '0;
        acc[k]    <= '0;
        result[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= LOAD;
          cnt   <= '0;
          pend  <= 1'b0;
          err   <= 1'b0;
        end
        LOAD: begin
          if (pend)
            for (int k = 0; k < 16; k++)
              sreg[16*int'(pend_idx) + k] <= s_rd_data[4*k +: 4];
          pend     <= (int'(cnt) < int'(SWORDS));
          pend_idx <= cnt;
          cnt      <= cnt + 1'b1;
          if (int'(cnt) == int'(SWORDS)) begin
            state <= RUN;
            run   <= NORM;
            cnt   <= '0;
            pend  <= 1'b0;
            for (int k = 0; k < int'(N_COEF); k++) acc[k] <= '0;
          end
        end
        RUN: begin
          if (pend) begin
            for (int k = 0; k < int'(N_COEF); k++) acc[k] <= acc_nx[k];
            // s(x) <- s(x) * x mod (x^N + 1)
            for (int k = 1; k < int'(N_COEF); k++) sreg[k] <= sreg[k-1];
            sreg[0] <= '{sign: ~sreg[N_COEF-1].sign, mag: sreg[N_COEF-1].mag};
          end
          pend     <= (int'(cnt) < int'(N_COEF));
          pend_idx <= cnt;
          cnt      <= cnt + 1'b1;
          if (int'(cnt) == int'(N_COEF)) begin
            cnt  <= '0;
            pend <= 1'b0;
            if (run == NORM) begin
              // keep run1, start run2 on a fresh accumulator bank
              for (int k = 0; k < int'(N_COEF); k++) begin
                result[k] <= acc_nx[k];
                acc[k]    <= '0;
              end
              run <= RECOMP;
            end else begin
              state <= CMP;
            end
          end
        end
        CMP: begin
          // comparator: run2 against run1
          err   <= mismatch;
          done  <= 1'b1;
          run   <= NORM;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
