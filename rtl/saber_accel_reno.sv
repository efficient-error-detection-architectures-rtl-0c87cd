// Matrix-vector accelerator of the SABER HW/SW co-design, with RENO error
// detection. For one row i of the matrix A it computes
//   b'_i = ( sum_{j<L} A_ij(x) * s_j(x) + h ) mod q,  in Z_q[x]/(x^N + 1),
// with q = 2^EQ_W and h the constant polynomial with all coefficients H_CONST.
// Software produces the row of A (SHAKE-128) and the sign-extended secret
// vector s' in memory; both are read as EQ_W-bit two's complement coefficients,
// four per 64-bit word (coefficient k of a word in bits 16k+EQ_W-1:16k), at
// word address j*N/4 + w. For each j, s_j is loaded into a shift register and
// A_ij streams in one coefficient per cycle; N MAC cores add s_j(x) * A_ij[c]
// into the temporary-result registers while s_j(x) is shifted negacyclically.
// Error detection: every product A_ij * s_j is done twice. The Norm pass feeds
// the MACs as they are; the RENO pass reloads s_j and subtracts both MAC inputs
// from q (modular negation), which leaves every product unchanged. Each pass
// accumulates into its own bank of temporary registers; at the end of the row
// the comparator checks the two banks and raises err. The buses stay EQ_W bits.
// fi_and / fi_or force stuck-at-0 / stuck-at-1 bits on the A operand after the
// Norm/RENO multiplexer (fault-injection hook; all ones / all zeros in use).
// Timing: start while idle; per j and pass N/4 + 1 load cycles and N + 1 MAC
// cycles; then one compare cycle and done for one cycle; result (Norm bank) and
// err stay valid until the next start. Memory reads have one cycle of latency.
// Follows the published scheme: one row of A at a time, RENO by subtracting
// both 13-bit MAC inputs from q, temporary-result registers, comparator. Own
// choices: N parallel MACs, two result banks, reloading s_j for the RENO pass
// and the memory layout.
module saber_accel_reno
  import saber_pkg::*;
#(
  parameter int unsigned N_COEF = N,
  parameter int unsigned L      = 3,
  parameter int unsigned EQ_W   = EQ
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output logic                            err,
  output logic [EQ_W-1:0]                 result [N_COEF],
  output logic [$clog2(L*N_COEF/4)-1:0]   s_rd_addr,
  input  logic [WORD_W-1:0]               s_rd_data,
  output logic [$clog2(L*N_COEF/4)-1:0]   a_rd_addr,
  input  logic [WORD_W-1:0]               a_rd_data,
  input  logic [EQ_W-1:0]                 fi_and,
  input  logic [EQ_W-1:0]                 fi_or
);
  localparam int unsigned WPP = N_COEF / 4;              // words per polynomial
  localparam int unsigned AW  = $clog2(L * N_COEF / 4);
  localparam int unsigned CW  = $clog2(N_COEF + 2);
  localparam int unsigned JW  = (L > 1) ? $clog2(L) : 1;

  typedef enum logic [1:0] {IDLE, LOAD, RUN, CMP} state_t;
  state_t  state;
  rc_sel_t pass;
  logic [JW-1:0] j;
  logic [CW-1:0] cnt;
  logic          pend;
  logic [CW-1:0] pend_idx;

  logic [EQ_W-1:0] sreg   [N_COEF];
  logic [EQ_W-1:0] s_op   [N_COEF];
  logic [EQ_W-1:0] bank_n [N_COEF];   // Norm temporary results
  logic [EQ_W-1:0] bank_r [N_COEF];   // RENO temporary results
  logic [EQ_W-1:0] mac_in [N_COEF];
  logic [EQ_W-1:0] mac_out[N_COEF];
  logic [EQ_W-1:0] a_sel, a_op;

  assign busy = (state != IDLE);
  assign s_rd_addr = AW'(int'(j) * int'(WPP) + int'(cnt));
  assign a_rd_addr = AW'(int'(j) * int'(WPP) + (int'(cnt) >> 2));

  coef_selector #(.EQ_W(EQ_W)) u_sel (
    .word (a_rd_data),
    .idx  (pend_idx[1:0]),
    .sel  (pass),
    .coef (a_sel)
  );
  assign a_op = (a_sel & fi_and) | fi_or;

  for (genvar g = 0; g < int'(N_COEF); g++) begin : g_mac
    // Norm/RENO multiplexer on the secret input: q - s in the RENO pass
    assign s_op[g]    = (pass == RECOMP) ? (EQ_W'(0) - sreg[g]) : sreg[g];
    assign mac_in[g]  = (pass == RECOMP) ? bank_r[g] : bank_n[g];
    assign mac_out[g] = mac_in[g] + EQ_W'(s_op[g] * a_op);
  end

  logic mismatch;
  always_comb begin
    mismatch = 1'b0;
    for (int k = 0; k < int'(N_COEF); k++)
      if (bank_n[k] != bank_r[k]) mismatch = 1'b1;
    for (int k = 0; k < int'(N_COEF); k++) result[k] = bank_n[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      pass     <= NORM;
      j        <= '0;
      cnt      <= '0;
      pend     <= 1'b0;
      pend_idx <= '0;
      done     <= 1'b0;
      err      <= 1'b0;
      for (int k = 0; k < int'(N_COEF); k++) begin
        sreg[k]   <= '0;
        bank_n[k] <= '0;
        bank_r[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= LOAD;
          pass  <= NORM;
          j     <= '0;
          cnt   <= '0;
          pend  <= 1'b0;
          err   <= 1'b0;
          for (int k = 0; k < int'(N_COEF); k++) begin
            bank_n[k] <= EQ_W'(H_CONST);
            bank_r[k] <= EQ_W'(H_CONST);
          end
        end
        LOAD: begin
          if (pend)
            for (int k = 0; k < 4; k++)
              sreg[4*int'(pend_idx) + k] <= s_rd_data[16*k +: EQ_W];
          pend     <= (int'(cnt) < int'(WPP));
          pend_idx <= cnt;
          cnt      <= cnt + 1'b1;
          if (int'(cnt) == int'(WPP)) begin
            state <= RUN;
            cnt   <= '0;
            pend  <= 1'b0;
          end
        end
        RUN: begin
          if (pend) begin
            for (int k = 0; k < int'(N_COEF); k++)
              if (pass == RECOMP) bank_r[k] <= mac_out[k];
              else                bank_n[k] <= mac_out[k];
            for (int k = 1; k < int'(N_COEF); k++) sreg[k] <= sreg[k-1];
            sreg[0] <= EQ_W'(0) - sreg[N_COEF-1];
          end
          pend     <= (int'(cnt) < int'(N_COEF));
          pend_idx <= cnt;
          cnt      <= cnt + 1'b1;
          if (int'(cnt) == int'(N_COEF)) begin
            cnt   <= '0;
            pend  <= 1'b0;
            state <= LOAD;
            if (pass == NORM) begin
              pass <= RECOMP;
            end else begin
              pass <= NORM;
              if (int'(j) == int'(L) - 1) state <= CMP;
              else                        j <= j + 1'b1;
            end
          end
        end
        CMP: begin
          err   <= mismatch;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
