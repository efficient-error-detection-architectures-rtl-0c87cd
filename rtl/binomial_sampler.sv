// Centered binomial sampler for SABER secrets, with RESwO error detection.
// Two 64-bit pseudorandom words from data memory fill a 128-bit buffer (first
// word in the low half). From it 128/MU lanes (16 for SABER, MU = 8) compute
// the samples in parallel. Each buffer is evaluated twice with the same lanes:
// once in the Norm cycle and once in the RESwO cycle, where every lane's
// subtractor gets its operands swapped. The Norm result is held in the 64-bit
// output buffer (16 sign-magnitude samples of 4 bits, sample k in bits
// 4k+3:4k); the comparator checks it against the RESwO result and raises err.
// Timing: in_valid/in_ready handshake per word; after the second word the
// Norm cycle and the RESwO cycle follow, and out_valid is high with out_word
// and err for one cycle, two cycles after the second word was taken. Only
// MU = 8 fills the 64-bit output word exactly; other MU leave its top unused.
// Follows the published scheme: 128-bit buffer, 16 parallel lanes, 64-bit
// output buffer, Norm/RESwO cycles with a comparator. Own choices: the
// handshake, the reuse of one set of lanes for both cycles, and reset.
module binomial_sampler
  import saber_pkg::*;
#(
  parameter int unsigned MU = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [WORD_W-1:0]   in_word,
  output logic                out_valid,
  output logic [WORD_W-1:0]   out_word,
  output logic                err
);
  localparam int unsigned BUF_W = 2 * WORD_W;
  localparam int unsigned LANES = BUF_W / MU;

  typedef enum logic [1:0] {LOAD0, LOAD1, S_NORM, S_RESWO} state_t;
  state_t state;

  logic [BUF_W-1:0] buffer;
  sm4_t             lane_out  [LANES];
  sm4_t             norm_buf  [LANES];
  rc_sel_t          sel;
  logic             mismatch;

  assign sel      = (state == S_RESWO) ? RECOMP : NORM;
  assign in_ready = (state == LOAD0) || (state == LOAD1);

  for (genvar g = 0; g < int'(LANES); g++) begin : g_lane
    cbd_lane #(.MU(MU)) u_lane (
      .r      (buffer[g*MU +: MU]),
      .sel    (sel),
      .sample (lane_out[g])
    );
  end

  always_comb begin
    mismatch = 1'b0;
    for (int k = 0; k < int'(LANES); k++)
      if (lane_out[k] != norm_buf[k]) mismatch = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= LOAD0;
      buffer    <= '0;
      out_valid <= 1'b0;
      err       <= 1'b0;
      for (int k = 0; k < int'(LANES); k++) norm_buf[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        LOAD0: if (in_valid) begin
          buffer[WORD_W-1:0] <= in_word;
          state <= LOAD1;
        end
        LOAD1: if (in_valid) begin
          buffer[BUF_W-1:WORD_W] <= in_word;
          state <= S_NORM;
        end
        S_NORM: begin
          for (int k = 0; k < int'(LANES); k++) norm_buf[k] <= lane_out[k];
          state <= S_RESWO;
        end
        S_RESWO: begin
          out_valid <= 1'b1;
          err       <= mismatch;
          state     <= LOAD0;
        end
      endcase
    end
  end

  always_comb begin
    out_word = '0;
    for (int k = 0; k < int'(LANES); k++)
      if (4 * k + 3 < int'(WORD_W)) out_word[4*k +: 4] = norm_buf[k];
  end
endmodule
