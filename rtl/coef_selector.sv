// Coefficient selector of the polynomial multiplier.
// A 64-bit data-memory word holds four EQ-bit coefficients of a(x), each in a
// 16-bit slot (coefficient k in bits 16k+EQ-1:16k). The selector picks slot idx
// and, in the RENO cycle of the Norm/RENO multiplexer, negates it modulo
// q = 2^EQ (q - a, which is the two's complement). Combinational.
// The selector itself follows the published multiplier; the 16-bit slot
// layout of a memory word is this design's own choice.
module coef_selector
  import saber_pkg::*;
#(
  parameter int unsigned EQ_W = EQ
) (
  input  logic [WORD_W-1:0] word,
  input  logic [1:0]        idx,
  input  rc_sel_t           sel,
  output logic [EQ_W-1:0]   coef
);
  logic [EQ_W-1:0] raw;

  always_comb begin
    raw  = word[16*idx +: EQ_W];
    coef = (sel == RECOMP) ? (EQ_W'(0) - raw) : raw;
  end
endmodule
