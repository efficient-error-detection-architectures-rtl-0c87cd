// Shared types and constants of the SABER error-detection datapaths.
// SABER works over R_q = Z_q[x]/(x^N + 1) with N = 256 and q = 2^13, so all
// modular arithmetic is plain 13-bit two's complement arithmetic that wraps.
// Secret coefficients travel as 4-bit sign-magnitude numbers, 16 of them in a
// 64-bit data-memory word. H_CONST is the constant rounding term h of
// b' = (A s' + h) mod q, 2^(eq-ep-1) = 4 for eq = 13 and ep = 10.
package saber_pkg;
  localparam int unsigned EQ      = 13;   // log2 q
  localparam int unsigned EP      = 10;   // log2 p
  localparam int unsigned N       = 256;  // polynomial degree
  localparam int unsigned WORD_W  = 64;   // data-memory word
  localparam int unsigned H_CONST = 1 << (EQ - EP - 1);

  typedef logic [EQ-1:0] coef_t;

  // secret coefficient, sign and magnitude
  typedef struct packed {
    logic       sign;
    logic [2:0] mag;
  } sm4_t;

  // select of the Norm / recomputation multiplexers
  typedef enum logic {
    NORM   = 1'b0,
    RECOMP = 1'b1
  } rc_sel_t;
endpackage
