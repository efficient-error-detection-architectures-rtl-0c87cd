// Multiply-accumulate core of the parallel schoolbook multiplier.
// Computes acc_out = acc_in + s * a mod 2^EQ, where a is an EQ-bit coefficient
// of the public polynomial and s a small secret coefficient in sign-magnitude
// form: the magnitude (at most 7) scales a, and the sign picks between adding
// and subtracting. Arithmetic modulo q = 2^EQ is plain wrap-around. Purely
// combinational; one core per coefficient position.
// Follows the published multiplier: sign-magnitude secret, add or subtract.
// Own choice: the shift-and-add form of the small product.
module saber_mac_core
  import saber_pkg::*;
#(
  parameter int unsigned EQ_W = EQ
) (
  input  logic [EQ_W-1:0] acc_in,
  input  logic [EQ_W-1:0] a,
  input  sm4_t            s,
  output logic [EQ_W-1:0] acc_out
);
  logic [EQ_W-1:0] prod;

  always_comb begin
    prod    = (s.mag[0] ? a : '0)
            + (s.mag[1] ? (a << 1) : '0)
            + (s.mag[2] ? (a << 2) : '0);
    acc_out = s.sign ? (acc_in - prod) : (acc_in + prod);
  end
endmodule
