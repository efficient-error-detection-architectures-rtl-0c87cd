// One lane of the centered binomial sampler with RESwO error detection.
// A MU-bit pseudorandom chunk r gives the sample HW(r[MU/2-1:0]) - HW(r[MU-1:MU/2]),
// HW being the Hamming weight. Both weights feed one subtractor through a swap
// multiplexer: in the Norm cycle it computes a - b, in the RESwO cycle b - a.
// The difference is turned into sign-magnitude, and in the RESwO cycle the sign
// is flipped back, so that a fault-free lane gives the same 4-bit sample in both
// cycles. A zero difference always gets a positive sign (design choice, so that
// +0 and -0 never differ at the comparator).
// Purely combinational; the caller registers the Norm result and compares.
// Follows the published scheme: Hamming weights, swap multiplexer, sign flip.
// Own choices: the 5-bit subtractor and the positive sign of zero.
module cbd_lane
  import saber_pkg::*;
#(
  parameter int unsigned MU = 8
) (
  input  logic [MU-1:0] r,
  input  rc_sel_t       sel,     // NORM, or RECOMP = RESwO cycle
  output sm4_t          sample
);
  localparam int unsigned HALF = MU / 2;

  logic [3:0] hw_a, hw_b;       // Hamming weights, at most 5 for MU = 10
  logic [3:0] op_x, op_y;       // subtractor inputs after the swap multiplexer
  logic signed [4:0] diff;

  always_comb begin
    hw_a = '0;
    hw_b = '0;
    for (int k = 0; k < int'(HALF); k++) begin
      hw_a = hw_a + 4'(r[k]);
      hw_b = hw_b + 4'(r[HALF + k]);
    end
    op_x = (sel == RECOMP) ? hw_b : hw_a;
    op_y = (sel == RECOMP) ? hw_a : hw_b;
    diff = $signed({1'b0, op_x}) - $signed({1'b0, op_y});
    sample.mag  = diff[4] ? 3'(-diff) : diff[2:0];
    sample.sign = (diff[4] ^ (sel == RECOMP)) & (diff != '0);
  end
endmodule
