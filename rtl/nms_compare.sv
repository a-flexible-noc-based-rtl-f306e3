// nms_compare: COMPARE unit and 1/alpha scaling (normalized min-sum, eq. 8).
//
// For one edge of a PCC: if |L(q_mj)| equals the first minimum of the PCC the
// edge itself supplied it, so the second minimum is used, otherwise the first.
// The chosen magnitude is multiplied by 1/alpha and given the sign of the
// product of all other edges' signs (the PCC's sign XOR this edge's sign).
// The magnitude test by value follows eq. (8): on a tie both edges get the
// second minimum, which then equals the first anyway.
// 1/alpha = 0.75 (x/2 + x/4, truncated) is this design's choice.
// Eq. (8) prints a leading minus sign, inherited from the Psi formulation of
// eq. (4) where Psi is negative; with plain magnitudes the check-to-variable
// message carries +sign, which is what is computed here.
// Purely combinational.
module nms_compare
  import ldpc_pkg::*;
(
  input  llr_t          lqmj,
  input  logic [QW-2:0] min1,
  input  logic [QW-2:0] min2,
  input  logic          sign_all,
  output llr_t          r_new
);
  logic [QW-2:0] mag, sel, scaled;
  logic          neg;

  always_comb begin
    mag    = lqmj[QW-1] ? (QW-1)'(-lqmj) : lqmj[QW-2:0];
    sel    = (mag == min1) ? min2 : min1;
    scaled = (sel >> 1) + (sel >> 2);
    neg    = sign_all ^ lqmj[QW-1];
    r_new  = neg ? -llr_t'({1'b0, scaled}) : llr_t'({1'b0, scaled});
  end
endmodule
