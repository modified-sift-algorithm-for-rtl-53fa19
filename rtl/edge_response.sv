// edge_response: rejects keypoints that lie on an edge.
//
// From the 3x3 DoG window w (row-major, w[4] the centre) it forms the 2x2
// Hessian by finite differences
//   Dxx = w[3] + w[5] - 2 w[4],  Dyy = w[1] + w[7] - 2 w[4],
//   4 Dxy = w[8] - w[6] - w[2] + w[0],
// and flags an edge when the principal-curvature ratio is too large:
//   Det <= 0   or   r * Tr^2 >= (r+1)^2 * Det,
// with Tr = Dxx + Dyy, Det = Dxx*Dyy - Dxy^2. All terms are multiplied by 16
// so that 4 Dxy stays an integer. The ratio test with r = EDGE_R = 10 is
// Lowe's; the text only asks for an edge threshold from the Hessian.
// Purely combinational.
module edge_response
  import sift_pkg::*;
#(
  parameter int EDGE_R = 10
) (
  input  dog_t win [9],
  output logic is_edge
);

  localparam int W = 48;

  always_comb begin
    logic signed [W-1:0] dxx, dyy, dxy4, tr, det16, lhs, rhs;
    dxx   = W'(win[3]) + W'(win[5]) - 2 * W'(win[4]);
    dyy   = W'(win[1]) + W'(win[7]) - 2 * W'(win[4]);
    dxy4  = W'(win[8]) - W'(win[6]) - W'(win[2]) + W'(win[0]);
    tr    = dxx + dyy;
    det16 = 16 * dxx * dyy - dxy4 * dxy4;
    lhs   = W'(EDGE_R) * 16 * tr * tr;
    rhs   = W'(EDGE_R + 1) * W'(EDGE_R + 1) * det16;
    is_edge = (det16 <= 0) || (lhs >= rhs);
  end

endmodule
