// spline_basis: the three nonzero entries of the spline basis vector
// u_n^T C for second-order uniform B-spline interpolation with unit knot
// spacing (document, Appendix A, eq. (25)):
//   b0 = (1 - u)^2 / 2 = (1 - 2u + u^2) / 2
//   b1 = (-2u^2 + 2u + 1) / 2 = 1/2 + u - u^2
//   b2 = u^2 / 2
// Only u^2 needs a multiplier; the halvings are shifts, which is the saving
// the document describes. Combinational.
// Input: u, unsigned Q0.12. Outputs: b0..b2, unsigned Q1.12 (sum = 1 up to
// truncation of the last bit). The low 12 bits of u^2 are dropped (truncation)
// and the top bit of the b1 sum is never set (b1 <= 3/4), so lint reports
// those bits as unused.
module spline_basis
  import edsic_pkg::*;
(
  input  logic [11:0]        u,
  output logic [BASIS_W-1:0] b0,
  output logic [BASIS_W-1:0] b1,
  output logic [BASIS_W-1:0] b2
);
  logic [23:0] usq_full;
  logic [11:0] usq;        // u^2, Q0.12
  logic [13:0] t0, t1;

  always_comb begin
    usq_full = 24'(u) * 24'(u);
    usq      = usq_full[23:12];
    t0       = 14'd4096 - 14'({u, 1'b0}) + 14'(usq);
    t1       = 14'd2048 + 14'(u) - 14'(usq);
    b0       = BASIS_W'(t0 >> 1);
    b1       = BASIS_W'(t1);
    b2       = BASIS_W'(usq >> 1);
  end
endmodule
