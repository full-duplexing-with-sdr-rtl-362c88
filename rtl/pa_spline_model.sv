// pa_spline_model: the PA nonlinearity branch of the extended Hammerstein
// model, r[n] = x[n] * (1 + Psi_n^T q), where Psi_n^T q is a complex value
// interpolated from a spline look-up table addressed by |x[n]|.
//
// Pipeline (one stage per 'adv' pulse, i.e. per accepted sample):
//   stage 1: |x| by the alpha-max-beta-min approximation (mag_approx)
//   stage 2: span index and abscissa (spline_abscissa), basis u^T C
//            (spline_basis)
//   stage 3: F = b0*q[idx] + b1*q[idx+1] + b2*q[idx+2]; r = x + x*F
// so r for the sample accepted with one 'adv' is on 'r' after the third.
// The stage-3 copies of x, idx and the basis values are brought out because
// the LMS update of q needs them (eq. (14)). The control-point table is the
// spline_lut instance inside; its clear/update ports are passed through.
// The structure follows the document (Fig. 3 and Appendix A); the word widths
// are this design's (see edsic_pkg).
module pa_spline_model
  import edsic_pkg::*;
#(
  parameter int K = 8,
  parameter int Q = K + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adv,
  input  sample_t              x_in,
  // control-point table maintenance
  input  logic                 q_clear,
  input  logic                 q_upd,
  input  acc_t                 dq [Q],
  output acc_t                 q_acc [Q],
  // stage-3 outputs
  output sig_t                 r,
  output sample_t              x3,
  output logic [$clog2(K)-1:0] idx3,
  output logic [BASIS_W-1:0]   b3 [3]
);
  localparam int IW = $clog2(K);

  // stage 1
  sample_t     x1;
  logic [15:0] mag1, mag_c;
  // stage 2
  sample_t      x2;
  logic [IW-1:0] idx2, idx_c;
  logic [11:0]   u_c;
  logic [BASIS_W-1:0] b2r [3];
  logic [BASIS_W-1:0] bc [3];
  // stage 3 combinational
  coef_t q0, q1, q2;
  logic signed [33:0] f_re, f_im;
  logic signed [17:0] f18_re, f18_im;
  logic signed [35:0] xf_re, xf_im;
  sig_t r_c;

  mag_approx u_mag (.x(x_in), .mag(mag_c));
  spline_abscissa #(.K(K)) u_abs (.mag(mag1), .idx(idx_c), .u(u_c));
  spline_basis u_bas (.u(u_c), .b0(bc[0]), .b1(bc[1]), .b2(bc[2]));
  spline_lut #(.K(K), .Q(Q)) u_lut (
    .clk, .rst_n, .clear(q_clear), .upd(q_upd), .dq, .idx(idx2),
    .q0, .q1, .q2, .q_acc);

  always_comb begin
    f_re = 34'(34'(signed'({1'b0, b2r[0]})) * 34'(q0.re)) + 34'(34'(signed'({1'b0, b2r[1]})) * 34'(q1.re))
         + 34'(34'(signed'({1'b0, b2r[2]})) * 34'(q2.re));
    f_im = 34'(34'(signed'({1'b0, b2r[0]})) * 34'(q0.im)) + 34'(34'(signed'({1'b0, b2r[1]})) * 34'(q1.im))
         + 34'(34'(signed'({1'b0, b2r[2]})) * 34'(q2.im));
    f18_re = sat18(64'(f_re >>> 12));   // Q.27 -> Q.15
    f18_im = sat18(64'(f_im >>> 12));
  end

  cplx_mult #(.AW(16), .BW(18)) u_xf (
    .a_re(x2.re), .a_im(x2.im), .b_re(f18_re), .b_im(f18_im),
    .p_re(xf_re), .p_im(xf_im));

  always_comb begin
    r_c.re = sat18(64'(x2.re) + 64'(xf_re >>> 15));
    r_c.im = sat18(64'(x2.im) + 64'(xf_im >>> 15));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0; mag1 <= '0;
      x2 <= '0; idx2 <= '0;
      x3 <= '0; idx3 <= '0; r <= '0;
      for (int j = 0; j < 3; j++) begin b2r[j] <= '0; b3[j] <= '0; end
    end else if (adv) begin
      x1   <= x_in;
      mag1 <= mag_c;
      x2   <= x1;
      idx2 <= idx_c;
      for (int j = 0; j < 3; j++) begin b2r[j] <= bc[j]; b3[j] <= b2r[j]; end
      x3   <= x2;
      idx3 <= idx2;
      r    <= r_c;
    end
  end
endmodule
