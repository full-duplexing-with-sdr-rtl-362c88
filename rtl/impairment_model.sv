// impairment_model: the additional transmitter impairment branch of the
// extended Hammerstein model, t[n] = h^T phi_n with the basis
// phi_n = [1, x*[n], |x[n]|^2 x*[n]] (LO leakage, I/Q image, and the cascade
// of I/Q mismatch and PA nonlinearity), as in the document (eq. (8)-(9)).
//
// Pipeline, aligned with pa_spline_model (one stage per 'adv'):
//   stage 1: |x|^2 = Re^2 + Im^2 (exact, Q8.12)
//   stage 2: phi2 = |x|^2 x* (Q6.12, saturated)
//   stage 3: t = h0 + h1 x* + h2 phi2 (Q6.12, saturated)
// Also brought out at stage 3, for the LMS update of h (eq. (15)): x3 and
// p3 = conj(phi2) = |x|^2 x. Coefficients h come from lms_adapt in Q3.15.
module impairment_model
  import edsic_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    adv,
  input  sample_t x_in,
  input  coef_t   h [3],
  output sig_t    t,
  output sample_t x3,
  output sig_t    p3
);
  sample_t x1, x2;
  logic [20:0] msq1;                 // |x|^2, unsigned Q8.12 (max 128)
  sig_t phi2_2;                      // |x|^2 x*, stage 2
  logic [32:0] msq_full;
  logic signed [38:0] ph_re, ph_im;
  logic signed [36:0] h1x_re, h1x_im;
  logic signed [37:0] h2p_re, h2p_im;
  logic signed [16:0] xc_re, xc_im;
  sig_t t_c;

  always_comb begin
    msq_full = 33'(33'(x_in.re) * 33'(x_in.re)) + 33'(33'(x_in.im) * 33'(x_in.im));
    // |x|^2 (21 bits) times conj(x) (17 bits)
    ph_re = 39'(signed'({1'b0, msq1})) * 39'(x1.re);
    ph_im = -(39'(signed'({1'b0, msq1})) * 39'(x1.im));
    xc_re = 17'(x2.re);
    xc_im = -17'(x2.im);
  end

  cplx_mult #(.AW(17), .BW(18)) u_h1 (
    .a_re(xc_re), .a_im(xc_im), .b_re(h[1].re), .b_im(h[1].im),
    .p_re(h1x_re), .p_im(h1x_im));

  cplx_mult #(.AW(18), .BW(18)) u_h2 (
    .a_re(phi2_2.re), .a_im(phi2_2.im), .b_re(h[2].re), .b_im(h[2].im),
    .p_re(h2p_re), .p_im(h2p_im));

  always_comb begin
    t_c.re = sat18(64'(h[0].re >>> (COEF_F - SIG_F)) + 64'(h1x_re >>> COEF_F) + 64'(h2p_re >>> COEF_F));
    t_c.im = sat18(64'(h[0].im >>> (COEF_F - SIG_F)) + 64'(h1x_im >>> COEF_F) + 64'(h2p_im >>> COEF_F));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0; msq1 <= '0; phi2_2 <= '0; t <= '0; p3 <= '0;
    end else if (adv) begin
      x1     <= x_in;
      msq1   <= 21'(msq_full >> 12);
      x2     <= x1;
      phi2_2.re <= sat18(64'(ph_re >>> 12));
      phi2_2.im <= sat18(64'(ph_im >>> 12));
      x3     <= x2;
      t      <= t_c;
      p3.re  <= phi2_2.re;
      p3.im  <= sat18(-64'(phi2_2.im));
    end
  end
endmodule
