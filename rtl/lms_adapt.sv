// lms_adapt: the LMS adaptation of the canceller (document eq. (13)-(15)):
//   w <- w + mu_w e s_n*                        (all M taps)
//   q <- q + mu_q e Sigma_n^T X_n* w*           (tau taps only)
//   h <- h + mu_h e Phi_n w*                    (tau taps only)
// As in the document, the q and h gradients use only the tau taps around tap
// M_pre (taps M_pre - tau/2 .. M_pre + tau/2), which keeps their cost fixed.
// For each such tap k the gradient pieces are
//   q: conj(x[n-k] w_k) times the three basis values of sample n-k, added to
//      the control points idx[n-k] .. idx[n-k]+2
//   h: conj(w_k) * [1, x[n-k], |x[n-k]|^2 x[n-k]]
// Step sizes are powers of two, mu = 2^-shift (shift inputs 0..31); this is a
// choice of this design, the document gives no step-size values.
// Timing: every input is combinational into the step values; the w and h
// accumulators add their step on a clock edge with 'upd' high, and the q step
// vector 'dq' is applied by spline_lut on the same edge. 'clear' zeroes all
// coefficients (synchronous), as does reset. The regression inputs are
// expected one sample older than the one that produced e (index k + EXTRA).
module lms_adapt
  import edsic_pkg::*;
#(
  parameter int M     = 60,
  parameter int TAU   = 5,
  parameter int M_PRE = 5,
  parameter int K     = 8,
  parameter int Q     = K + 2,
  parameter int EXTRA = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 upd,
  input  sample_t              e,
  input  logic [MU_W-1:0]      mu_w,
  input  logic [MU_W-1:0]      mu_q,
  input  logic [MU_W-1:0]      mu_h,
  input  sig_t                 s_line [M+EXTRA],
  // tau-tap window, entry i belongs to tap KLO + i
  input  sample_t              win_x   [TAU],
  input  logic [$clog2(K)-1:0] win_idx [TAU],
  input  logic [BASIS_W-1:0]   win_b   [TAU][3],
  input  sig_t                 win_p   [TAU],
  output coef_t                w [M],
  output coef_t                h [3],
  output acc_t                 dq [Q]
);
  localparam int KLO = M_PRE - TAU / 2;
  localparam int SH  = ACC_F - 2 * SAMPLE_F;      // Q.24 product -> accumulator units

  acc_t wacc [M];
  acc_t hacc [3];

  // ---- w steps ----
  logic signed [36:0] ews_re [M];
  logic signed [36:0] ews_im [M];
  for (genvar k = 0; k < M; k++) begin : g_w
    logic signed [18:0] sc_re, sc_im;
    assign sc_re = 19'(s_line[k+EXTRA].re);
    assign sc_im = -19'(s_line[k+EXTRA].im);
    cplx_mult #(.AW(SAMPLE_W), .BW(19)) u_m (
      .a_re(e.re), .a_im(e.im), .b_re(sc_re), .b_im(sc_im),
      .p_re(ews_re[k]), .p_im(ews_im[k]));
    assign w[k] = acc2coef(wacc[k]);
  end

  // ---- per-tap gradient pieces of q and h ----
  logic signed [37:0] xw_re [TAU];   // x * w  (Q.27)
  logic signed [37:0] xw_im [TAU];
  logic signed [37:0] xwc_re [TAU];  // x * conj(w)
  logic signed [37:0] xwc_im [TAU];
  logic signed [38:0] pwc_re [TAU];  // |x|^2 x * conj(w)
  logic signed [38:0] pwc_im [TAU];
  for (genvar i = 0; i < TAU; i++) begin : g_win
    logic signed [18:0] wc_re, wc_im;
    assign wc_re = 19'(w[KLO+i].re);
    assign wc_im = -19'(w[KLO+i].im);
    cplx_mult #(.AW(SAMPLE_W), .BW(COEF_W)) u_xw (
      .a_re(win_x[i].re), .a_im(win_x[i].im), .b_re(w[KLO+i].re), .b_im(w[KLO+i].im),
      .p_re(xw_re[i][35:0]), .p_im(xw_im[i][35:0]));
    assign xw_re[i][37:36] = {2{xw_re[i][35]}};
    assign xw_im[i][37:36] = {2{xw_im[i][35]}};
    cplx_mult #(.AW(SAMPLE_W), .BW(19)) u_xwc (
      .a_re(win_x[i].re), .a_im(win_x[i].im), .b_re(wc_re), .b_im(wc_im),
      .p_re(xwc_re[i][36:0]), .p_im(xwc_im[i][36:0]));
    assign xwc_re[i][37] = xwc_re[i][36];
    assign xwc_im[i][37] = xwc_im[i][36];
    cplx_mult #(.AW(SIG_W), .BW(19)) u_pwc (
      .a_re(win_p[i].re), .a_im(win_p[i].im), .b_re(wc_re), .b_im(wc_im),
      .p_re(pwc_re[i]), .p_im(pwc_im[i]));
  end

  // gradient sums, Q.12
  logic signed [17:0] gh_re [3];
  logic signed [17:0] gh_im [3];
  logic signed [17:0] gq_re [Q];
  logic signed [17:0] gq_im [Q];
  always_comb begin
    logic signed [63:0] s0r, s0i, s1r, s1i, s2r, s2i;
    logic signed [63:0] qr [Q];
    logic signed [63:0] qi [Q];
    logic signed [17:0] c_re, c_im;
    s0r = '0; s0i = '0; s1r = '0; s1i = '0; s2r = '0; s2i = '0;
    for (int m = 0; m < Q; m++) begin qr[m] = '0; qi[m] = '0; end
    for (int i = 0; i < TAU; i++) begin
      s0r += 64'(w[KLO+i].re);
      s0i -= 64'(w[KLO+i].im);
      s1r += 64'(xwc_re[i] >>> COEF_F);
      s1i += 64'(xwc_im[i] >>> COEF_F);
      s2r += 64'(pwc_re[i] >>> COEF_F);
      s2i += 64'(pwc_im[i] >>> COEF_F);
      c_re = sat18(64'(xw_re[i] >>> COEF_F));            // conj(x w), Q.12
      c_im = sat18(-64'(xw_im[i] >>> COEF_F));
      for (int j = 0; j < 3; j++) begin
        qr[32'(win_idx[i]) + j] += ($signed(64'(win_b[i][j])) * 64'(c_re)) >>> SAMPLE_F;
        qi[32'(win_idx[i]) + j] += ($signed(64'(win_b[i][j])) * 64'(c_im)) >>> SAMPLE_F;
      end
    end
    gh_re[0] = sat18(s0r >>> (COEF_F - SAMPLE_F));
    gh_im[0] = sat18(s0i >>> (COEF_F - SAMPLE_F));
    gh_re[1] = sat18(s1r);
    gh_im[1] = sat18(s1i);
    gh_re[2] = sat18(s2r);
    gh_im[2] = sat18(s2i);
    for (int m = 0; m < Q; m++) begin
      gq_re[m] = sat18(qr[m]);
      gq_im[m] = sat18(qi[m]);
    end
  end

  // ---- multiply the gradients by e and scale by the step sizes ----
  logic signed [35:0] egh_re [3];
  logic signed [35:0] egh_im [3];
  logic signed [35:0] egq_re [Q];
  logic signed [35:0] egq_im [Q];
  for (genvar l = 0; l < 3; l++) begin : g_h
    cplx_mult #(.AW(SAMPLE_W), .BW(18)) u_m (
      .a_re(e.re), .a_im(e.im), .b_re(gh_re[l]), .b_im(gh_im[l]),
      .p_re(egh_re[l]), .p_im(egh_im[l]));
    assign h[l] = acc2coef(hacc[l]);
  end
  for (genvar m = 0; m < Q; m++) begin : g_q
    cplx_mult #(.AW(SAMPLE_W), .BW(18)) u_m (
      .a_re(e.re), .a_im(e.im), .b_re(gq_re[m]), .b_im(gq_im[m]),
      .p_re(egq_re[m]), .p_im(egq_im[m]));
    assign dq[m].re = sat32((64'(egq_re[m]) <<< SH) >>> mu_q);
    assign dq[m].im = sat32((64'(egq_im[m]) <<< SH) >>> mu_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 0; k < M; k++) wacc[k] <= '0;
      for (int l = 0; l < 3; l++) hacc[l] <= '0;
    end else if (upd) begin
      for (int k = 0; k < M; k++) begin
        wacc[k].re <= sat32(64'(wacc[k].re) + ((64'(ews_re[k]) <<< SH) >>> mu_w));
        wacc[k].im <= sat32(64'(wacc[k].im) + ((64'(ews_im[k]) <<< SH) >>> mu_w));
      end
      for (int l = 0; l < 3; l++) begin
        hacc[l].re <= sat32(64'(hacc[l].re) + ((64'(egh_re[l]) <<< SH) >>> mu_h));
        hacc[l].im <= sat32(64'(hacc[l].im) + ((64'(egh_im[l]) <<< SH) >>> mu_h));
      end
    end
  end
endmodule
