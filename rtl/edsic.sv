// edsic: extended Hammerstein digital self-interference canceller.
// The transmit samples x[n] pass through a nonlinear stage, the sum
// s[n] = r[n] + t[n] of a spline-interpolated PA model r = x(1 + Psi^T q) and
// an impairment model t = h^T [1, x*, |x|^2 x*] (LO leakage, I/Q image,
// I/Q-PA cascade), and then an M-tap FIR filter w that models the coupling
// channel. Its output y is subtracted from the received samples d[n] and the
// residual e[n] = d[n] - y[n] is both the canceller output and the error that
// drives the LMS updates of w, q and h. This is the structure the document
// proposes (its Fig. 3).
//
// Pipeline: five register stages, as in the document's 60 MHz realisation.
// The pipeline moves one step for every accepted input sample (in_valid);
// with one sample per clock (the 60 MHz loop fed at 60 MS/s) e for a sample
// pair (x, d) is on 'e' five clock cycles after that pair was presented:
//   1 |x| and |x|^2   2 spline index/basis, |x|^2 x*   3 r and t
//   4 s in the FIR delay line   5 e = d - y
// e_valid is high for one cycle after each step that brought out a result.
// The coefficient update uses e one sample later (delayed LMS by one sample),
// with the regression kept aligned to the sample that produced e.
// Control: adapt_en enables the LMS updates, coef_clear zeroes all
// coefficients, mu_* are step sizes as right shifts. The received sample d
// must be aligned with x[n - M_PRE] (the transmit path is delayed M_PRE
// samples less) so that the first M_PRE taps act as pre-cursor taps.
module edsic
  import edsic_pkg::*;
#(
  parameter int M     = 60,   // FIR taps
  parameter int TAU   = 5,    // taps used in the q and h updates
  parameter int M_PRE = 5,    // pre-cursor taps; the tau window is centred here
  parameter int K     = 8     // spline regions (Q = K + 2 control points)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  sample_t         x,
  input  sample_t         d,
  input  logic            adapt_en,
  input  logic            coef_clear,
  input  logic [MU_W-1:0] mu_w,
  input  logic [MU_W-1:0] mu_q,
  input  logic [MU_W-1:0] mu_h,
  output logic            e_valid,
  output sample_t         e
);
  localparam int Q     = K + 2;
  localparam int EXTRA = 1;
  acc_t q_acc [Q];   // full-precision control points, kept for debug access; unused here
  localparam int KLO   = M_PRE - TAU / 2;
  localparam int SIDE  = KLO + TAU + EXTRA;   // side-line length
  localparam int IW    = $clog2(K);

  logic adv;
  assign adv = in_valid;

  // valid flags of stages 1..4, d alignment registers
  logic [4:1] v;
  sample_t d_pipe [4];

  // PA branch and impairment branch
  sig_t r, t, p3;
  sample_t x3, x3i;
  logic [IW-1:0] idx3;
  logic [BASIS_W-1:0] b3 [3];
  acc_t dq [Q];
  coef_t h [3];
  coef_t w [M];
  logic upd;

  pa_spline_model #(.K(K), .Q(Q)) u_pa (
    .clk, .rst_n, .adv, .x_in(x), .q_clear(coef_clear), .q_upd(upd), .dq, .q_acc,
    .r, .x3, .idx3, .b3);

  impairment_model u_imp (
    .clk, .rst_n, .adv, .x_in(x), .h, .t, .x3(x3i), .p3);

  // s = r + t enters the FIR delay line (stage 4)
  sig_t s_c;
  always_comb begin
    s_c.re = sat18(64'(r.re) + 64'(t.re));
    s_c.im = sat18(64'(r.im) + 64'(t.im));
  end

  sig_t line [M+EXTRA];
  logic signed [31:0] y_re, y_im;
  multipath_fir #(.M(M), .EXTRA(EXTRA)) u_fir (
    .clk, .rst_n, .push(adv), .s_in(s_c), .w, .line, .y_re, .y_im);

  // side lines of x, spline index/basis and |x|^2 x, aligned with the FIR line
  sample_t            sx   [SIDE];
  logic [IW-1:0]      sidx [SIDE];
  logic [BASIS_W-1:0] sb   [SIDE][3];
  sig_t               sp   [SIDE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < SIDE; k++) begin
        sx[k] <= '0; sidx[k] <= '0; sp[k] <= '0;
        for (int j = 0; j < 3; j++) sb[k][j] <= '0;
      end
    end else if (adv) begin
      sx[0] <= x3; sidx[0] <= idx3; sp[0] <= p3;
      for (int j = 0; j < 3; j++) sb[0][j] <= b3[j];
      for (int k = 1; k < SIDE; k++) begin
        sx[k] <= sx[k-1]; sidx[k] <= sidx[k-1]; sp[k] <= sp[k-1];
        for (int j = 0; j < 3; j++) sb[k][j] <= sb[k-1][j];
      end
    end
  end

  sample_t            win_x   [TAU];
  logic [IW-1:0]      win_idx [TAU];
  logic [BASIS_W-1:0] win_b   [TAU][3];
  sig_t               win_p   [TAU];
  always_comb begin
    for (int i = 0; i < TAU; i++) begin
      win_x[i]   = sx[KLO + i + EXTRA];
      win_idx[i] = sidx[KLO + i + EXTRA];
      win_p[i]   = sp[KLO + i + EXTRA];
      for (int j = 0; j < 3; j++) win_b[i][j] = sb[KLO + i + EXTRA][j];
    end
  end

  // stage 5: e = d - y
  logic e_full;   // e holds a result not yet used for adaptation
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0; e <= '0; e_valid <= 1'b0; e_full <= 1'b0;
      for (int i = 0; i < 4; i++) d_pipe[i] <= '0;
    end else begin
      e_valid <= adv && v[4];
      if (adv) begin
        v       <= {v[3:1], 1'b1};
        d_pipe[0] <= d;
        for (int i = 1; i < 4; i++) d_pipe[i] <= d_pipe[i-1];
        e.re    <= sat16(64'(d_pipe[3].re) - 64'(y_re));
        e.im    <= sat16(64'(d_pipe[3].im) - 64'(y_im));
        e_full  <= v[4];
      end
    end
  end

  assign upd = adv && e_full && adapt_en && !coef_clear;

  lms_adapt #(.M(M), .TAU(TAU), .M_PRE(M_PRE), .K(K), .Q(Q), .EXTRA(EXTRA)) u_lms (
    .clk, .rst_n, .clear(coef_clear), .upd, .e, .mu_w, .mu_q, .mu_h,
    .s_line(line), .win_x, .win_idx, .win_b, .win_p, .w, .h, .dq);

  // the two branches see the same x; their stage-3 copies must agree
  assert property (@(posedge clk) disable iff (!rst_n) x3 == x3i);
  // pipeline parameters must leave the tau window inside the FIR
  initial assert (KLO >= 0 && KLO + TAU <= M) else $error("tau window outside the FIR taps");
endmodule
