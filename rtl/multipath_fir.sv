// multipath_fir: the linear part of the Hammerstein model, an M-tap complex
// FIR filter y = w^T s_n that models the self-interference channel (document
// eq. (10), M = 60 taps as in the document's resource table).
// A shift register holds the newest M + EXTRA samples of s; on 'push' s_in
// enters line[0] and every entry moves one place. y is formed
// combinationally from line[0..M-1] (the canceller registers e = d - y right
// after it), so with the delay line this block is one pipeline stage.
// The EXTRA older entries are kept so that the LMS update, which happens one
// sample after y is formed, can still see the regression that produced y.
// Pre-cursor taps: tap k multiplies s[n+M_pre-k] when the transmit signal is
// fed M_pre samples ahead of the received one (see fd_transceiver_top).
// Output y is Q.12 with the full integer range (32 bits).
module multipath_fir
  import edsic_pkg::*;
#(
  parameter int M     = 60,
  parameter int EXTRA = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               push,
  input  sig_t               s_in,
  input  coef_t              w [M],
  output sig_t               line [M+EXTRA],
  output logic signed [31:0] y_re,
  output logic signed [31:0] y_im
);
  localparam int PW = SIG_W + COEF_W + 2;          // product width
  localparam int SW = PW + $clog2(M) + 1;          // sum width

  logic signed [PW-1:0] p_re [M];
  logic signed [PW-1:0] p_im [M];
  logic signed [SW-1:0] acc_re, acc_im;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < M + EXTRA; k++) line[k] <= '0;
    end else if (push) begin
      line[0] <= s_in;
      for (int k = 1; k < M + EXTRA; k++) line[k] <= line[k-1];
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_tap
    cplx_mult #(.AW(SIG_W), .BW(COEF_W)) u_mul (
      .a_re(line[k].re), .a_im(line[k].im), .b_re(w[k].re), .b_im(w[k].im),
      .p_re(p_re[k]), .p_im(p_im[k]));
  end

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < M; k++) begin
      acc_re = acc_re + SW'(p_re[k]);
      acc_im = acc_im + SW'(p_im[k]);
    end
    y_re = 32'(acc_re >>> COEF_F);                 // Q.27 -> Q.12
    y_im = 32'(acc_im >>> COEF_F);
  end
endmodule
