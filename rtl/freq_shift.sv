// freq_shift: digital frequency shift of the low-IF receive signal to
// baseband, y[n] = x[n] * exp(j * 2 pi * theta[n]), theta advancing by
// phase_inc / 2^32 per sample. With the document's 7.5 MHz IF at 120 MHz the
// host sets phase_inc = -2^32 / 16 (a shift down by 7.5 MHz); other IFs
// (7 MHz, 15 MHz in the experiments) are other phase_inc values.
// The numerically controlled oscillator is this design's: a 32-bit phase
// accumulator addresses a 1024-entry cosine/sine table built at elaboration
// from a Taylor series, round(32767 * sin(2 pi i / 1024)). The product is
// truncated to Q4.12 and saturated.
// Two register stages: table read, then complex multiply; out_valid follows
// in_valid by two cycles.
module freq_shift
  import edsic_pkg::*;
#(
  parameter int LUT_BITS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] phase_inc,
  input  logic        in_valid,
  input  sample_t     in_data,
  output logic        out_valid,
  output sample_t     out_data
);
  localparam int N = 2 ** LUT_BITS;
  typedef logic signed [15:0] lut_t [N];

  function automatic lut_t make_sin();
    lut_t tbl;
    real pi = 3.14159265358979323846;
    for (int i = 0; i < N; i++) begin
      real a, term, s;
      a = 2.0 * pi * i / N;
      if (a > pi) a = a - 2.0 * pi;
      term = a;
      s = a;
      for (int k = 1; k < 12; k++) begin
        term = -term * a * a / ((2 * k) * (2 * k + 1));
        s = s + term;
      end
      tbl[i] = 16'($rtoi(s * 32767.0 + (s >= 0.0 ? 0.5 : -0.5)));
    end
    return tbl;
  endfunction

  localparam lut_t SIN = make_sin();

  logic [31:0] phase;
  logic [LUT_BITS-1:0] pidx;
  logic signed [15:0] c1, s1;
  sample_t x1;
  logic v1;
  logic signed [33:0] pr, pi_;

  assign pidx = phase[31 -: LUT_BITS];

  cplx_mult #(.AW(16), .BW(16)) u_mix (
    .a_re(x1.re), .a_im(x1.im), .b_re(c1), .b_im(s1), .p_re(pr), .p_im(pi_));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0; c1 <= '0; s1 <= '0; x1 <= '0; v1 <= 1'b0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        phase <= phase + phase_inc;
        s1    <= SIN[pidx];
        c1    <= SIN[pidx + LUT_BITS'(N / 4)];
        x1    <= in_data;
      end
      if (v1) begin
        out_data.re <= sat16(64'(pr >>> 15));
        out_data.im <= sat16(64'(pi_ >>> 15));
      end
    end
  end
endmodule
