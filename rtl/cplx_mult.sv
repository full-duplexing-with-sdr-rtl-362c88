// cplx_mult: combinational complex multiplier p = a * b built from three real
// multiplications (k1 = br*(ar+ai), k2 = ar*(bi-br), k3 = ai*(br+bi);
// p.re = k1 - k3, p.im = k1 + k2), the count the document assumes for one
// complex product. Full-precision result, no rounding; the caller scales it.
// AW, BW are the operand widths, the product is AW+BW+2 bits wide.
module cplx_mult #(
  parameter int AW = 18,
  parameter int BW = 18
) (
  input  logic signed [AW-1:0]      a_re,
  input  logic signed [AW-1:0]      a_im,
  input  logic signed [BW-1:0]      b_re,
  input  logic signed [BW-1:0]      b_im,
  output logic signed [AW+BW+1:0]   p_re,
  output logic signed [AW+BW+1:0]   p_im
);
  logic signed [AW:0]      a_sum;
  logic signed [BW:0]      b_dif, b_sum;
  logic signed [AW+BW+1:0] k1, k2, k3;

  always_comb begin
    a_sum = (AW+1)'(a_re) + (AW+1)'(a_im);
    b_dif = (BW+1)'(b_im) - (BW+1)'(b_re);
    b_sum = (BW+1)'(b_re) + (BW+1)'(b_im);
    k1 = (AW+BW+2)'(b_re) * (AW+BW+2)'(a_sum);
    k2 = (AW+BW+2)'(a_re) * (AW+BW+2)'(b_dif);
    k3 = (AW+BW+2)'(a_im) * (AW+BW+2)'(b_sum);
    p_re = k1 - k3;
    p_im = k1 + k2;
  end
endmodule
