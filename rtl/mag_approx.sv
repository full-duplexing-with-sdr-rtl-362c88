// mag_approx: magnitude of a complex sample without a square root,
//   |x| ~ alpha * max(|Re x|, |Im x|) + beta * min(|Re x|, |Im x|),
// with alpha = 0.96043387 and beta = 0.397824735 (both from the document;
// maximum error 3.95 %). The constants are held as unsigned Q0.17 integers
// (125887 and 52144, this design's quantisation). Combinational.
// Input: Q4.12 complex sample. Output: unsigned Q4.12 magnitude (0 .. ~10.9).
module mag_approx
  import edsic_pkg::*;
#(
  parameter int unsigned ALPHA_Q17 = 125887,
  parameter int unsigned BETA_Q17  = 52144
) (
  input  sample_t            x,
  output logic [15:0]        mag
);
  logic [15:0] ar, ai, mx, mn;
  logic [35:0] acc;

  always_comb begin
    ar  = x.re[15] ? 16'(-x.re) : 16'(x.re);   // -(-32768) gives 32768, still fits unsigned
    ai  = x.im[15] ? 16'(-x.im) : 16'(x.im);
    mx  = (ar > ai) ? ar : ai;
    mn  = (ar > ai) ? ai : ar;
    acc = 36'(mx) * 36'(ALPHA_Q17) + 36'(mn) * 36'(BETA_Q17);
    mag = 16'(acc >> 17);
  end
endmodule
