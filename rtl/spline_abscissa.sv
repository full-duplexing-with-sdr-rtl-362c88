// spline_abscissa: the "abscissa & index" step of a uniform spline look-up
// table. With knot spacing Delta_A = 1 (as in the document) the span index is
// the integer part of the amplitude and the abscissa u_n is its fractional
// part: i_n = floor(A) + 1 (here returned 0-based as idx = i_n - 1) and
// u_n = A - floor(A). The amplitude range 0..K is split into K regions
// (K = 8 in the document); amplitudes at or above K are clamped to the top of
// the last region, this design's choice. Combinational.
// For K < 16 the top bits of the clamped magnitude are always zero and are
// left unused (lint reports them).
// Input: unsigned Q4.12 magnitude. Outputs: idx (0..K-1), u as unsigned Q0.12.
module spline_abscissa #(
  parameter int K = 8                  // number of regions, a power of two <= 16
) (
  input  logic [15:0]          mag,
  output logic [$clog2(K)-1:0] idx,
  output logic [11:0]          u
);
  localparam logic [15:0] MAG_MAX = 16'((K << 12) - 1);

  logic [15:0] a;
  always_comb begin
    a   = (mag > MAG_MAX) ? MAG_MAX : mag;
    idx = a[12 +: $clog2(K)];
    u   = a[11:0];
  end
endmodule
