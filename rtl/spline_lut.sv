// spline_lut: the spline control-point table q[0..Q-1] of the PA model.
// Q = K + 2 = 10 complex entries as in the document (8 regions plus two extra
// points for second-order interpolation). Each entry is a 32-bit accumulator
// (see edsic_pkg); the three neighbours q[idx], q[idx+1], q[idx+2] are read
// combinationally in datapath format (Q3.15).
// Writes: 'clear' zeroes every entry (the document starts adaptation from all
// zero coefficients); 'upd' adds the LMS step vector 'dq' to all entries with
// saturation, one cycle per step. Both act at the rising clock edge; 'clear'
// wins. Reset is synchronous, active low, to zero.
module spline_lut
  import edsic_pkg::*;
#(
  parameter int K = 8,
  parameter int Q = K + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 upd,
  input  acc_t                 dq [Q],
  input  logic [$clog2(K)-1:0] idx,
  output coef_t                q0,
  output coef_t                q1,
  output coef_t                q2,
  output acc_t                 q_acc [Q]
);
  acc_t q [Q];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < Q; i++) q[i] <= '0;
    end else if (upd) begin
      for (int i = 0; i < Q; i++) begin
        q[i].re <= sat32(64'(q[i].re) + 64'(dq[i].re));
        q[i].im <= sat32(64'(q[i].im) + 64'(dq[i].im));
      end
    end
  end

  localparam int IW = $clog2(Q);     // index width of the Q-entry table

  always_comb begin
    q0 = acc2coef(q[IW'(idx)]);
    q1 = acc2coef(q[IW'(idx) + IW'(1)]);
    q2 = acc2coef(q[IW'(idx) + IW'(2)]);
    for (int i = 0; i < Q; i++) q_acc[i] = q[i];
  end
endmodule
