// dc_correction: removes the DC offset of the received samples before they
// reach the canceller (a DC offset biases the fixed-point canceller, as the
// document notes). The document gives the function only; this design uses a
// first-order DC tracker: m <- m + (x - m) / 2^SHIFT per sample, y = x - m,
// with m held with 16 extra fractional bits. SHIFT = 12 gives a time constant
// of 4096 samples (34 us at 120 MHz).
// One register stage: out_valid follows in_valid by one cycle.
module dc_correction
  import edsic_pkg::*;
#(
  parameter int SHIFT = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);
  // running mean, Q4.28 (16 extra fractional bits)
  logic signed [31:0] m_re, m_im;
  logic signed [32:0] er, ei;

  assign er = 33'($signed({in_data.re, 16'd0})) - 33'(m_re);
  assign ei = 33'($signed({in_data.im, 16'd0})) - 33'(m_im);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_re <= '0; m_im <= '0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        m_re <= m_re + 32'(er >>> SHIFT);
        m_im <= m_im + 32'(ei >>> SHIFT);
        out_data.re <= sat16(64'(er >>> 16));
        out_data.im <= sat16(64'(ei >>> 16));
      end
    end
  end
endmodule
