// digital_gain: digital amplification of the transmit samples before
// interpolation, y = x * g with a real gain g set by the host. The gain word
// is unsigned-range Q4.12 (0 .. 8), the product is truncated to Q4.12 and
// saturated; the format is this design's choice. One register stage with a
// ready/valid handshake on both sides (in_ready = output free or consumed).
module digital_gain
  import edsic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] gain,
  input  logic               in_valid,
  input  sample_t            in_data,
  output logic               in_ready,
  output logic               out_valid,
  output sample_t            out_data,
  input  logic               out_ready
);
  logic signed [31:0] pr, pi;
  assign in_ready = !out_valid || out_ready;
  assign pr = 32'(in_data.re) * 32'(gain);
  assign pi = 32'(in_data.im) * 32'(gain);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data.re <= sat16(64'(pr >>> SAMPLE_F));
        out_data.im <= sat16(64'(pi >>> SAMPLE_F));
      end
    end
  end
endmodule
