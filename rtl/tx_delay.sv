// tx_delay: the programmable delay z^-n on the copy of the transmit signal
// that feeds the canceller, so that x[n] and the received d[n] line up
// despite the DAC, ADC and propagation delays. The host estimates n by cross-
// correlation (document, Sec. IV-B); here it is an input. The depth
// (MAX_DELAY = 64 samples at 120 MHz) is this design's choice.
// A circular buffer advances on every in_valid; the output sample is the
// input from 'delay' + 1 valid samples earlier (the +1 is the read register).
// out_valid follows in_valid by one cycle.
module tx_delay
  import edsic_pkg::*;
#(
  parameter int MAX_DELAY = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_DELAY)-1:0] delay,
  input  logic                         in_valid,
  input  sample_t                      in_data,
  output logic                         out_valid,
  output sample_t                      out_data
);
  localparam int AW = $clog2(MAX_DELAY);
  sample_t mem [MAX_DELAY];
  logic [AW-1:0] wptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      out_valid <= 1'b0;
      out_data <= '0;
      for (int i = 0; i < MAX_DELAY; i++) mem[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mem[wptr] <= in_data;
        out_data  <= (delay == '0) ? in_data : mem[wptr - delay];
        wptr      <= wptr + 1'b1;
      end
    end
  end
endmodule
