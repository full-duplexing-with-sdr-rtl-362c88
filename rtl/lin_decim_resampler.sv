// lin_decim_resampler: rational down-sampler by P/Q (P < Q) used for the
// 120 -> 60 MHz decimation of x[n] and d[n] (P = 1, Q = 2) and the
// 120 -> 32 MHz decimation of the receive stream (P = 4, Q = 15). The
// document names these blocks but not their filters; this design uses a
// [1 2 1]/4 anti-alias pre-filter followed by linear interpolation between
// the newest two filtered samples at the output instants, the simplest
// choice that does the job.
// Input-driven: each input sample (in_valid) moves the filter on by one. The
// next output instant T is kept in units of 1/P input period, measured from
// the older of the two newest filtered samples v1, v; when T < P an output
//   y = v1 + (v - v1) * T / P
// is produced and T advances by Q - P, otherwise T falls by P.
// Latency: output registered; at most one output per input.
// The document reports 6 clock cycles of delay for each of its resamplers
// at 120 MHz; this one is shorter, so the loop delay differs from it.
module lin_decim_resampler
  import edsic_pkg::*;
#(
  parameter int P = 1,
  parameter int Q = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);
  localparam int TW = $clog2(Q + P + 1);
  localparam int unsigned RECIP = (65536 + P - 1) / P;

  sample_t xa, xb;           // previous two raw inputs
  sample_t v1;               // previous filtered sample
  sample_t fnew;
  logic [1:0] fill;
  logic [TW-1:0] t;
  logic [16:0] coef;
  logic signed [16:0] dr, di;
  logic signed [34:0] mr, mi;

  always_comb begin
    fnew.re = 16'((18'(in_data.re) + 18'(xa.re) + 18'(xa.re) + 18'(xb.re)) >>> 2);
    fnew.im = 16'((18'(in_data.im) + 18'(xa.im) + 18'(xa.im) + 18'(xb.im)) >>> 2);
    coef    = 17'(32'(t) * RECIP);
    dr      = 17'(fnew.re) - 17'(v1.re);
    di      = 17'(fnew.im) - 17'(v1.im);
    mr      = 35'(dr) * 35'($signed({1'b0, coef}));
    mi      = 35'(di) * 35'($signed({1'b0, coef}));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xa <= '0; xb <= '0; v1 <= '0; fill <= '0; t <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        xb <= xa;
        xa <= in_data;
        v1 <= fnew;
        if (fill != 2'd3) fill <= fill + 1'b1;
        if (fill == 2'd3) begin
          // interval between v1 (older) and fnew (newer)
          if (t < TW'(P)) begin
            out_valid   <= 1'b1;
            out_data.re <= sat16(64'(v1.re) + 64'(mr >>> 16));
            out_data.im <= sat16(64'(v1.im) + 64'(mi >>> 16));
            t <= t + TW'(Q - P);
          end else begin
            t <= t - TW'(P);
          end
        end
      end
    end
  end
endmodule
