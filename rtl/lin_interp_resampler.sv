// lin_interp_resampler: rational up-sampler by P/Q (P >= Q) with linear
// interpolation, used for the 32 -> 120 MHz transmit interpolation (P = 15,
// Q = 4) and the 60 -> 120 MHz interpolation of the canceller output
// (P = 2, Q = 1). The document names these blocks but not their filters;
// linear interpolation is the simplest filter that does the job and is this
// design's choice.
// Output-driven: on every clock with out_ready high the block emits
//   y = x0 + (x1 - x0) * f / P,
// where x0, x1 are two consecutive input samples and f (0..P-1) is the output
// phase; f then advances by Q and when it passes P the next input sample is
// taken from the ready/valid input. If that input is not there, no output is
// produced that cycle (out_valid low) and nothing is lost. f / P is formed as
// f * ceil(2^16 / P) / 2^16. Output is registered: one cycle latency from the
// phase that uses a sample.
// The document reports 6 clock cycles of delay for each of its resamplers
// at 120 MHz; this one is shorter, so the loop delay differs from it.
module lin_interp_resampler
  import edsic_pkg::*;
#(
  parameter int P = 15,
  parameter int Q = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    in_ready,
  input  logic    out_ready,
  output logic    out_valid,
  output sample_t out_data
);
  localparam int FW = $clog2(P + Q + 1);
  localparam int unsigned RECIP = (65536 + P - 1) / P;

  sample_t x0, x1;
  logic [1:0] primed;                   // number of samples held (0..2)
  logic [FW-1:0] f, f_next;
  logic step;                           // input sample needed this cycle
  logic fire;                           // output produced this cycle
  logic [16:0] coef;
  logic signed [16:0] dr, di;
  logic signed [34:0] mr, mi;

  always_comb begin
    f_next   = f + FW'(Q);
    step     = (f_next >= FW'(P));
    fire     = out_ready && (primed == 2'd2) && (!step || in_valid);
    in_ready = (primed != 2'd2) || (fire && step);
    coef     = 17'(32'(f) * RECIP);
    dr       = 17'(x1.re) - 17'(x0.re);
    di       = 17'(x1.im) - 17'(x0.im);
    mr       = 35'(dr) * 35'($signed({1'b0, coef}));
    mi       = 35'(di) * 35'($signed({1'b0, coef}));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x0 <= '0; x1 <= '0; primed <= '0; f <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= fire;
      if (fire) begin
        out_data.re <= sat16(64'(x0.re) + 64'(mr >>> 16));
        out_data.im <= sat16(64'(x0.im) + 64'(mi >>> 16));
        f <= step ? f_next - FW'(P) : f_next;
      end
      if (in_valid && in_ready) begin
        x0 <= x1;
        x1 <= in_data;
        if (primed != 2'd2) primed <= primed + 1'b1;
      end
    end
  end
endmodule
