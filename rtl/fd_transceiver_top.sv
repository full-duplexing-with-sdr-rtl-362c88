// fd_transceiver_top: baseband full-duplex transceiver with an extended
// Hammerstein self-interference canceller, as laid out in the document's
// Fig. 4. Two clock domains:
//   clk120 (transceiver loop, one sample per clock at the converter rate)
//     TX: tx_loop_buffer (host block, replayed) -> digital_gain ->
//         interpolation 32 -> 120 MHz (P/Q = 15/4) -> DAC port.
//         A copy of the DAC stream goes through tx_delay (z^-n) and a
//         120 -> 60 MHz decimator into a FIFO: this is x[n].
//     RX: ADC port (14 bit) -> dc_correction -> freq_shift (IF to baseband)
//         -> 120 -> 60 MHz decimator -> FIFO: this is d[n].
//         The canceller output e[n] returns through a FIFO and a
//         60 -> 120 MHz interpolator; the RX switch picks either it or the
//         uncancelled baseband signal, and a 120 -> 32 MHz decimator feeds
//         the host stream.
//   clk60 (canceller loop): edsic takes one (x, d) pair per clock when both
//         FIFOs hold a sample and the return FIFO has room.
// The x/d pairs seen by the canceller are also brought out (cap_*) for the
// host's delay estimation. Host DMA streams, ADC and DAC are outside this
// module and appear as plain ports; every control input is meant to be set
// by the host and held while it is used (no synchronisers are placed on
// these quasi-static settings). The ADC is expected to deliver a sample on
// every clk120 cycle, so that x[n] and d[n] keep a fixed offset. The 14-bit ADC word is placed in the upper
// bits of the 16-bit Q4.12 sample (x4), this design's choice.
// Setting tx_delay_n M_PRE samples (at 60 MHz, i.e. 2*M_PRE at 120 MHz)
// shorter than the measured loop delay gives the canceller its pre-cursor
// taps.
module fd_transceiver_top
  import edsic_pkg::*;
#(
  parameter int TX_DEPTH  = 130000,  // loop buffer, samples
  parameter int M         = 60,      // canceller FIR taps
  parameter int TAU       = 5,       // taps used in the q / h updates
  parameter int M_PRE     = 5,       // pre-cursor taps
  parameter int K         = 8,       // spline regions
  parameter int MAX_DELAY = 64,      // z^-n depth at 120 MHz
  parameter int FIFO_AW   = 4        // 16-entry loop FIFOs
) (
  input  logic                         clk120,
  input  logic                         rst120_n,
  input  logic                         clk60,
  input  logic                         rst60_n,
  // host -> TX loop buffer
  input  logic                         host_tx_valid,
  input  sample_t                      host_tx_data,
  output logic                         host_tx_ready,
  input  logic                         tx_clear,
  input  logic                         tx_play,
  output logic                         tx_wrap,
  // host settings (clk120 domain)
  input  logic signed [15:0]           tx_gain,
  input  logic [$clog2(MAX_DELAY)-1:0] tx_delay_n,
  input  logic [31:0]                  rx_phase_inc,
  input  logic                         rx_sel_cancelled,
  // host settings (clk60 domain)
  input  logic                         adapt_en,
  input  logic                         coef_clear,
  input  logic [MU_W-1:0]              mu_w,
  input  logic [MU_W-1:0]              mu_q,
  input  logic [MU_W-1:0]              mu_h,
  // converters (clk120)
  output logic                         dac_valid,
  output sample_t                      dac_data,
  input  logic                         adc_valid,
  input  logic signed [13:0]           adc_i,
  input  logic signed [13:0]           adc_q,
  // RX stream to the host, 32 MS/s on clk120
  output logic                         host_rx_valid,
  output sample_t                      host_rx_data,
  // canceller input pairs for delay estimation (clk60)
  output logic                         cap_valid,
  output sample_t                      cap_x,
  output sample_t                      cap_d,
  // canceller output (clk60) and FIFO status
  output logic                         e_valid,
  output sample_t                      e_data,
  output logic                         fifo_overflow
);
  // ---------------- TX chain ----------------
  logic    buf_valid, buf_ready;
  sample_t buf_data;
  logic    g_valid, g_ready;
  sample_t g_data;

  tx_loop_buffer #(.DEPTH(TX_DEPTH)) u_txbuf (
    .clk(clk120), .rst_n(rst120_n), .clear(tx_clear), .play(tx_play),
    .wr_valid(host_tx_valid), .wr_data(host_tx_data), .wr_ready(host_tx_ready),
    .rd_valid(buf_valid), .rd_data(buf_data), .rd_ready(buf_ready), .wrap(tx_wrap));

  digital_gain u_gain (
    .clk(clk120), .rst_n(rst120_n), .gain(tx_gain),
    .in_valid(buf_valid), .in_data(buf_data), .in_ready(buf_ready),
    .out_valid(g_valid), .out_data(g_data), .out_ready(g_ready));

  lin_interp_resampler #(.P(15), .Q(4)) u_tx_interp (
    .clk(clk120), .rst_n(rst120_n), .in_valid(g_valid), .in_data(g_data), .in_ready(g_ready),
    .out_ready(1'b1), .out_valid(dac_valid), .out_data(dac_data));

  // x[n] path: z^-n, decimation to 60 MHz, FIFO. The DAC is written on
  // every clock (zero while nothing is transmitted), so this copy runs on
  // every clock too and stays in step with the ADC stream.
  logic    xd_valid, x60_valid;
  sample_t xd_data, x60_data, tx_stream;
  assign tx_stream = dac_valid ? dac_data : '0;
  tx_delay #(.MAX_DELAY(MAX_DELAY)) u_delay (
    .clk(clk120), .rst_n(rst120_n), .delay(tx_delay_n),
    .in_valid(1'b1), .in_data(tx_stream), .out_valid(xd_valid), .out_data(xd_data));

  lin_decim_resampler #(.P(1), .Q(2)) u_x_decim (
    .clk(clk120), .rst_n(rst120_n), .in_valid(xd_valid), .in_data(xd_data),
    .out_valid(x60_valid), .out_data(x60_data));

  // ---------------- RX chain ----------------
  sample_t adc_s;
  assign adc_s.re = {adc_i, 2'b00};
  assign adc_s.im = {adc_q, 2'b00};

  logic    dc_valid, bb_valid, d60_valid;
  sample_t dc_data, bb_data, d60_data;
  dc_correction u_dc (
    .clk(clk120), .rst_n(rst120_n), .in_valid(adc_valid), .in_data(adc_s),
    .out_valid(dc_valid), .out_data(dc_data));

  freq_shift u_fshift (
    .clk(clk120), .rst_n(rst120_n), .phase_inc(rx_phase_inc),
    .in_valid(dc_valid), .in_data(dc_data), .out_valid(bb_valid), .out_data(bb_data));

  lin_decim_resampler #(.P(1), .Q(2)) u_d_decim (
    .clk(clk120), .rst_n(rst120_n), .in_valid(bb_valid), .in_data(bb_data),
    .out_valid(d60_valid), .out_data(d60_data));

  // ---------------- loop FIFOs ----------------
  logic    fx_wready, fd_wready, fe_wready;
  logic    fx_rvalid, fd_rvalid, fe_rvalid, fe_rready;
  sample_t fx_rdata, fd_rdata, fe_rdata;
  logic    adv;

  async_fifo #(.WIDTH($bits(sample_t)), .AW(FIFO_AW)) u_fifo_x (
    .wclk(clk120), .wrst_n(rst120_n), .w_valid(x60_valid), .w_data(x60_data), .w_ready(fx_wready),
    .rclk(clk60), .rrst_n(rst60_n), .r_valid(fx_rvalid), .r_data(fx_rdata), .r_ready(adv));

  async_fifo #(.WIDTH($bits(sample_t)), .AW(FIFO_AW)) u_fifo_d (
    .wclk(clk120), .wrst_n(rst120_n), .w_valid(d60_valid), .w_data(d60_data), .w_ready(fd_wready),
    .rclk(clk60), .rrst_n(rst60_n), .r_valid(fd_rvalid), .r_data(fd_rdata), .r_ready(adv));

  // ---------------- canceller loop (clk60) ----------------
  assign adv = fx_rvalid && fd_rvalid && fe_wready;

  edsic #(.M(M), .TAU(TAU), .M_PRE(M_PRE), .K(K)) u_edsic (
    .clk(clk60), .rst_n(rst60_n), .in_valid(adv), .x(fx_rdata), .d(fd_rdata),
    .adapt_en, .coef_clear, .mu_w, .mu_q, .mu_h, .e_valid, .e(e_data));

  assign cap_valid = adv;
  assign cap_x     = fx_rdata;
  assign cap_d     = fd_rdata;

  async_fifo #(.WIDTH($bits(sample_t)), .AW(FIFO_AW)) u_fifo_e (
    .wclk(clk60), .wrst_n(rst60_n), .w_valid(e_valid), .w_data(e_data), .w_ready(fe_wready),
    .rclk(clk120), .rrst_n(rst120_n), .r_valid(fe_rvalid), .r_data(fe_rdata), .r_ready(fe_rready));

  // sticky flag: a sample was offered to a full FIFO (should never happen
  // when the two clocks are locked 2:1)
  always_ff @(posedge clk120) begin
    if (!rst120_n) fifo_overflow <= 1'b0;
    else if ((x60_valid && !fx_wready) || (d60_valid && !fd_wready)) fifo_overflow <= 1'b1;
  end

  // ---------------- cancelled signal back to 120 MHz, switch, host ----------------
  logic    e120_valid, sw_valid;
  sample_t e120_data, sw_data;
  lin_interp_resampler #(.P(2), .Q(1)) u_e_interp (
    .clk(clk120), .rst_n(rst120_n), .in_valid(fe_rvalid), .in_data(fe_rdata), .in_ready(fe_rready),
    .out_ready(1'b1), .out_valid(e120_valid), .out_data(e120_data));

  // RX switch: cancelled or uncancelled baseband stream to the host
  always_comb begin
    if (rx_sel_cancelled) begin
      sw_valid = e120_valid;
      sw_data  = e120_data;
    end else begin
      sw_valid = bb_valid;
      sw_data  = bb_data;
    end
  end

  lin_decim_resampler #(.P(4), .Q(15)) u_rx_decim (
    .clk(clk120), .rst_n(rst120_n), .in_valid(sw_valid), .in_data(sw_data),
    .out_valid(host_rx_valid), .out_data(host_rx_data));

  // the return FIFO is written only when it has room (adv checks fe_wready
  // five cycles earlier; the canceller pipeline holds at most five samples
  // while the FIFO drains at twice the rate they arrive)
  assert property (@(posedge clk60) disable iff (!rst60_n) e_valid |-> fe_wready);
endmodule
