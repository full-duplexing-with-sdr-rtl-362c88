// tb_fd_transceiver_top: end-to-end test of the full-duplex transceiver at
// its default parameters (130,000-sample loop buffer, 60-tap canceller).
// The testbench plays the host and the radio: it loads a block of random
// complex samples, starts the looped transmission, and closes the loop from
// the DAC port to the ADC port through its own model of the transmitter
// impairments and coupling channel (PA compression, I/Q image, LO leakage,
// a three-tap channel, a 7.5 MHz low IF, an ADC DC offset and 14-bit
// quantisation).
// Checks and counted mechanisms:
//   * DAC samples equal the gained block, linearly interpolated by 15/4
//     (within 6 LSB: the interpolator uses a 16-bit reciprocal of 15), across a wrap of the loop buffer;
//   * loop-buffer wraps, x/d capture pairs, canceller outputs all happen;
//   * RX switch used in both positions, with host output in each;
//   * coefficient clear and adaptation used; the host stream power with the
//     cancelled signal selected is at least 20 dB below the uncancelled one;
//   * the loop FIFOs never overflow.
module tb_fd_transceiver_top;
  import edsic_pkg::*;
  localparam int NBLK = 512;           // samples in the host block
  localparam int D_CH = 20;            // DAC -> ADC delay, 120 MHz cycles
  localparam int DELAY_N = 12;         // z^-n setting (see top header)

  logic clk120 = 0, clk60 = 0, rst120_n = 0, rst60_n = 0;
  always #4 clk120 = ~clk120;
  always @(posedge clk120) clk60 <= ~clk60;

  logic host_tx_valid = 0, tx_clear = 0, tx_play = 0, rx_sel_cancelled = 0;
  sample_t host_tx_data;
  logic host_tx_ready, tx_wrap;
  logic signed [15:0] tx_gain = 16'sd6144;          // x1.5
  logic [5:0] tx_delay_n = DELAY_N;
  logic [31:0] rx_phase_inc = 32'hF000_0000;       // -7.5 MHz at 120 MHz
  logic adapt_en = 0, coef_clear = 0;
  logic [MU_W-1:0] mu_w = 7, mu_q = 6, mu_h = 6;
  logic dac_valid, adc_valid = 0;
  sample_t dac_data;
  logic signed [13:0] adc_i = 0, adc_q = 0;
  logic host_rx_valid, cap_valid, e_valid, fifo_overflow;
  sample_t host_rx_data, cap_x, cap_d, e_data;

  fd_transceiver_top dut (.*);

  int checks = 0, failures = 0;
  int n_wrap = 0, n_cap = 0, n_e = 0, n_rx_raw = 0, n_rx_canc = 0, n_clear = 0, n_adapt = 0;

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host block ----
  sample_t blk [NBLK];
  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 6; i++) acc += $itor($urandom_range(0, 65535)) / 65536.0 - 0.5;
    return acc;
  endfunction

  // ---- radio model: DAC -> impairments -> channel -> IF -> ADC ----
  real dly_re [$], dly_im [$];
  longint unsigned n_adc = 0;
  always @(posedge clk120) if (rst120_n) begin
    real xr, xq, m2, pr, pq, ir, iq, vr, vq, cr, sn, ar, aq;
    real c_re [3] = '{0.45, -0.15, 0.08};
    real c_im [3] = '{0.25, 0.10, -0.04};
    xr = dac_valid ? $itor(dac_data.re) / 4096.0 : 0.0;
    xq = dac_valid ? $itor(dac_data.im) / 4096.0 : 0.0;
    m2 = xr * xr + xq * xq;
    pr = xr * (1.0 - 0.06 * m2) - xq * (0.02 * m2);
    pq = xq * (1.0 - 0.06 * m2) + xr * (0.02 * m2);
    ir = pr + 0.05 * pr + 0.03 * pq + 0.01 * $itor(dac_valid);
    iq = pq + 0.03 * pr - 0.05 * pq - 0.008 * $itor(dac_valid);
    dly_re.push_front(ir); dly_im.push_front(iq);
    if (dly_re.size() > D_CH + 3) begin void'(dly_re.pop_back()); void'(dly_im.pop_back()); end
    vr = 0.0; vq = 0.0;
    for (int j = 0; j < 3; j++) if (D_CH + j < dly_re.size()) begin
      vr += c_re[j] * dly_re[D_CH + j] - c_im[j] * dly_im[D_CH + j];
      vq += c_re[j] * dly_im[D_CH + j] + c_im[j] * dly_re[D_CH + j];
    end
    // up to the +7.5 MHz IF, plus the ADC's own DC offset
    cr = $cos(2.0 * 3.14159265358979 * $itor(n_adc % 16) / 16.0);
    sn = $sin(2.0 * 3.14159265358979 * $itor(n_adc % 16) / 16.0);
    ar = vr * cr - vq * sn + 0.04;
    aq = vr * sn + vq * cr - 0.03;
    adc_i <= 14'($rtoi(ar * 1024.0));
    adc_q <= 14'($rtoi(aq * 1024.0));
    adc_valid <= 1'b1;
    n_adc++;
  end

  // ---- DAC check against the block ----
  int n_dac = 0;
  always @(posedge clk120) if (rst120_n && dac_valid && n_dac < 2000) begin
    int k, f;
    real g0r, g0i, g1r, g1i, er, ei;
    k = (4 * n_dac) / 15;
    f = (4 * n_dac) % 15;
    g0r = $itor(sat16(64'((32'(blk[k % NBLK].re) * 32'(tx_gain)) >>> 12)));
    g0i = $itor(sat16(64'((32'(blk[k % NBLK].im) * 32'(tx_gain)) >>> 12)));
    g1r = $itor(sat16(64'((32'(blk[(k + 1) % NBLK].re) * 32'(tx_gain)) >>> 12)));
    g1i = $itor(sat16(64'((32'(blk[(k + 1) % NBLK].im) * 32'(tx_gain)) >>> 12)));
    er = g0r + (g1r - g0r) * f / 15.0;
    ei = g0i + (g1i - g0i) * f / 15.0;
    checks++;
    if (($itor(dac_data.re) - er) ** 2 > 36.0 || ($itor(dac_data.im) - ei) ** 2 > 36.0) begin
      failures++;
      if (failures < 12) $display("DAC %0d: %0d,%0d expected %0.1f,%0.1f", n_dac, dac_data.re, dac_data.im, er, ei);
    end
    n_dac++;
  end

  // ---- counters and power meters ----
  real p_acc; int p_n; bit p_on;
  always @(posedge clk120) begin
    if (tx_wrap) n_wrap++;
    if (fifo_overflow) begin
      // counted once at the end
    end
    if (host_rx_valid) begin
      if (rx_sel_cancelled) n_rx_canc++; else n_rx_raw++;
      if (p_on) begin
        p_acc += $itor(host_rx_data.re) ** 2 + $itor(host_rx_data.im) ** 2;
        p_n++;
      end
    end
  end
  always @(posedge clk60) begin
    if (cap_valid) n_cap++;
    if (e_valid) n_e++;
    if (coef_clear) n_clear++;
    if (adapt_en && cap_valid) n_adapt++;
  end

  task automatic measure(input int cycles, output real p);
    p_acc = 0; p_n = 0; p_on = 1;
    repeat (cycles) @(posedge clk120);
    p_on = 0;
    p = (p_n > 0) ? p_acc / p_n : 0.0;
  endtask

  real p_raw, p_canc, canc_db;

  initial begin
    for (int i = 0; i < NBLK; i++) begin
      blk[i].re = 16'($rtoi(gauss() * 0.9 * 4096.0));
      blk[i].im = 16'($rtoi(gauss() * 0.9 * 4096.0));
    end
    repeat (4) @(posedge clk120);
    @(negedge clk120);
    rst120_n = 1; rst60_n = 1;
    // load the block
    for (int i = 0; i < NBLK; i++) begin
      @(negedge clk120);
      host_tx_valid = 1; host_tx_data = blk[i];
      while (!host_tx_ready) @(negedge clk120);
    end
    @(negedge clk120) host_tx_valid = 0;
    @(negedge clk120) tx_play = 1;
    // uncancelled reference
    repeat (3000) @(posedge clk120);
    measure(8000, p_raw);
    // clear and start adapting, cancelled output selected
    @(negedge clk60) coef_clear = 1;
    @(negedge clk60) coef_clear = 0; adapt_en = 1;
    @(negedge clk120) rx_sel_cancelled = 1;
    repeat (120000) @(posedge clk120);
    measure(8000, p_canc);
    canc_db = 10.0 * $log10(p_raw / p_canc);
    $display("host RX power: uncancelled %0.1f, cancelled %0.1f LSB^2, cancellation %0.1f dB", p_raw, p_canc, canc_db);
    checks++; if (canc_db < 20.0) failures++;
    $display("wraps %0d, capture pairs %0d, canceller outputs %0d, RX raw %0d, RX cancelled %0d, clears %0d, adapt steps %0d, DAC checked %0d",
             n_wrap, n_cap, n_e, n_rx_raw, n_rx_canc, n_clear, n_adapt, n_dac);
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_cap == 0) failures++;
    checks++; if (n_e == 0) failures++;
    checks++; if (n_rx_raw == 0) failures++;
    checks++; if (n_rx_canc == 0) failures++;
    checks++; if (n_clear == 0) failures++;
    checks++; if (n_adapt == 0) failures++;
    checks++; if (fifo_overflow) begin failures++; $display("loop FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
