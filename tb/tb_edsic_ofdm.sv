// tb_edsic_ofdm: the canceller on the kinds of signal it is evaluated with in
// the published measurements, looped the way the transmit buffer replays one
// stored block:
//   case 1: 10 MHz LTE-like OFDM, 600 QPSK subcarriers, PAPR about 7 dB;
//   case 2: 20 MHz LTE-like OFDM, 1200 64-QAM subcarriers, PAPR about 7 dB.
// The block is built here with real arithmetic as one 4096-sample OFDM symbol
// at the 60 MS/s canceller rate (subcarrier spacing 60 MHz / 4096), clipped to
// 7 dB PAPR. The leak is made by the same kind of reference model as in
// tb_edsic: PA compression, I/Q image, LO leakage and a three-tap channel,
// with the main tap M_PRE samples late.
// Checks, at the default canceller parameters (M = 60, tau = 5, K = 8):
//   * the block's PAPR after clipping lies between 6 and 8 dB;
//   * after 60,000 iterations the residual power is at least 25 dB below the
//     received power (measured over the last 4,096 outputs, one whole block);
//   * one output per input, five cycles behind it (the pipeline advances
//     only with new inputs, so the last four results stay inside it).
module tb_edsic_ofdm;
  import edsic_pkg::*;
  localparam int N = 4096, NRUN = 60000, NMEAS = 4096, M_PRE = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, adapt_en = 0, coef_clear = 0;
  sample_t x, d, e;
  logic e_valid;
  logic [MU_W-1:0] mu_w = 7, mu_q = 6, mu_h = 6;

  edsic dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t blk [N];
  real dl_re [$], dl_im [$];

  function automatic real qam_level(input int bits_per_axis);
    int l;
    l = $urandom_range(0, (1 << bits_per_axis) - 1);
    return $itor(2 * l - ((1 << bits_per_axis) - 1));   // -L+1 .. L-1, odd
  endfunction

  // one OFDM symbol: QAM values X_k on k = -nsc..nsc, k != 0
  task automatic make_block(input int nsc, input int bits_per_axis);
    real sr [N];
    real si [N];
    real pi = 3.14159265358979323846;
    real p = 0.0, pk = 0.0, scale, lim, m;
    for (int n = 0; n < N; n++) begin sr[n] = 0.0; si[n] = 0.0; end
    for (int k = -nsc; k <= nsc; k++) begin
      real ar, ai;
      if (k == 0) continue;
      ar = qam_level(bits_per_axis);
      ai = qam_level(bits_per_axis);
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(2.0 * pi * k * n / N);
        s = $sin(2.0 * pi * k * n / N);
        sr[n] += ar * c - ai * s;
        si[n] += ar * s + ai * c;
      end
    end
    for (int n = 0; n < N; n++) p += sr[n] * sr[n] + si[n] * si[n];
    p = p / N;
    scale = 1.0 / $sqrt(p);                 // rms |x| = 1.0 (Q4.12: 4096)
    lim = $sqrt(5.0);                        // clip at 7 dB above rms power
    p = 0.0;
    for (int n = 0; n < N; n++) begin
      real r, q;
      r = sr[n] * scale; q = si[n] * scale;
      m = $sqrt(r * r + q * q);
      if (m > lim) begin r = r * lim / m; q = q * lim / m; end
      blk[n].re = 16'($rtoi(r * 4096.0));
      blk[n].im = 16'($rtoi(q * 4096.0));
      p += r * r + q * q;
      if (r * r + q * q > pk) pk = r * r + q * q;
    end
    p = p / N;
    $display("OFDM block: PAPR %0.2f dB", 10.0 * $log10(pk / p));
    checks++;
    if (10.0 * $log10(pk / p) < 6.0 || 10.0 * $log10(pk / p) > 8.0) failures++;
  endtask

  task automatic leak(input sample_t xs, output sample_t ds);
    real xr, xq, m2, pr, pq, ir, iq, dr, dq2;
    real c_re [3] = '{0.5, -0.2, 0.1};
    real c_im [3] = '{0.3, 0.15, -0.05};
    xr = $itor(xs.re) / 4096.0; xq = $itor(xs.im) / 4096.0;
    m2 = xr * xr + xq * xq;
    pr = xr * (1.0 - 0.08 * m2) - xq * (0.03 * m2);
    pq = xq * (1.0 - 0.08 * m2) + xr * (0.03 * m2);
    ir = pr + (0.05 * pr + 0.03 * pq) + 0.02;
    iq = pq + (0.03 * pr - 0.05 * pq) - 0.01;
    dl_re.push_front(ir); dl_im.push_front(iq);
    if (dl_re.size() > 3 + M_PRE) begin void'(dl_re.pop_back()); void'(dl_im.pop_back()); end
    dr = 0.0; dq2 = 0.0;
    for (int j = 0; j < 3; j++) begin
      int idx = (M_PRE - 1) + j;
      if (idx < dl_re.size()) begin
        dr  += c_re[j] * dl_re[idx] - c_im[j] * dl_im[idx];
        dq2 += c_re[j] * dl_im[idx] + c_im[j] * dl_re[idx];
      end
    end
    ds.re = 16'($rtoi(dr * 4096.0)); ds.im = 16'($rtoi(dq2 * 4096.0));
  endtask

  sample_t d_in [NRUN];          // d of input k, paired with output k
  real pd = 0.0, pe = 0.0;
  int nin = 0, nout = 0, ncol = 0;
  int unsigned cyc = 0, first_in = 0, first_out = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (e_valid) begin
      if (nout == 0) first_out = cyc;
      if (nout >= NRUN - NMEAS - 4) begin
        pd += $itor(d_in[nout].re) ** 2 + $itor(d_in[nout].im) ** 2;
        pe += $itor(e.re) ** 2 + $itor(e.im) ** 2;
        ncol++;
      end
      nout++;
    end
  end

  task automatic run_case(input int nsc, input int bits_per_axis);
    real canc;
    make_block(nsc, bits_per_axis);
    coef_clear = 1; adapt_en = 0; in_valid = 0;
    repeat (3) @(negedge clk);
    coef_clear = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    pd = 0.0; pe = 0.0; nin = 0; nout = 0; ncol = 0;
    dl_re = {}; dl_im = {};
    adapt_en = 1;
    for (int i = 0; i < NRUN; i++) begin
      sample_t ds;
      leak(blk[i % N], ds);
      @(negedge clk);
      if (i == 0) first_in = cyc;
      x = blk[i % N]; d = ds; in_valid = 1; nin++;
      d_in[i] = ds;
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    canc = 10.0 * $log10(pd / pe);
    $display("OFDM %0d subcarriers: %0d iterations, residual %0.1f dB below the received power (%0d samples)", 2 * nsc, nin, canc, ncol);
    checks++;
    if (canc < 25.0) failures++;
    checks++;
    // the pipeline moves only with new inputs: the last four stay inside
    if (nout != nin - 4) begin failures++; $display("outputs %0d inputs %0d", nout, nin); end
    checks++;
    if (first_out - first_in != 5) begin failures++; $display("latency %0d", first_out - first_in); end
  endtask

  initial begin
    x = '0; d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(300, 1);     // 10 MHz, QPSK
    run_case(600, 3);     // 20 MHz, 64-QAM
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
