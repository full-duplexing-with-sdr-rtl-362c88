// tb_edsic: self-checking test of the extended Hammerstein canceller.
// A synthetic transmitter/coupling model, written here with real arithmetic
// and independent of the RTL, produces d[n] from random complex x[n]:
//   PA:      xp = x (1 + a3 |x|^2)
//   I/Q, LO: xi = g1 xp + g2 conj(xp) + c_lo
//   channel: d[n] = sum_j c_j xi[n - (M_PRE-1) - j], j = 0..2
// Checks:
//   1. with adaptation off and zero coefficients, e equals d exactly and
//      appears exactly five clock cycles after the sample was presented;
//   2. with adaptation on (eDSIC), the residual power drops by >= 30 dB;
//   3. with the impairment coefficients h frozen (the PA-only canceller), the
//      residual stays at least 6 dB above the eDSIC one, because the I/Q
//      image and LO leakage cannot be modelled without h.
module tb_edsic;
  import edsic_pkg::*;
  localparam int M = 60, TAU = 5, M_PRE = 5, K = 8;
  localparam int NRUN = 30000, NMEAS = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, adapt_en = 0, coef_clear = 0;
  sample_t x, d, e;
  logic e_valid;
  logic [MU_W-1:0] mu_w = 7, mu_q = 6, mu_h = 6;

  edsic #(.M(M), .TAU(TAU), .M_PRE(M_PRE), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference SI generator ----
  real xi_hist_re [3];
  real xi_hist_im [3];
  real dl_re [$], dl_im [$];
  bit use_iq = 1;

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 6; i++) acc += $itor($urandom_range(0, 65535)) / 65536.0 - 0.5;
    return acc;  // variance 0.5
  endfunction

  task automatic gen(output sample_t xs, output sample_t ds);
    real xr, xq, m2, pr, pq, ir, iq, dr, dq2;
    real c_re [3] = '{0.5, -0.2, 0.1};
    real c_im [3] = '{0.3, 0.15, -0.05};
    xr = 0.7 * gauss(); xq = 0.7 * gauss();
    xs.re = 16'($rtoi(xr * 4096.0)); xs.im = 16'($rtoi(xq * 4096.0));
    xr = $itor(xs.re) / 4096.0; xq = $itor(xs.im) / 4096.0;
    m2 = xr * xr + xq * xq;
    pr = xr * (1.0 - 0.08 * m2) - xq * (0.03 * m2);
    pq = xq * (1.0 - 0.08 * m2) + xr * (0.03 * m2);
    if (use_iq) begin
      // g1 = 1, g2 = 0.05 + 0.03j, c_lo = 0.02 - 0.01j
      ir = pr + (0.05 * pr + 0.03 * pq) + 0.02;
      iq = pq + (0.03 * pr - 0.05 * pq) - 0.01;
    end else begin
      ir = pr; iq = pq;
    end
    // newest first: index j corresponds to xi[n - j]
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

  // ---- bookkeeping of presented d samples and outputs ----
  sample_t d_sent [$];
  int unsigned t_sent [$];
  real pd, pe;
  int nout;
  bit collect;

  always @(posedge clk) if (e_valid && collect) begin
    sample_t dref;
    dref = (d_sent.size() > 0) ? d_sent.pop_front() : '0;
    pd += $itor(dref.re) ** 2 + $itor(dref.im) ** 2;
    pe += $itor(e.re) ** 2 + $itor(e.im) ** 2;
    nout++;
  end

  task automatic run(input int n, input bit measure);
    for (int i = 0; i < n; i++) begin
      sample_t xs, ds;
      gen(xs, ds);
      @(negedge clk);
      x = xs; d = ds; in_valid = 1;
      if (measure && i >= n - NMEAS) begin collect = 1; d_sent.push_back(ds); end
    end
    @(negedge clk) in_valid = 0;
  endtask

  real canc_edsic, canc_dsic;

  initial begin
    x = '0; d = '0; collect = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- 1: bypass behaviour and latency ----
    begin
      int unsigned t_in;
      sample_t dq_exp [$];
      int seen = 0;
      fork
        begin
          for (int i = 0; i < 40; i++) begin
            sample_t xs, ds;
            gen(xs, ds);
            @(negedge clk);
            x = xs; d = ds; in_valid = 1;
            if (i == 0) t_in = cyc;
            dq_exp.push_back(ds);
          end
          @(negedge clk) in_valid = 0;
        end
        begin
          while (seen < 35) begin
            @(posedge clk);
            #1;
            if (e_valid) begin
              sample_t ex;
              ex = dq_exp.pop_front();
              if (seen == 0) begin
                checks++;
                // presented before edge t_in+1; result visible after edge t_in+5
                if (cyc - t_in != 5) begin
                  failures++;
                  $display("latency %0d cycles, expected 5", cyc - t_in);
                end
              end
              checks++;
              if (e != ex) begin
                failures++;
                if (failures < 5) $display("bypass mismatch %0d: e=%0d,%0d d=%0d,%0d", seen, e.re, e.im, ex.re, ex.im);
              end
              seen++;
            end
          end
        end
      join
    end
    // ---- 2: eDSIC adaptation ----
    coef_clear = 1; @(negedge clk); coef_clear = 0;
    adapt_en = 1;
    d_sent.delete(); pd = 0; pe = 0; nout = 0;
    run(NRUN, 1);
    repeat (8) @(negedge clk);
    collect = 0;
    canc_edsic = 10.0 * $log10(pd / pe);
    $display("eDSIC: cancellation %0.1f dB over %0d samples", canc_edsic, nout);
    checks++;
    if (canc_edsic < 30.0) failures++;
    // ---- 3: PA-only canceller (h frozen at zero) ----
    coef_clear = 1; @(negedge clk); coef_clear = 0;
    mu_h = 31;
    d_sent.delete(); pd = 0; pe = 0; nout = 0;
    run(NRUN, 1);
    repeat (8) @(negedge clk);
    collect = 0;
    canc_dsic = 10.0 * $log10(pd / pe);
    $display("PA-only: cancellation %0.1f dB", canc_dsic);
    checks++;
    if (canc_edsic - canc_dsic < 6.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
