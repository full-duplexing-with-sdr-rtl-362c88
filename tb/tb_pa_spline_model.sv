// tb_pa_spline_model: checks the PA branch r = x (1 + Psi^T q).
//   1. with all control points zero, r equals x, three samples after it was
//      accepted (three register stages);
//   2. with random control points loaded through the update port, r matches
//      a real-valued model (alpha-max-beta-min magnitude, unit-spaced
//      second-order B-spline interpolation, r = x (1 + F)) within 8 LSB;
//   3. the stage-3 side outputs (x, index) belong to the same sample as r.
module tb_pa_spline_model;
  import edsic_pkg::*;
  localparam int K = 8, Q = 10;
  logic clk = 0, rst_n = 0, adv = 0, q_clear = 0, q_upd = 0;
  sample_t x_in, x3;
  acc_t dq [Q];
  acc_t q_acc [Q];
  sig_t r;
  logic [2:0] idx3;
  logic [BASIS_W-1:0] b3 [3];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pa_spline_model #(.K(K), .Q(Q)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real qr [Q], qi [Q];
  sample_t hist [$];

  task automatic expect_r(input sample_t xs, input bit zero_q);
    real xr, xq, ar, ai, mx, mn, a, u, b0, b1, b2, fr, fi, er, ei;
    int i;
    xr = $itor(xs.re) / 4096.0; xq = $itor(xs.im) / 4096.0;
    ar = xr < 0 ? -xr : xr; ai = xq < 0 ? -xq : xq;
    mx = ar > ai ? ar : ai; mn = ar > ai ? ai : ar;
    a = 0.96043387 * mx + 0.397824735 * mn;
    if (a > 8.0 - 1.0 / 4096.0) a = 8.0 - 1.0 / 4096.0;
    i = $rtoi(a);  // floor for a >= 0
    u = a - i;
    b0 = 0.5 * (1 - u) * (1 - u); b1 = 0.5 * (-2 * u * u + 2 * u + 1); b2 = 0.5 * u * u;
    fr = b0 * qr[i] + b1 * qr[i+1] + b2 * qr[i+2];
    fi = b0 * qi[i] + b1 * qi[i+1] + b2 * qi[i+2];
    er = (xr * (1 + fr) - xq * fi) * 4096.0;
    ei = (xq * (1 + fr) + xr * fi) * 4096.0;
    checks++;
    if (zero_q) begin
      if (r.re != 18'(xs.re) || r.im != 18'(xs.im)) begin
        failures++;
        $display("q=0: r=%0d,%0d x=%0d,%0d", r.re, r.im, xs.re, xs.im);
      end
    end else if ((($itor(r.re) - er) ** 2 > 64.0) || (($itor(r.im) - ei) ** 2 > 64.0)) begin
      failures++;
      if (failures < 10) $display("x=%0d,%0d: r=%0d,%0d expected %0.1f,%0.1f", xs.re, xs.im, r.re, r.im, er, ei);
    end
    checks++;
    if (x3 != xs) failures++;
  endtask

  task automatic run(input int n, input bit zero_q);
    hist.delete();
    for (int k = 0; k < n; k++) begin
      sample_t xs;
      int amp = (k % 3 == 0) ? 32767 : 12000;
      xs.re = 16'($signed($urandom_range(0, 2 * amp)) - amp);
      xs.im = 16'($signed($urandom_range(0, 2 * amp)) - amp);
      @(negedge clk);
      x_in = xs; adv = 1;
      hist.push_back(xs);
      // after this edge the sample accepted three edges ago is on r
      @(posedge clk); #1;
      if (hist.size() == 3) expect_r(hist.pop_front(), zero_q);
    end
    @(negedge clk) adv = 0;
  endtask

  initial begin
    x_in = '0;
    for (int m = 0; m < Q; m++) dq[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < Q; m++) begin qr[m] = 0; qi[m] = 0; end
    run(300, 1);
    // load random control points in [-0.25, 0.25)
    @(negedge clk);
    for (int m = 0; m < Q; m++) begin
      int vr = $signed($urandom_range(0, 16383)) - 8192;   // datapath LSBs (2^-15)
      int vi = $signed($urandom_range(0, 16383)) - 8192;
      dq[m].re = 32'(vr) <<< 13;
      dq[m].im = 32'(vi) <<< 13;
      qr[m] = $itor(vr) / 32768.0;
      qi[m] = $itor(vi) / 32768.0;
    end
    q_upd = 1;
    @(negedge clk) q_upd = 0;
    run(3000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
