// tb_impairment_model: checks t = h0 + h1 x* + h2 |x|^2 x* against a real
// model within 4 LSB, for random h and x (|x| < 2.5 so that |x|^2 x* stays in
// range), three samples after x was accepted, and the side output
// p = |x|^2 x within 4 LSB.
module tb_impairment_model;
  import edsic_pkg::*;
  logic clk = 0, rst_n = 0, adv = 0;
  sample_t x_in, x3;
  coef_t h [3];
  sig_t t, p3;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  impairment_model dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hr [3], hi [3];
  sample_t hist [$];

  initial begin
    x_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int set = 0; set < 5; set++) begin
      for (int l = 0; l < 3; l++) begin
        h[l].re = 18'($signed($urandom_range(0, 32767)) - 16384);
        h[l].im = 18'($signed($urandom_range(0, 32767)) - 16384);
        hr[l] = $itor(h[l].re) / 32768.0; hi[l] = $itor(h[l].im) / 32768.0;
      end
      hist.delete();
      for (int k = 0; k < 500; k++) begin
        sample_t xs;
        xs.re = 16'($signed($urandom_range(0, 14000)) - 7000);
        xs.im = 16'($signed($urandom_range(0, 14000)) - 7000);
        @(negedge clk);
        x_in = xs; adv = 1;
        hist.push_back(xs);
        @(posedge clk); #1;
        if (hist.size() == 3) begin
          sample_t o;
          real xr, xq, m2, cr, ci, er, ei, pr, pq;
          o = hist.pop_front();
          xr = $itor(o.re) / 4096.0; xq = $itor(o.im) / 4096.0;
          m2 = xr * xr + xq * xq;
          cr = m2 * xr; ci = -m2 * xq;           // |x|^2 x*
          er = (hr[0] + (hr[1] * xr + hi[1] * xq) + (hr[2] * cr - hi[2] * ci)) * 4096.0;
          ei = (hi[0] + (hi[1] * xr - hr[1] * xq) + (hr[2] * ci + hi[2] * cr)) * 4096.0;
          checks++;
          if ((($itor(t.re) - er) ** 2 > 16.0) || (($itor(t.im) - ei) ** 2 > 16.0)) begin
            failures++;
            if (failures < 10) $display("t=%0d,%0d expected %0.1f,%0.1f", t.re, t.im, er, ei);
          end
          pr = m2 * xr * 4096.0; pq = m2 * xq * 4096.0;
          checks++;
          if ((($itor(p3.re) - pr) ** 2 > 16.0) || (($itor(p3.im) - pq) ** 2 > 16.0) || x3 != o) failures++;
        end
      end
      @(negedge clk) adv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
