// tb_mag_approx: checks the alpha-max-beta-min magnitude against the formula
// evaluated in real arithmetic (within 1 LSB) and against the true magnitude
// (within 4 %: the 3.95 % bound of the method plus quantisation), for random and
// corner-case inputs.
module tb_mag_approx;
  import edsic_pkg::*;
  sample_t x;
  logic [15:0] mag;
  int checks = 0, failures = 0;

  mag_approx dut (.x, .mag);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic signed [15:0] re, input logic signed [15:0] im);
    real ar, ai, mx, mn, ref_v, true_v;
    x.re = re; x.im = im;
    #1;
    ar = (re < 0) ? -$itor(re) : $itor(re);
    ai = (im < 0) ? -$itor(im) : $itor(im);
    mx = (ar > ai) ? ar : ai;
    mn = (ar > ai) ? ai : ar;
    ref_v  = 0.96043387 * mx + 0.397824735 * mn;
    true_v = $sqrt(ar * ar + ai * ai);
    checks++;
    if ($itor(mag) > ref_v + 1.0 || $itor(mag) < ref_v - 1.0) begin
      failures++;
      $display("mag(%0d,%0d) = %0d, formula %0.2f", re, im, mag, ref_v);
    end
    checks++;
    if ($itor(mag) > true_v * 1.0400 + 2.0 || $itor(mag) < true_v * 0.9600 - 2.0) begin
      failures++;
      $display("mag(%0d,%0d) = %0d, true %0.2f", re, im, mag, true_v);
    end
  endtask

  initial begin
    one(0, 0); one(4096, 0); one(0, -4096); one(-32768, -32768); one(32767, -32768);
    one(4096, 4096); one(-1, 1);
    for (int i = 0; i < 2000; i++) one(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
