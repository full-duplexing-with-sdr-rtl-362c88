// tb_multipath_fir: checks the 60-tap complex FIR against an exact integer
// model: after every push, y = (sum_k w_k s[n-k]) >> 15 computed with
// 64-bit integers, and the delay line holds the last M+1 samples in order.
// Coefficients are changed part-way.
module tb_multipath_fir;
  import edsic_pkg::*;
  localparam int M = 60, EXTRA = 1;
  logic clk = 0, rst_n = 0, push = 0;
  sig_t s_in;
  coef_t w [M];
  sig_t line [M+EXTRA];
  logic signed [31:0] y_re, y_im;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  multipath_fir #(.M(M), .EXTRA(EXTRA)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sig_t hist [$];

  task automatic new_w();
    for (int k = 0; k < M; k++) begin
      w[k].re = 18'($urandom);
      w[k].im = 18'($urandom);
    end
  endtask

  initial begin
    s_in = '0;
    new_w();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < M + EXTRA; i++) hist.push_front('0);
    for (int n = 0; n < 400; n++) begin
      sig_t v;
      v.re = 18'($urandom); v.im = 18'($urandom);
      if (n == 200) new_w();
      @(negedge clk);
      s_in = v; push = (n % 7 != 3);     // some cycles without a push
      @(posedge clk); #1;
      if (push) begin
        longint ar, ai;
        ar = 0; ai = 0;
        hist.push_front(v);
        void'(hist.pop_back());
        for (int k = 0; k < M; k++) begin
          ar += longint'(hist[k].re) * longint'(w[k].re) - longint'(hist[k].im) * longint'(w[k].im);
          ai += longint'(hist[k].re) * longint'(w[k].im) + longint'(hist[k].im) * longint'(w[k].re);
        end
        checks++;
        if (longint'(y_re) != (ar >>> 15) || longint'(y_im) != (ai >>> 15)) begin
          failures++;
          if (failures < 10) $display("n=%0d y=%0d,%0d expected %0d,%0d", n, y_re, y_im, ar >>> 15, ai >>> 15);
        end
        checks++;
        if (line[M] != hist[M] || line[0] != v) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
