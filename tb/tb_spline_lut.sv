// tb_spline_lut: checks the control-point table: zero after reset, LMS step
// vectors accumulate per entry, three neighbours are read at every index in
// datapath format (accumulator >> 13), saturation at the accumulator limit,
// and clear.
module tb_spline_lut;
  import edsic_pkg::*;
  localparam int K = 8, Q = 10;
  logic clk = 0, rst_n = 0, clear = 0, upd = 0;
  acc_t dq [Q];
  logic [2:0] idx;
  coef_t q0, q1, q2;
  acc_t q_acc [Q];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spline_lut #(.K(K), .Q(Q)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model_re [Q], model_im [Q];

  function automatic longint sat(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  function automatic longint dp(input longint v);   // datapath value
    longint s = v >>> 13;
    if (s > 131071) s = 131071;
    if (s < -131072) s = -131072;
    return s;
  endfunction

  task automatic check_reads();
    for (int i = 0; i < K; i++) begin
      idx = 3'(i);
      #1;
      checks++;
      if (longint'(q0.re) != dp(model_re[i]) || longint'(q1.im) != dp(model_im[i+1]) ||
          longint'(q2.re) != dp(model_re[i+2]) || longint'(q2.im) != dp(model_im[i+2])) begin
        failures++;
        $display("idx %0d: q0.re %0d (exp %0d) q2.im %0d (exp %0d)", i, q0.re, dp(model_re[i]), q2.im, dp(model_im[i+2]));
      end
    end
  endtask

  initial begin
    for (int m = 0; m < Q; m++) begin model_re[m] = 0; model_im[m] = 0; dq[m] = '0; end
    idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_reads();
    for (int it = 0; it < 50; it++) begin
      @(negedge clk);
      for (int m = 0; m < Q; m++) begin
        dq[m].re = 32'($urandom) >>> 6;
        dq[m].im = -(32'($urandom) >>> 6);
      end
      upd = 1;
      @(negedge clk);
      upd = 0;
      for (int m = 0; m < Q; m++) begin
        model_re[m] = sat(model_re[m] + longint'(dq[m].re));
        model_im[m] = sat(model_im[m] + longint'(dq[m].im));
      end
      check_reads();
    end
    // direct accumulator view
    for (int m = 0; m < Q; m++) begin
      checks++;
      if (longint'(q_acc[m].re) != model_re[m]) failures++;
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int m = 0; m < Q; m++) begin model_re[m] = 0; model_im[m] = 0; end
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
