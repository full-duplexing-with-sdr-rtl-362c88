// tb_dc_correction: checks the RX DC remover. A constant DC offset plus a
// zero-mean square wave is applied; after settling (time constant 2^SHIFT
// samples) the mean of the output must be within 4 LSB of zero while the AC
// part passes through. A bit-exact reference model of the loop is run in
// parallel and every output, one clock after its input, must match it.
module tb_dc_correction;
  import edsic_pkg::*;
  localparam int SHIFT = 12;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dc_correction #(.SHIFT(SHIFT)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint mr = 0, mi = 0;

  function automatic logic signed [15:0] sat(input longint v);
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  initial begin
    longint er, ei, sum_re, sum_im;
    sample_t e;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sum_re = 0; sum_im = 0;
    for (int n = 0; n < 40000; n++) begin
      in_valid = 1;
      in_data.re = 16'(1500 + (((n / 7) % 2) ? 800 : -800));
      in_data.im = 16'(-2200 + (((n / 5) % 2) ? 300 : -300) + $signed($urandom_range(0, 20)) - 10);
      er = (longint'(in_data.re) <<< 16) - mr;
      ei = (longint'(in_data.im) <<< 16) - mi;
      e.re = sat(er >>> 16);
      e.im = sat(ei >>> 16);
      mr = 64'(32'(mr + (er >>> SHIFT)));
      mi = 64'(32'(mi + (ei >>> SHIFT)));
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_data != e) begin
        failures++;
        if (failures < 5) $display("n %0d got %h exp %h", n, out_data, e);
      end
      if (n >= 30000) begin
        sum_re += out_data.re;
        sum_im += out_data.im;
      end
    end
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    checks++;
    if ((sum_re / 10000) > 4 || (sum_re / 10000) < -4 ||
        (sum_im / 10000) > 4 || (sum_im / 10000) < -4) begin
      failures++;
      $display("residual DC %0d %0d", sum_re / 10000, sum_im / 10000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
