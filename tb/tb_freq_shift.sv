// tb_freq_shift: checks the RX frequency shifter (numerically controlled
// oscillator plus complex mixer). For several phase increments a random input
// sequence is mixed; output k must equal x[k] * exp(j 2 pi k inc / 2^32),
// using the 1024-entry sine table, within 2 LSB. The block has two register
// stages: an input taken on clock edge c appears on out_data after edge c+1.
// Gaps in the valid strobe must hold the phase.
module tb_freq_shift;
  import edsic_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] phase_inc;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  freq_shift dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] incs [4] = '{32'h1000_0000, 32'hF000_0000, 32'h0123_4567, 32'h0};
    real pi = 3.14159265358979323846;
    foreach (incs[m]) begin
      sample_t xq [$];
      int vq [$];
      int k;
      xq = {}; vq = {}; k = 0;
      phase_inc = incs[m];
      rst_n = 0; in_valid = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int n = 0; n < 600; n++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_data.re = 16'($signed($urandom_range(0, 40000)) - 20000);
        in_data.im = 16'($signed($urandom_range(0, 40000)) - 20000);
        xq.push_back(in_data);
        vq.push_back(int'(in_valid));
        @(posedge clk);
        #1;
        if (n >= 1) begin
          checks++;
          if (out_valid != vq[n - 1]) begin
            failures++;
            if (failures < 5) $display("latency: out_valid %b at %0d", out_valid, n);
          end
          if (vq[n - 1] != 0) begin
            real a, cr, ci, er, ei;
            int idx;
            idx = int'((longint'(k) * longint'(incs[m]) % 64'h1_0000_0000) >> 22);
            a = 2.0 * pi * idx / 1024.0;
            cr = $rtoi($cos(a) * 32767.0 + ($cos(a) >= 0 ? 0.5 : -0.5));
            ci = $rtoi($sin(a) * 32767.0 + ($sin(a) >= 0 ? 0.5 : -0.5));
            er = (xq[n - 1].re * cr - xq[n - 1].im * ci) / 32768.0;
            ei = (xq[n - 1].re * ci + xq[n - 1].im * cr) / 32768.0;
            checks++;
            if (($itor(out_data.re) - er) ** 2 > 4.0 || ($itor(out_data.im) - ei) ** 2 > 4.0) begin
              failures++;
              if (failures < 5) $display("k %0d got %0d %0d exp %f %f", k, out_data.re, out_data.im, er, ei);
            end
            k++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
