// tb_digital_gain: checks the TX digital gain stage. Random Q4.12 samples and
// gains are pushed with random back-pressure on the output; every output must
// equal saturate16((x * g) >> 12) in order, and the stage must accept one
// sample per clock with a one-cycle latency when the output is always ready.
module tb_digital_gain;
  import edsic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] gain;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  digital_gain dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] ref_mul(input logic signed [15:0] a,
                                                 input logic signed [15:0] g);
    longint p;
    p = (longint'(a) * longint'(g)) >>> 12;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return 16'(p);
  endfunction

  sample_t exp_q [$];
  int nout = 0;

  // outputs and accepted inputs are both sampled at the falling edge, half a
  // cycle before the rising edge on which the handshake takes effect
  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      sample_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output %h at %0t", out_data, $time); end
      else begin
        e = exp_q.pop_front();
        if (out_data != e) begin
          failures++;
          if (failures < 5) $display("mismatch got %h exp %h", out_data, e);
        end
      end
      nout++;
    end
  end

  initial begin
    int t0;
    gain = 16'sd4096;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // phase 1: random gain, random stalls
    for (int g = 0; g < 8; g++) begin
      gain = 16'($signed($urandom_range(0, 32767)) - 16384);
      for (int n = 0; n < 200; n++) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_data.re = 16'($urandom);
        in_data.im = 16'($urandom);
        out_ready = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (in_valid && in_ready)
          exp_q.push_back('{re: ref_mul(in_data.re, gain), im: ref_mul(in_data.im, gain)});
        @(posedge clk);
        #1;
      end
      in_valid = 0; out_ready = 1;
      repeat (4) @(posedge clk);
      #1;
    end
    // phase 2: throughput and latency with out_ready held high
    gain = 16'sd4096;
    nout = 0;
    in_data = '{re: 16'sd1234, im: -16'sd77};
    in_valid = 1;
    @(negedge clk);
    exp_q.push_back(in_data);
    @(posedge clk);
    #1;
    checks++;
    if (!out_valid) begin failures++; $display("latency"); end  // one-cycle latency
    for (int n = 1; n < 100; n++) begin
      @(negedge clk);
      exp_q.push_back(in_data);
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (nout != 100) begin
      failures++;
      $display("throughput: %0d outputs in 100 cycles", nout);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("left %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
