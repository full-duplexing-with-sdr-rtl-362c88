// tb_lin_interp_resampler: checks the 32 -> 120 MS/s linear interpolator
// (ratio P/Q = 15/4). A ramp input must come out as an exact finer ramp (16
// counts per output for 60 counts per input); random data must match a
// bit-exact model of x[b] + (x[b+1]-x[b]) * frac; and with both sides always
// ready exactly 4 inputs are taken per 15 outputs, one output per clock.
// out_ready is a request strobe (each request gives at most one output the
// next clock); random requests must not lose or repeat samples.
module tb_lin_interp_resampler;
  import edsic_pkg::*;
  localparam int P = 15, Q = 4;
  localparam int RECIP = (65536 + P - 1) / P;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_ready = 0, out_valid;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lin_interp_resampler #(.P(P), .Q(Q)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t xin [$];
  int nin, nout;
  bit ramp, stall;

  function automatic logic signed [15:0] interp(input longint a, input longint b, input int f);
    longint v;
    v = a + (((b - a) * longint'(f * RECIP)) >>> 16);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return 16'(v);
  endfunction

  // input driver: next sample of the stream, accepted on in_ready
  always @(negedge clk) begin
    if (rst_n && in_valid && in_ready) nin++;
  end
  always @(posedge clk) begin
    #1;
    in_valid = rst_n;
    in_data = xin[nin];
    out_ready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int b, f;
      sample_t ex;
      b = (nout * Q) / P;
      f = (nout * Q) % P;
      ex.re = interp(xin[b].re, xin[b + 1].re, f);
      ex.im = interp(xin[b].im, xin[b + 1].im, f);
      checks++;
      if (out_data != ex) begin
        failures++;
        if (failures < 5) $display("out %0d got %h exp %h ramp %0d stall %0d x %h %h %h", nout, out_data, ex, ramp, stall, xin[0], xin[1], xin[2]);
      end
      if (ramp) begin
        checks++;
        if (out_data.re != 16'(16 * nout)) failures++;
      end
      nout++;
    end
  end

  task automatic run(input bit r, input bit s, input int cycles);
    xin = {};
    for (int j = 0; j < cycles + 10; j++)
      xin.push_back(r ? '{re: 16'(60 * j), im: 16'(-60 * j)}
                      : '{re: 16'($urandom), im: 16'($urandom)});
    ramp = r; stall = s; nin = 0; nout = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    repeat (cycles) @(posedge clk);
    #2;
  endtask

  initial begin
    run(1, 0, 1502);
    // two priming inputs, then 1500 steady-state cycles: 1500 outputs, 400 inputs
    checks++;
    if (nout < 1498 || nout > 1500 || nin < 400 || nin > 403) begin
      failures++;
      $display("rate: %0d outputs, %0d inputs", nout, nin);
    end
    run(0, 0, 3000);
    run(0, 1, 3000);
    checks++;
    if (nout < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
