// tb_lin_decim_resampler: checks the rational decimator used for 120 -> 32
// MS/s (P/Q = 4/15) and 120 -> 60 MS/s (P/Q = 1/2). A ramp input with gaps in
// the valid strobe must give an output ramp whose steps equal exactly Q/P
// input steps, exactly P outputs must appear per Q inputs, and a constant
// input must pass the [1 2 1]/4 pre-filter and the interpolation unchanged.
module tb_lin_decim_resampler;
  import edsic_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_data;
  logic ov_a, ov_b;
  sample_t od_a, od_b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lin_decim_resampler #(.P(4), .Q(15)) dut_a (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(ov_a), .out_data(od_a));
  lin_decim_resampler #(.P(1), .Q(2)) dut_b (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(ov_b), .out_data(od_b));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int na, nb, prev_a, prev_b;
  bit ramp;

  always @(negedge clk) begin
    if (rst_n && ov_a) begin
      if (ramp && na > 0) begin
        checks++;
        if (int'(od_a.re) - prev_a != 30) begin      // 8 counts * 15/4
          failures++;
          if (failures < 5) $display("A step %0d", int'(od_a.re) - prev_a);
        end
      end
      if (!ramp && na > 2) begin
        checks++;
        if (od_a.re != 16'sd1000 || od_a.im != -16'sd3000) failures++;
      end
      prev_a = od_a.re;
      na++;
    end
    if (rst_n && ov_b) begin
      if (ramp && nb > 0) begin
        checks++;
        if (int'(od_b.re) - prev_b != 16) failures++;   // 8 counts * 2
      end
      if (!ramp && nb > 2) begin
        checks++;
        if (od_b.re != 16'sd1000 || od_b.im != -16'sd3000) failures++;
      end
      prev_b = od_b.re;
      nb++;
    end
  end

  task automatic run(input bit r, input int nsamp);
    int j = 0;
    ramp = r; na = 0; nb = 0;
    rst_n = 0; in_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (j < nsamp) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_data.re = r ? 16'(8 * j - 12000) : 16'sd1000;
      in_data.im = r ? 16'(-8 * j) : -16'sd3000;
      @(posedge clk);
      if (in_valid) j++;
      #1;
    end
    in_valid = 0;
    repeat (2) @(posedge clk);
    #1;
    // the first three inputs fill the filter; after that P outputs per Q inputs
    checks++;
    if (na < ((nsamp - 3) * 4) / 15 || na > ((nsamp - 3) * 4) / 15 + 1) begin
      failures++;
      $display("A rate: %0d outputs for %0d inputs", na, nsamp);
    end
    checks++;
    if (nb < (nsamp - 3) / 2 || nb > (nsamp - 3) / 2 + 1) begin
      failures++;
      $display("B rate: %0d outputs for %0d inputs", nb, nsamp);
    end
  endtask

  initial begin
    run(1, 3003);
    run(0, 603);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
