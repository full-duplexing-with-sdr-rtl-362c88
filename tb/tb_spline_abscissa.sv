// tb_spline_abscissa: checks span index and abscissa against floor/fraction
// of the amplitude (unit knot spacing, 8 regions), including the clamp at
// the top of the range.
module tb_spline_abscissa;
  logic [15:0] mag;
  logic [2:0] idx;
  logic [11:0] u;
  int checks = 0, failures = 0;

  spline_abscissa #(.K(8)) dut (.mag, .idx, .u);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int a);
    int ei, eu;
    mag = 16'(a);
    #1;
    if (a >= 8 * 4096) begin ei = 7; eu = 4095; end
    else begin ei = a / 4096; eu = a % 4096; end
    checks++;
    if (int'(idx) != ei || int'(u) != eu) begin
      failures++;
      $display("A=%0d: idx %0d u %0d, expected %0d %0d", a, idx, u, ei, eu);
    end
  endtask

  initial begin
    one(0); one(4095); one(4096); one(8191); one(32767); one(32768); one(44000); one(65535);
    for (int i = 0; i < 1000; i++) one($urandom_range(0, 65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
