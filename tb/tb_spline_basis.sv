// tb_spline_basis: checks the second-order B-spline basis values against
// (1-u)^2/2, (-2u^2+2u+1)/2 and u^2/2 in real arithmetic (within 2 LSB of
// Q1.12) and that they sum to one (within 2 LSB), for every u.
module tb_spline_basis;
  import edsic_pkg::*;
  logic [11:0] u;
  logic [BASIS_W-1:0] b0, b1, b2;
  int checks = 0, failures = 0;

  spline_basis dut (.u, .b0, .b1, .b2);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input real a, input real b);
    return (a - b) * (a - b) <= 4.0;
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) begin
      real uf, e0, e1, e2;
      u = 12'(i);
      #1;
      uf = $itor(i) / 4096.0;
      e0 = 0.5 * (1.0 - uf) * (1.0 - uf) * 4096.0;
      e1 = 0.5 * (-2.0 * uf * uf + 2.0 * uf + 1.0) * 4096.0;
      e2 = 0.5 * uf * uf * 4096.0;
      checks++;
      if (!near($itor(b0), e0) || !near($itor(b1), e1) || !near($itor(b2), e2)) begin
        failures++;
        if (failures < 10) $display("u=%0d: %0d %0d %0d expected %0.1f %0.1f %0.1f", i, b0, b1, b2, e0, e1, e2);
      end
      checks++;
      if (!near($itor(b0) + $itor(b1) + $itor(b2), 4096.0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
