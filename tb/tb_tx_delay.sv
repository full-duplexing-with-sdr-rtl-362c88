// tb_tx_delay: checks the programmable TX copy delay (the z^-n block). For a
// set of delay settings a counting sequence is pushed (with gaps in the
// valid strobe) and every output must equal the input pushed `delay` valid
// samples earlier, registered one clock after the push. After reset the
// history is zero, so the first outputs must be zero.
module tb_tx_delay;
  import edsic_pkg::*;
  localparam int MAXD = 64;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [5:0] delay;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tx_delay #(.MAX_DELAY(MAXD)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dl [6] = '{0, 1, 5, 12, 40, 63};
    foreach (dl[k]) begin
      sample_t hist [$];
      hist = {};
      rst_n = 0; in_valid = 0;
      delay = 6'(dl[k]);
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int n = 0; n < 300; n++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_data.re = 16'(n * 3 + k);
        in_data.im = 16'(-n);
        @(posedge clk);
        #1;
        checks++;
        if (out_valid != in_valid) failures++;
        if (in_valid) begin
          sample_t e;
          hist.push_back(in_data);
          e = (hist.size() > dl[k]) ? hist[hist.size() - 1 - dl[k]] : '0;
          checks++;
          if (out_data != e) begin
            failures++;
            if (failures < 5) $display("delay %0d n %0d got %h exp %h", dl[k], n, out_data, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
