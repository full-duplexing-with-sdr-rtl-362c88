// tb_async_fifo: checks the dual-clock FIFO with unrelated write (8.3 ns) and
// read (16.9 ns) clocks. Random write and read strobes move 3000 words; every
// word must arrive once and in order. With the reader stopped, exactly 2^AW
// words must be accepted before w_ready drops, and r_valid must drop once the
// FIFO has been drained.
module tb_async_fifo;
  localparam int WIDTH = 32, AW = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic w_valid = 0, w_ready, r_valid, r_ready = 0;
  logic [WIDTH-1:0] w_data, r_data;
  int checks = 0, failures = 0;
  always #4150 wclk = ~wclk;
  always #8450 rclk = ~rclk;

  async_fifo #(.WIDTH(WIDTH), .AW(AW)) dut (.*);

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nw = 0, nr = 0, total = 3000;
  bit rd_en = 1;

  always @(posedge wclk) begin
    if (wrst_n && w_valid && w_ready) nw++;
    #100;
    w_valid = wrst_n && (nw < total) && ($urandom_range(0, 2) != 0);
    w_data = 32'(nw) * 32'h9E3779B9;
  end

  always @(posedge rclk) begin
    if (rrst_n && r_valid && r_ready) begin
      checks++;
      if (r_data != 32'(nr) * 32'h9E3779B9) begin
        failures++;
        if (failures < 5) $display("word %0d got %h", nr, r_data);
      end
      nr++;
    end
    #100;
    r_ready = rd_en && ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge rclk);
    #200 wrst_n = 1; rrst_n = 1;
    wait (nr == total);
    repeat (10) @(posedge rclk);
    checks++;
    if (r_valid || nw != total) failures++;
    // fill test: reader stopped
    rd_en = 0;
    total = nw + 40;
    repeat (100) @(posedge wclk);
    checks++;
    if (nw - nr != 2 ** AW || w_ready) begin
      failures++;
      $display("fill: %0d words held, w_ready %b", nw - nr, w_ready);
    end
    rd_en = 1;
    wait (nr == total);
    repeat (10) @(posedge rclk);
    checks++;
    if (r_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
