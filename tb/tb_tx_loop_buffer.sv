// tb_tx_loop_buffer: checks the looping TX sample buffer. A block of N
// samples is written through the ready/valid write port, then played with a
// randomly stalling reader: the output must repeat the block in order, the
// wrap pulse must mark the last sample of each pass, writes must be refused
// during play and once the buffer is full, and clear must empty it. With
// rd_ready held high the buffer must deliver one sample per clock.
module tb_tx_loop_buffer;
  import edsic_pkg::*;
  localparam int DEPTH = 300;
  logic clk = 0, rst_n = 0, clear = 0, play = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0, wrap;
  sample_t wr_data, rd_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tx_loop_buffer #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t blk [$];

  task automatic write_block(input int n);
    int k = 0;
    blk = {};
    while (k < n) begin
      wr_valid = ($urandom_range(0, 2) != 0);
      wr_data.re = 16'($urandom);
      wr_data.im = 16'($urandom);
      @(posedge clk);
      if (wr_valid && wr_ready) begin
        blk.push_back(wr_data);
        k++;
      end
      #1;
    end
    wr_valid = 0;
  endtask

  task automatic play_check(input int npass, input bit stall);
    int got = 0, wraps = 0, cyc = 0;
    play = 1;
    while (got < npass * blk.size()) begin
      rd_ready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      cyc++;
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_data != blk[got % blk.size()]) begin
          failures++;
          if (failures < 5) $display("sample %0d got %h exp %h", got, rd_data, blk[got % blk.size()]);
        end
        got++;
      end
      if (wrap) begin
        wraps++;
        // wrap is raised together with the fetch of the last sample, so the
        // last sample appears on rd_data in the same cycle the pulse is seen
        checks++;
        if (rd_data != blk[blk.size() - 1]) failures++;
      end
      #1;
      if (cyc > 10 * npass * blk.size() + 100) break;
    end
    checks++;
    if (wraps < npass - 1 || wraps > npass) begin
      failures++;
      $display("wraps %0d for %0d passes", wraps, npass);
    end
    if (!stall) begin
      checks++;
      if (cyc > npass * blk.size() + 2) begin
        failures++;
        $display("rate: %0d cycles for %0d samples", cyc, got);
      end
    end
    play = 0; rd_ready = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    write_block(37);
    play_check(5, 1);
    play_check(4, 0);
    // writes refused while playing
    play = 1;
    #1;
    checks++;
    if (wr_ready) failures++;
    play = 0;
    // clear, then fill to capacity
    clear = 1; @(posedge clk); #1 clear = 0;
    checks++;
    if (!wr_ready) failures++;
    write_block(DEPTH);
    checks++;
    if (wr_ready) failures++;
    play_check(2, 1);
    // clear empties: nothing is played
    clear = 1; @(posedge clk); #1 clear = 0;
    play = 1; rd_ready = 1;
    repeat (10) begin
      @(posedge clk); #1;
      checks++;
      if (rd_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
