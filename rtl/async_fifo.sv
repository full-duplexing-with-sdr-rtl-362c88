// async_fifo: dual-clock FIFO between the 120 MHz transceiver loop and the
// 60 MHz canceller loop. The document uses internal FIFOs here so that no
// sample is lost between the two loops; their construction is this design's:
// a 2^AW-entry memory with binary pointers, Gray-coded copies of each pointer
// carried into the other clock domain through two flip-flops.
// Write side: w_valid/w_data/w_ready (w_ready = not full). Read side:
// r_valid/r_data/r_ready, first-word-fall-through (r_data is the oldest entry
// whenever r_valid is high). A written word is visible to the reader three
// read-clock edges later at most. Each side has its own active-low reset.
module async_fifo #(
  parameter int WIDTH = 32,
  parameter int AW    = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             w_valid,
  input  logic [WIDTH-1:0] w_data,
  output logic             w_ready,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             r_valid,
  output logic [WIDTH-1:0] r_data,
  input  logic             r_ready
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign w_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n  = wbin + (AW+1)'(w_valid && w_ready);
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n;
      wgray <= bin2gray(wbin_n);
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
    end
  end
  always_ff @(posedge wclk) if (w_valid && w_ready) mem[wbin[AW-1:0]] <= w_data;

  // read domain
  assign r_valid = (rgray != wgray_r2);
  assign r_data  = mem[rbin[AW-1:0]];
  assign rbin_n  = rbin + (AW+1)'(r_valid && r_ready);
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n;
      rgray <= bin2gray(rbin_n);
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
    end
  end

  initial assert (AW >= 2) else $error("async_fifo needs AW >= 2");
endmodule
