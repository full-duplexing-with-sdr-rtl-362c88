// tx_loop_buffer: the transmit sample buffer. The host writes one block of
// samples once; the buffer then plays that block back in an endless loop so
// that transmission is continuous without further host traffic. The depth
// defaults to 130,000 samples, the size the document gives.
// Interface: while 'play' is low, samples offered on wr_valid/wr_data are
// stored at consecutive addresses (wr_ready is high while there is room);
// 'clear' empties the buffer. While 'play' is high, rd_valid/rd_data/rd_ready
// is a ready/valid stream that repeats the stored block (wrap pulses for one
// cycle each time the last sample is handed over). The memory has a
// registered read port (block RAM style), so the first sample is on rd_data
// one cycle after play rises. Playing an empty buffer yields nothing.
module tx_loop_buffer
  import edsic_pkg::*;
#(
  parameter int DEPTH = 130000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    play,
  input  logic    wr_valid,
  input  sample_t wr_data,
  output logic    wr_ready,
  output logic    rd_valid,
  output sample_t rd_data,
  input  logic    rd_ready,
  output logic    wrap
);
  localparam int AW = $clog2(DEPTH + 1);

  sample_t mem [DEPTH];
  logic [AW-1:0] len, rptr;
  logic fetch;

  assign wr_ready = !play && (len < AW'(DEPTH));
  assign fetch    = play && (len != '0) && (!rd_valid || rd_ready);

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[len] <= wr_data;
    if (fetch) rd_data <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      len <= '0; rptr <= '0; rd_valid <= 1'b0; wrap <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (wr_valid && wr_ready) len <= len + 1'b1;
      if (!play) begin
        rptr <= '0;
        rd_valid <= 1'b0;
      end else if (fetch) begin
        rd_valid <= 1'b1;
        if (rptr == len - 1'b1) begin
          rptr <= '0;
          wrap <= 1'b1;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end else if (rd_ready) begin
        rd_valid <= 1'b0;
      end
    end
  end
endmodule
