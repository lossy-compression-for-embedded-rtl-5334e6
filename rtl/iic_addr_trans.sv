// iic_addr_trans: address translation unit of the input image compression
// (IIC) framework.
//
// Coded sub-blocks have variable length and are packed into memory words,
// so a request for sub-blocks has to become a request for words. The line
// recomposition raises low[j] when line j of the current strip holds too
// few bits for its next sub-block; this unit turns that into a read of the
// next word of that line, at y * LINE_WORDS + wp[j] (the memory layout of
// iic_compressor), where y = strip_y0 + j and wp[j] counts the words already
// fetched for the line. The lowest-numbered waiting line goes first; each
// line has at most one word in flight, which is cleared when its response
// (tagged with the strip line) returns. strip_start clears the pointers.
// The translation follows the source design; the request order and the
// single word in flight per line are this design's choices.
//
// Interface: rd_valid/rd_ready handshake with rd_addr and rd_line (the tag
// memory returns with the word). idle is high when no word is in flight;
// hold stops new reads, so that a strip can be ended cleanly.
module iic_addr_trans
  import iic_pkg::*;
#(
  parameter int unsigned IMG_W      = 1920,
  parameter int unsigned IMG_H      = 1080,
  parameter int unsigned K          = 8,
  parameter int unsigned W          = 64,
  parameter int unsigned LINE_WORDS = line_words(IMG_W, W),
  parameter int unsigned AW         = $clog2(IMG_H * LINE_WORDS),
  parameter int unsigned LIW        = $clog2(K),
  parameter int unsigned YW         = $clog2(IMG_H)
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           strip_start,
  input  logic [YW-1:0]  strip_y0,     // first line of the strip
  input  logic [K-1:0]   low,
  input  logic           hold,         // issue no new reads
  output logic           rd_valid,
  input  logic           rd_ready,
  output logic [AW-1:0]  rd_addr,
  output logic [LIW-1:0] rd_line,
  input  logic           rsp_valid,
  input  logic [LIW-1:0] rsp_line,
  output logic           idle
);

  localparam int unsigned WPW = $clog2(LINE_WORDS + 1);

  logic [WPW-1:0] wp [K];
  logic [K-1:0]   inflight;
  logic [YW-1:0]  y0;

  always_comb begin
    rd_valid = 1'b0;
    rd_line  = '0;
    for (int j = K - 1; j >= 0; j--)
      if (low[j] && !inflight[j] && !hold && !strip_start) begin
        rd_valid = 1'b1;
        rd_line  = LIW'(j);
      end
    rd_addr = AW'(AW'(y0) + AW'(rd_line)) * AW'(LINE_WORDS) + AW'(wp[rd_line]);
    idle    = (inflight == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0;
      y0       <= '0;
      for (int j = 0; j < K; j++) wp[j] <= '0;
    end else if (strip_start) begin
      inflight <= '0;
      y0       <= strip_y0;
      for (int j = 0; j < K; j++) wp[j] <= '0;
    end else begin
      for (int j = 0; j < K; j++) begin
        if (rd_valid && rd_ready && rd_line == LIW'(j)) begin
          inflight[j] <= 1'b1;
          wp[j]       <= wp[j] + 1'b1;
        end else if (rsp_valid && rsp_line == LIW'(j)) begin
          inflight[j] <= 1'b0;
        end
      end
    end
  end

  // A line never reads past its memory slot.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_valid |-> wp[rd_line] < WPW'(LINE_WORDS))
    else $error("iic_addr_trans: read past the end of a line slot");

endmodule
