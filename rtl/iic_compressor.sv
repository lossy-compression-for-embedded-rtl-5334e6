// iic_compressor: compression stage of the input image compression (IIC)
// framework.
//
// Takes the line-based pixel stream of an image sensor or preprocessor, one
// n x 1 sub-block (4 horizontally adjacent pixels) per cycle in raster
// order, compresses it with iic_compress_core and stores the coded
// sub-blocks line by line in external memory through iic_bit_packer. A
// compression block is n pixels wide and M lines tall: on its top line p0
// is stored raw, below it p0 is predicted from the reconstructed p0 of the
// line above, which a one-line column buffer (IMG_W/n entries) keeps.
// Compression blocks are therefore independent of one another, so any part
// of an image can be decoded without the lines above its compression block.
//
// Memory layout (this design's choice): line y owns the LINE_WORDS words
// starting at address y * LINE_WORDS; its coded sub-blocks fill them from
// the start, the last one zero-padded. LINE_WORDS is the worst case, so an
// address never depends on how well earlier lines compressed; memory
// traffic, not memory size, is what compression saves.
//
// Timing: one sub-block per cycle, no back-pressure on either side; a word
// reaches wr_* three to four cycles after the sub-block that completes it.
// frame_done pulses with the last word of the frame; frame_words then holds
// the number of words the frame took.
module iic_compressor
  import iic_pkg::*;
#(
  parameter int unsigned IMG_W      = 1920,  // pixels per line
  parameter int unsigned IMG_H      = 1080,  // lines per frame
  parameter int unsigned M          = 8,     // compression block height (lines)
  parameter int unsigned W          = 64,    // memory word width
  parameter int unsigned LINE_WORDS = line_words(IMG_W, W),
  parameter int unsigned AW         = $clog2(IMG_H * LINE_WORDS)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  qc_t           qc,
  input  logic          in_valid,
  input  subblk_t       in_pix,
  output logic          wr_valid,
  output logic [AW-1:0] wr_addr,
  output logic [W-1:0]  wr_data,
  output logic          frame_done,
  output logic [31:0]   frame_words
);

  localparam int unsigned SB   = IMG_W / SUB_N;        // sub-blocks per line
  localparam int unsigned CW   = $clog2(SB);
  localparam int unsigned LW   = $clog2(IMG_H);
  localparam int unsigned WIW  = $clog2(LINE_WORDS + 1);

  // ---------------- input side: position and column buffer
  logic [CW-1:0] in_col;
  logic [LW-1:0] in_line;
  logic          in_first;
  pix_t          colbuf [SB];
  pix_t          up;

  assign in_first = (in_line % LW'(M)) == 0;
  assign up       = colbuf[in_col];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_col  <= '0;
      in_line <= '0;
    end else if (in_valid) begin
      if (in_col == CW'(SB - 1)) begin
        in_col  <= '0;
        in_line <= (in_line == LW'(IMG_H - 1)) ? '0 : in_line + 1'b1;
      end else begin
        in_col <= in_col + 1'b1;
      end
    end
  end

  // ---------------- compress core
  logic    c_valid, c_first;
  code_t   c_code;
  len_t    c_len;
  subblk_t c_rec;

  iic_compress_core u_core (
    .clk, .rst_n, .qc,
    .in_valid (in_valid),
    .in_first (in_first),
    .in_pix   (in_pix),
    .in_up    (up),
    .out_valid(c_valid),
    .out_first(c_first),
    .out_code (c_code),
    .out_len  (c_len),
    .out_rec  (c_rec)
  );

  // Output side position: the column buffer is written with d0 of each
  // sub-block as it leaves the core, a line before it is read again.
  logic [CW-1:0] o_col;
  logic          o_last;
  assign o_last = (o_col == CW'(SB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) o_col <= '0;
    else if (c_valid) o_col <= o_last ? '0 : o_col + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (c_valid) colbuf[o_col] <= c_rec[0];
  end

  // ---------------- bit packer and word addressing
  logic         p_valid, p_last;
  logic [W-1:0] p_data;

  iic_bit_packer #(.W(W)) u_pack (
    .clk, .rst_n,
    .in_valid (c_valid),
    .in_code  (c_code),
    .in_len   (c_len),
    .in_last  (o_last),
    .out_valid(p_valid),
    .out_data (p_data),
    .out_last (p_last)
  );

  logic [LW-1:0]  w_line;
  logic [WIW-1:0] w_idx;
  logic [31:0]    w_count;

  assign wr_valid = p_valid;
  assign wr_data  = p_data;
  assign wr_addr  = AW'(w_line) * AW'(LINE_WORDS) + AW'(w_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_line      <= '0;
      w_idx       <= '0;
      w_count     <= '0;
      frame_done  <= 1'b0;
      frame_words <= '0;
    end else begin
      frame_done <= 1'b0;
      if (p_valid) begin
        if (p_last) begin
          w_idx <= '0;
          if (w_line == LW'(IMG_H - 1)) begin
            w_line      <= '0;
            frame_done  <= 1'b1;
            frame_words <= w_count + 1;
            w_count     <= '0;
          end else begin
            w_line  <= w_line + 1'b1;
            w_count <= w_count + 1;
          end
        end else begin
          w_idx   <= w_idx + 1'b1;
          w_count <= w_count + 1;
        end
      end
    end
  end

  // A line's words must fit in its slot.
  assert property (@(posedge clk) disable iff (!rst_n)
                   p_valid |-> (w_idx < WIW'(LINE_WORDS)))
    else $error("iic_compressor: line overflows its memory slot");

endmodule
