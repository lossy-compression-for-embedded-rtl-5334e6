// iic_top: input image compression (IIC) framework for an embedded vision
// system.
//
// Input images are compressed on their way to external DRAM and
// decompressed on their way to the vision processor, cutting memory traffic
// at a small, controlled loss of image quality. The compression path takes
// the sensor's line-based pixel stream, one n x 1 sub-block (4 pixels) per
// cycle, codes it with DPCM and gradient-oriented quantization and writes the
// variable-length codes line by line into memory (iic_compressor). The
// decompression path serves block-based requests: the block recomposition
// checks its buffer of decoded columns, the line recomposition and the
// address translation unit fetch the missing coded words of the K lines of
// the strip, the decompress core decodes two sub-blocks per cycle, and the
// block recomposition returns the K x K vision block.
//
// The DRAM, the sensor and the vision processor are outside this module: the
// memory write port (wr_*), the memory read port (rd_* request, rsp_*
// response, in order or not, tagged with rd_line) and the vision-block ports
// (vreq_*, vblk_*) are brought out. Both paths run from one clock; the
// decompression side must only read lines the compression side has written.
// qc selects one of four quantization configurations and must be the same
// for writing and reading a frame.
//
// Defaults: 1920 x 1080 frames (the source design's 1080p target), n = 4,
// vision blocks and compression blocks of 8 lines, 64-bit memory words.
module iic_top
  import iic_pkg::*;
#(
  parameter int unsigned IMG_W      = 1920,
  parameter int unsigned IMG_H      = 1080,
  parameter int unsigned K          = 8,     // vision block size (k)
  parameter int unsigned M          = 8,     // compression block height (m)
  parameter int unsigned W          = 64,    // memory word width
  parameter int unsigned LANES      = 2,     // sub-blocks decoded per cycle
  parameter int unsigned LINE_WORDS = line_words(IMG_W, W),
  parameter int unsigned AW         = $clog2(IMG_H * LINE_WORDS),
  parameter int unsigned LIW        = $clog2(K),
  parameter int unsigned SW         = $clog2(IMG_H / K),
  parameter int unsigned CW         = $clog2(IMG_W / SUB_N)
)(
  input  logic                           clk,
  input  logic                           rst_n,
  input  qc_t                            qc,
  // sensor side
  input  logic                           in_valid,
  input  subblk_t                        in_pix,
  // memory write port
  output logic                           wr_valid,
  output logic [AW-1:0]                  wr_addr,
  output logic [W-1:0]                   wr_data,
  output logic                           frame_done,
  output logic [31:0]                    frame_words,
  // memory read port
  output logic                           rd_valid,
  input  logic                           rd_ready,
  output logic [AW-1:0]                  rd_addr,
  output logic [LIW-1:0]                 rd_line,
  input  logic                           rsp_valid,
  input  logic [W-1:0]                   rsp_data,
  input  logic [LIW-1:0]                 rsp_line,
  // vision processor side
  input  logic                           vreq_valid,
  output logic                           vreq_ready,
  input  logic [SW-1:0]                  vreq_strip,
  input  logic [CW-1:0]                  vreq_col,
  output logic                           vblk_valid,
  output logic [K-1:0][K-1:0][PIX_W-1:0] vblk,
  // statistics
  output logic [31:0]                    hit_cols,
  output logic [31:0]                    miss_cols,
  output logic [31:0]                    strip_starts,
  output logic                           dec_stall
);

  localparam int unsigned YW = $clog2(IMG_H);

  // ---------------- compression path
  iic_compressor #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .M(M), .W(W),
    .LINE_WORDS(LINE_WORDS), .AW(AW)
  ) u_comp (
    .clk, .rst_n, .qc,
    .in_valid, .in_pix,
    .wr_valid, .wr_addr, .wr_data,
    .frame_done, .frame_words
  );

  // ---------------- decompression path
  logic          strip_start, line_idle, fetch_hold;
  logic [YW-1:0] strip_y0;
  logic [K-1:0]  low;
  logic          col_req_valid, col_req_ready;
  logic          c_valid;
  code_t         c_win   [LANES];
  logic          c_first [LANES];
  len_t          c_len   [LANES];
  logic          dec_valid;
  subblk_t       dec_pix [LANES];

  iic_block_recomp #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .LANES(LANES),
    .YW(YW), .SW(SW), .CW(CW)
  ) u_brc (
    .clk, .rst_n,
    .vreq_valid, .vreq_ready, .vreq_strip, .vreq_col,
    .vblk_valid, .vblk,
    .strip_start, .strip_y0, .fetch_hold, .line_idle,
    .col_req_valid, .col_req_ready,
    .dec_valid, .dec_pix,
    .hit_cols, .miss_cols, .strip_starts
  );

  iic_addr_trans #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .W(W),
    .LINE_WORDS(LINE_WORDS), .AW(AW), .LIW(LIW), .YW(YW)
  ) u_atu (
    .clk, .rst_n,
    .strip_start, .strip_y0, .low, .hold(fetch_hold),
    .rd_valid, .rd_ready, .rd_addr, .rd_line,
    .rsp_valid, .rsp_line,
    .idle(line_idle)
  );

  iic_line_recomp #(
    .IMG_W(IMG_W), .K(K), .M(M), .W(W), .LANES(LANES), .LIW(LIW)
  ) u_lrc (
    .clk, .rst_n, .strip_start,
    .col_req_valid, .col_req_ready,
    .rsp_valid, .rsp_data, .rsp_line,
    .low,
    .c_valid, .c_win, .c_first, .c_len,
    .stall(dec_stall)
  );

  iic_decompress_core #(.LANES(LANES)) u_dec (
    .clk, .rst_n, .qc,
    .in_valid (c_valid),
    .in_win   (c_win),
    .in_first (c_first),
    .in_len   (c_len),
    .out_valid(dec_valid),
    .out_pix  (dec_pix)
  );

endmodule
