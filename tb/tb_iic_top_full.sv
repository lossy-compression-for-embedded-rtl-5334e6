// tb_iic_top_full: end-to-end testbench of iic_top at its default size, a
// 1920 x 1080 frame; the test itself is described in tb_iic_top_body.svh.
// The first frame is read back completely, the second in part.
module tb_iic_top_full;
  localparam int IMG_W = 1920;
  localparam int IMG_H = 1080;
  localparam int K = 8;
  localparam int M = 8;
  localparam int W = 64;
  localparam int LINE_WORDS = iic_pkg::line_words(IMG_W, W);
  localparam int AW  = $clog2(IMG_H * LINE_WORDS);
  localparam int LIW = $clog2(K);
  localparam int SW  = $clog2(IMG_H / K);
  localparam int CW  = $clog2(IMG_W / 4);
  localparam int RANDOM_BLOCKS = 200;
  localparam bit FULL_SECOND = 1'b0;
  localparam int WATCHDOG = 30000000;

  `include "tb_iic_top_body.svh"

  iic_top u_dut (.*);
endmodule
