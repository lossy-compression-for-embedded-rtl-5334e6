// tb_iic_top: end-to-end testbench of iic_top on a reduced 64 x 32 frame;
// the test itself is described in tb_iic_top_body.svh.
module tb_iic_top;
  localparam int IMG_W = 64;
  localparam int IMG_H = 32;
  localparam int K = 8;
  localparam int M = 8;
  localparam int W = 64;
  localparam int LINE_WORDS = iic_pkg::line_words(IMG_W, W);
  localparam int AW  = $clog2(IMG_H * LINE_WORDS);
  localparam int LIW = $clog2(K);
  localparam int SW  = $clog2(IMG_H / K);
  localparam int CW  = $clog2(IMG_W / 4);
  localparam int RANDOM_BLOCKS = 40;
  localparam bit FULL_SECOND = 1'b1;
  localparam int WATCHDOG = 400000;

  `include "tb_iic_top_body.svh"

  iic_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .M(M), .W(W)) u_dut (.*);
endmodule
