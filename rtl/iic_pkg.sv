// iic_pkg: types, constants and helper functions shared by the input image
// compression (IIC) blocks.
//
// The coding scheme: an image is cut into n x 1 sub-blocks (n = 4 pixels of
// 8 bits). Pixel p0 of a sub-block is predicted from the decoded pixel above
// it, p1..p3 from their decoded left neighbour (DPCM). Residuals are
// quantized non-uniformly to 5-bit signed values (gradient-oriented
// quantization, GOQ). All coded residuals of a sub-block share one bit length
// L, written as a 3-bit coding mode (CM). The sub-block on the top line of an
// n x m compression block keeps p0 as a raw 8-bit value instead.
//
// Code layout, packed LSB first:
//   top-of-block sub-block : p0[7:0] | CM[2:0] | q1 | q2 | q3   (each q L bits)
//   other sub-blocks       : CM[2:0] | q0 | q1 | q2 | q3
// L is the smallest two's-complement width (0..5) that holds every coded q;
// L = 0 means all coded residuals are zero.
//
// The sub-block width (4), pixel width (8) and quantized residual width (5)
// follow the source design. The reconstruction levels of the four
// quantization configurations (QC) and the code layout are this design's
// own choice: the levels grow roughly geometrically, fine for the small
// residuals of smooth areas and coarse for strong gradients.
package iic_pkg;

  localparam int unsigned PIX_W  = 8;   // pixel width
  localparam int unsigned SUB_N  = 4;   // pixels per sub-block (n)
  localparam int unsigned Q_W    = 5;   // quantized residual width
  localparam int unsigned CM_W   = 3;   // coding-mode width
  localparam int unsigned MAX_L  = 5;   // largest per-residual code length
  localparam int unsigned N_QC   = 4;   // number of quantization configurations
  localparam int unsigned N_LVL  = 16;  // reconstruction levels per sign
  // Longest code: raw p0 + CM + three 5-bit residuals.
  localparam int unsigned CODE_W = PIX_W + CM_W + (SUB_N - 1) * MAX_L;  // 26
  localparam int unsigned LEN_W  = $clog2(CODE_W + 1);                  // 5

  typedef logic [PIX_W-1:0]           pix_t;
  typedef logic signed [PIX_W:0]      res_t;    // residual, -255..255
  typedef logic signed [Q_W-1:0]      q_t;      // quantized residual, -15..15
  typedef logic [CM_W-1:0]            cm_t;
  typedef logic [1:0]                 qc_t;     // quantization configuration
  typedef logic [CODE_W-1:0]          code_t;
  typedef logic [LEN_W-1:0]           len_t;
  typedef pix_t [SUB_N-1:0]           subblk_t; // element i is pixel p_i

  // Reconstruction magnitude of level k under configuration qc.
  typedef logic [PIX_W-1:0] lvl_tab_t [N_QC][N_LVL];
  localparam lvl_tab_t LEVELS = '{
    '{8'd0, 8'd1, 8'd2, 8'd3, 8'd4,  8'd5,  8'd6,  8'd8,
      8'd10, 8'd13, 8'd17, 8'd23, 8'd32, 8'd48, 8'd80, 8'd160},
    '{8'd0, 8'd2, 8'd4, 8'd6, 8'd8,  8'd10, 8'd13, 8'd16,
      8'd20, 8'd25, 8'd32, 8'd42, 8'd56, 8'd80, 8'd120, 8'd200},
    '{8'd0, 8'd3, 8'd6, 8'd9, 8'd12, 8'd16, 8'd20, 8'd25,
      8'd31, 8'd38, 8'd48, 8'd60, 8'd80, 8'd108, 8'd150, 8'd210},
    '{8'd0, 8'd4, 8'd8, 8'd12, 8'd16, 8'd21, 8'd27, 8'd34,
      8'd42, 8'd52, 8'd64, 8'd80, 8'd100, 8'd128, 8'd168, 8'd224}
  };

  // Level index nearest to magnitude a (ties go to the smaller level).
  function automatic logic [3:0] nearest_level(input qc_t qc, input int unsigned a);
    logic [3:0] best;
    int unsigned best_err, err, lv;
    best = '0;
    best_err = a;
    for (int unsigned k = 1; k < N_LVL; k++) begin
      lv  = int'(LEVELS[qc][k]);
      err = (a > lv) ? a - lv : lv - a;
      if (err < best_err) begin
        best_err = err;
        best = 4'(k);
      end
    end
    return best;
  endfunction

  // Two's-complement width needed for q (0 for q == 0).
  function automatic logic [CM_W-1:0] q_len(input q_t q);
    if (q == 0)                     return 3'd0;
    else if (q >= -1 && q <= 0)     return 3'd1;
    else if (q >= -2 && q <= 1)     return 3'd2;
    else if (q >= -4 && q <= 3)     return 3'd3;
    else if (q >= -8 && q <= 7)     return 3'd4;
    else                            return 3'd5;
  endfunction

  // Total code length of a sub-block with coding mode cm.
  function automatic len_t code_len(input logic first, input cm_t cm);
    if (first) return len_t'(PIX_W + CM_W + (SUB_N - 1) * cm);
    else       return len_t'(CM_W + SUB_N * cm);
  endfunction

  // Clamp a widened sum to the pixel range.
  function automatic pix_t clamp_pix(input logic signed [PIX_W+1:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return '1;
    else              return pix_t'(v);
  endfunction

  // Memory words reserved per image line: worst-case code of every sub-block
  // of the line, plus one spare word that the decompressor's look-ahead may
  // read past the end of the line.
  function automatic int unsigned line_words(input int unsigned img_w, input int unsigned w);
    return (img_w / SUB_N * CODE_W + w - 1) / w + 1;
  endfunction

  // Reconstruct a pixel: prediction plus reconstructed residual, clamped.
  function automatic pix_t add_res(input pix_t pred, input res_t rr);
    logic signed [PIX_W+1:0] s;
    s = signed'({2'b00, pred}) + (PIX_W+2)'(rr);
    return clamp_pix(s);
  endfunction

endpackage
