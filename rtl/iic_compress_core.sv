// iic_compress_core: lossy compress core of the input image compression
// (IIC) framework; codes one n x 1 sub-block (4 pixels) per clock cycle.
//
// Stage 1 runs the DPCM loop over p0..p3 in order: each pixel is predicted
// from the reconstructed value of its neighbour (p0 from the reconstructed
// pixel above, in_up; p1..p3 from d0..d2), the residual is quantized by
// LUTrd (goq_lut_rd) and dequantized by LUTird (goq_lut_ird) so that the
// reconstructed pixels d_i equal what the decoder will produce. On the top
// line of a compression block (in_first) p0 is kept as a raw 8-bit value.
// Stage 2 derives the coding mode (CM) from the range of the quantized
// residuals and merges raw pixel, CM and residuals into one code (layout in
// iic_pkg). The two stages and the sub-block-per-cycle rate follow the
// source design; the code layout is this design's own.
//
// Timing: a sub-block accepted with in_valid appears on out_* two cycles
// later, with out_valid; there is no back-pressure. out_rec holds the
// reconstructed pixels d0..d3 (the caller keeps d0 as the next line's in_up).
module iic_compress_core
  import iic_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  qc_t     qc,        // quantization configuration, held during a frame
  input  logic    in_valid,
  input  logic    in_first,  // sub-block on the top line of a compression block
  input  subblk_t in_pix,    // original pixels p0..p3
  input  pix_t    in_up,     // reconstructed pixel above p0
  output logic    out_valid,
  output logic    out_first,
  output code_t   out_code,  // coded sub-block, LSB first, unused bits zero
  output len_t    out_len,   // number of valid bits in out_code
  output subblk_t out_rec    // reconstructed pixels d0..d3
);

  // ---------------- stage 1: DPCM, quantization, reconstruction
  res_t    r   [SUB_N];
  q_t      q   [SUB_N];
  res_t    rr  [SUB_N];
  subblk_t d;
  pix_t    pred [SUB_N];

  for (genvar i = 0; i < SUB_N; i++) begin : g_pix
    if (i == 0) begin : g_p0
      assign pred[i] = in_up;
    end else begin : g_pi
      assign pred[i] = d[i-1];
    end
    assign r[i] = res_t'({1'b0, in_pix[i]}) - res_t'({1'b0, pred[i]});
    goq_lut_rd  u_rd  (.qc(qc), .r(r[i]), .q(q[i]));
    goq_lut_ird u_ird (.qc(qc), .q(q[i]), .rr(rr[i]));
    if (i == 0) begin : g_d0
      assign d[i] = in_first ? in_pix[0]
                             : add_res(pred[i], rr[i]);
    end else begin : g_di
      assign d[i] = add_res(pred[i], rr[i]);
    end
  end

  logic    s1_valid, s1_first;
  q_t      s1_q [SUB_N];
  pix_t    s1_p0;
  subblk_t s1_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_p0    <= '0;
      s1_d     <= '0;
      for (int i = 0; i < SUB_N; i++) s1_q[i] <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_first <= in_first;
        s1_p0    <= in_pix[0];
        s1_d     <= d;
        for (int i = 0; i < SUB_N; i++)
          s1_q[i] <= (i == 0 && in_first) ? q_t'(0) : q[i];
      end
    end
  end

  // ---------------- stage 2: coding mode and code assembly
  cm_t   cm;
  code_t code;
  int unsigned pos;

  always_comb begin
    cm = '0;
    for (int i = 0; i < SUB_N; i++)
      if (q_len(s1_q[i]) > cm) cm = q_len(s1_q[i]);
    code = '0;
    pos  = 0;
    if (s1_first) begin
      code[PIX_W-1:0] = s1_p0;
      pos = PIX_W;
    end
    code = code | (code_t'(cm) << pos);
    pos  = pos + CM_W;
    for (int i = 0; i < SUB_N; i++) begin
      if (!(i == 0 && s1_first)) begin
        code = code | ((code_t'(unsigned'(s1_q[i])) & ((code_t'(1) << cm) - 1)) << pos);
        pos  = pos + int'(cm);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_code  <= '0;
      out_len   <= '0;
      out_rec   <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_first <= s1_first;
        out_code  <= code;
        out_len   <= code_len(s1_first, cm);
        out_rec   <= s1_d;
      end
    end
  end

endmodule
