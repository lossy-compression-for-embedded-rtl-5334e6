// iic_decompress_core: two-stage pipelined decompress core of the input
// image compression (IIC) framework; decodes LANES (two) vertically adjacent
// sub-blocks per clock cycle.
//
// Each lane receives a window of the coded stream whose bit 0 is the first
// bit of its sub-block. Stage 1 splits the window into the optional raw p0,
// the coding mode (CM) and the merged residual field (Subr), and reports the
// code length at once (in_len) so the caller can advance its bit pointer in
// the same cycle. Stage 2 splits Subr into four 5-bit quantized residuals
// of CM bits each, maps them through LUTird (goq_lut_ird) and rebuilds the
// pixels by inverse DPCM: p0 from the pixel above, p1..p3 from the left
// neighbour. Lane 0 is the upper sub-block; its p0 is predicted from the
// last lane of the previous cycle, and lane j+1 from lane j, so a column of
// sub-blocks is decoded top to bottom, LANES lines per cycle. The two stages
// and the two sub-blocks per cycle follow the source design.
//
// Timing: pixels of the sub-blocks accepted with in_valid appear on out_pix
// two cycles later with out_valid. No back-pressure.
module iic_decompress_core
  import iic_pkg::*;
#(
  parameter int unsigned LANES = 2
)(
  input  logic    clk,
  input  logic    rst_n,
  input  qc_t     qc,
  input  logic    in_valid,
  input  code_t   in_win   [LANES],  // coded stream, bit 0 = start of sub-block
  input  logic    in_first [LANES],  // sub-block on the top line of a compression block
  output len_t    in_len   [LANES],  // code length of each lane (combinational)
  output logic    out_valid,
  output subblk_t out_pix  [LANES]   // reconstructed pixels, lane 0 upper
);

  localparam int unsigned SUBR_W = SUB_N * MAX_L;

  // ---------------- stage 1: split raw pixel, CM and Subr
  cm_t               cm   [LANES];
  pix_t              raw  [LANES];
  logic [SUBR_W-1:0] subr [LANES];

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      raw[j] = in_win[j][PIX_W-1:0];
      if (in_first[j]) begin
        cm[j]   = in_win[j][PIX_W +: CM_W];
        subr[j] = SUBR_W'(in_win[j] >> (PIX_W + CM_W));
      end else begin
        cm[j]   = in_win[j][CM_W-1:0];
        subr[j] = SUBR_W'(in_win[j] >> CM_W);
      end
      in_len[j] = code_len(in_first[j], cm[j]);
    end
  end

  logic              s1_valid;
  cm_t               s1_cm    [LANES];
  pix_t              s1_raw   [LANES];
  logic [SUBR_W-1:0] s1_subr  [LANES];
  logic              s1_first [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      for (int j = 0; j < LANES; j++) begin
        s1_cm[j]    <= '0;
        s1_raw[j]   <= '0;
        s1_subr[j]  <= '0;
        s1_first[j] <= 1'b0;
      end
    end else begin
      s1_valid <= in_valid;
      if (in_valid)
        for (int j = 0; j < LANES; j++) begin
          s1_cm[j]    <= cm[j];
          s1_raw[j]   <= raw[j];
          s1_subr[j]  <= subr[j];
          s1_first[j] <= in_first[j];
        end
    end
  end

  // ---------------- stage 2: split residuals, LUTird, inverse DPCM
  q_t      q  [LANES][SUB_N];
  res_t    rr [LANES][SUB_N];
  subblk_t d  [LANES];
  pix_t    prev_d0;

  // Field k of Subr, CM bits wide, sign-extended.
  function automatic q_t field(input logic [SUBR_W-1:0] s, input cm_t l, input int k);
    logic [SUBR_W-1:0] sh;  // only the low Q_W bits are used
    logic [Q_W-1:0]    mask;
    logic [Q_W-1:0]    f;
    if (l == 0) return '0;
    sh   = s >> (k * int'(l));
    mask = Q_W'((32'd1 << l) - 1);
    f    = sh[Q_W-1:0] & mask;
    if (f[l-1]) f = f | ~mask;
    return q_t'(f);
  endfunction

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    for (genvar i = 0; i < SUB_N; i++) begin : g_q
      // On the top line of a compression block the fields hold q1..q3.
      assign q[j][i] = s1_first[j] ? ((i == 0) ? q_t'(0) : field(s1_subr[j], s1_cm[j], i - 1))
                                   : field(s1_subr[j], s1_cm[j], i);
      goq_lut_ird u_ird (.qc(qc), .q(q[j][i]), .rr(rr[j][i]));
    end
  end

  // Inverse DPCM, lane by lane so that each lane's p0 sees the lane above.
  always_comb begin
    pix_t upv;
    upv = prev_d0;
    for (int j = 0; j < LANES; j++) begin
      d[j][0] = s1_first[j] ? s1_raw[j] : add_res(upv, rr[j][0]);
      for (int i = 1; i < SUB_N; i++)
        d[j][i] = add_res(d[j][i-1], rr[j][i]);
      upv = d[j][0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prev_d0   <= '0;
      for (int j = 0; j < LANES; j++) out_pix[j] <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        prev_d0 <= d[LANES-1][0];
        for (int j = 0; j < LANES; j++) out_pix[j] <= d[j];
      end
    end
  end

endmodule
