// iic_bit_packer: merges variable-length coded sub-blocks into a continuous
// bit stream and splits it into W-bit memory words.
//
// Codes are appended LSB first behind the bits already held; whenever W bits
// are available a word is emitted. in_last marks the last sub-block of an
// image line: the line's remaining bits are then emitted as a final word,
// zero-padded, so every line starts on a word boundary and can be located
// in memory without reading earlier lines. If that final word coincides with
// a full word in the same cycle it is held for one cycle and emitted in the
// next; a line must therefore hold at least two sub-blocks. Splitting the
// stream into words follows the source design; the padding per line is this
// design's own choice.
//
// Timing: a word is emitted in the cycle after the code that completes it is
// accepted (or two cycles after, for a held final word). No back-pressure.
module iic_bit_packer
  import iic_pkg::*;
#(
  parameter int unsigned W = 64     // memory word width
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  code_t        in_code,
  input  len_t         in_len,
  input  logic         in_last,   // last sub-block of the line
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         out_last   // last word of the line
);

  localparam int unsigned ACC_W = W + CODE_W;
  localparam int unsigned CNT_W = $clog2(ACC_W + 1);

  logic [ACC_W-1:0] acc, acc_n, merged;
  logic [CNT_W-1:0] cnt, cnt_n, mcnt;
  logic [W-1:0]     pend, pend_n;
  logic             pend_v, pend_v_n;
  logic             ov_n, ol_n;
  logic [W-1:0]     od_n;

  always_comb begin
    acc_n    = acc;
    cnt_n    = cnt;
    pend_n   = pend;
    pend_v_n = 1'b0;
    ov_n     = 1'b0;
    ol_n     = 1'b0;
    od_n     = '0;
    merged   = acc | (ACC_W'(in_code) << cnt);
    mcnt     = cnt + CNT_W'(in_len);
    if (pend_v) begin
      ov_n = 1'b1;
      ol_n = 1'b1;
      od_n = pend;
    end
    if (in_valid) begin
      acc_n = merged;
      cnt_n = mcnt;
      if (mcnt >= CNT_W'(W)) begin
        ov_n  = 1'b1;
        od_n  = merged[W-1:0];
        acc_n = merged >> W;
        cnt_n = mcnt - CNT_W'(W);
      end
      if (in_last) begin
        if (cnt_n == 0) begin
          ol_n = ov_n;
        end else if (ov_n) begin
          pend_n   = acc_n[W-1:0];
          pend_v_n = 1'b1;
        end else begin
          ov_n = 1'b1;
          ol_n = 1'b1;
          od_n = acc_n[W-1:0];
        end
        acc_n = '0;
        cnt_n = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      pend      <= '0;
      pend_v    <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      acc       <= acc_n;
      cnt       <= cnt_n;
      pend      <= pend_n;
      pend_v    <= pend_v_n;
      out_valid <= ov_n;
      out_last  <= ol_n;
      out_data  <= od_n;
    end
  end

  // A held final word must not meet another word in the next cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   pend_v |-> !(in_valid && in_last))
    else $error("iic_bit_packer: line of a single sub-block after a held word");

  initial assert (W > 2 * CODE_W) else $error("iic_bit_packer: W too small");

endmodule
