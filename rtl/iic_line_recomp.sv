// iic_line_recomp: line recomposition of the input image compression (IIC)
// framework.
//
// Compressed data is stored line by line, but the vision processor needs
// blocks. This block keeps one coded-data buffer per line of a K-line strip
// (W + CODE_W bits each), fills them with the memory words that the address
// translation unit fetches, and regroups them into n x K blocks: one column
// of K vertically adjacent coded sub-blocks. For each column it hands the
// decompress core LANES sub-blocks per cycle, top to bottom, as windows that
// start at each line's bit pointer, and drops the bits of each sub-block as
// soon as the core reports its length. A lane pair waits (stalls) until each
// of its lines holds at least CODE_W bits, the longest possible code, so no
// code is ever split.
//
// A line asks for its next word (low) when it holds fewer than CODE_W bits,
// until its last sub-block of the strip has been taken; after reset no line
// asks before the first strip_start. strip_start empties
// the buffers for a new strip; the caller issues it only when no word is in
// flight. K must be a multiple of the compression block height M, so the
// top line of a strip is the top line of a compression block. The buffer
// sizes and the strip order are this design's choices; the function follows
// the source design.
//
// Interface: col_req_valid/col_req_ready asks for the next column; the last
// lane pair of a column can overlap the acceptance of the next. rsp_* is a
// returned memory word and the strip line it belongs to.
module iic_line_recomp
  import iic_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned K     = 8,     // strip height = vision block size
  parameter int unsigned M     = 8,     // compression block height
  parameter int unsigned W     = 64,
  parameter int unsigned LANES = 2,
  parameter int unsigned LIW   = $clog2(K)
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           strip_start,
  // column requests
  input  logic           col_req_valid,
  output logic           col_req_ready,
  // memory words
  input  logic           rsp_valid,
  input  logic [W-1:0]   rsp_data,
  input  logic [LIW-1:0] rsp_line,
  output logic [K-1:0]   low,           // line needs another word
  // to the decompress core
  output logic           c_valid,
  output code_t          c_win   [LANES],
  output logic           c_first [LANES],
  input  len_t           c_len   [LANES],
  output logic           stall          // a column is open but its lanes lack data
);

  localparam int unsigned SB    = IMG_W / SUB_N;
  localparam int unsigned CW    = $clog2(SB);
  localparam int unsigned PAIRS = K / LANES;
  localparam int unsigned PW    = (PAIRS > 1) ? $clog2(PAIRS) : 1;
  localparam int unsigned BUF_W = W + CODE_W;
  localparam int unsigned BCW   = $clog2(BUF_W + 1);

  logic [BUF_W-1:0] lbuf [K];
  logic [BCW-1:0]   cnt  [K];
  logic [K-1:0]     fin;
  logic             active;
  logic [PW-1:0]    pi;
  logic [CW-1:0]    col;
  logic             pair_ok, last_pair;

  always_comb begin
    pair_ok = active;
    for (int l = 0; l < LANES; l++) begin
      if (cnt[int'(pi) * LANES + l] < BCW'(CODE_W)) pair_ok = 1'b0;
      c_win[l]   = lbuf[int'(pi) * LANES + l][CODE_W-1:0];
      c_first[l] = ((int'(pi) * LANES + l) % M) == 0;
    end
    c_valid   = pair_ok;
    stall     = active && !pair_ok;
    last_pair = (pi == PW'(PAIRS - 1));
    col_req_ready = !active || (pair_ok && last_pair);
    for (int j = 0; j < K; j++)
      low[j] = (cnt[j] < BCW'(CODE_W)) && !fin[j];
  end

  // Per line: drop the bits of a consumed sub-block, then append a
  // returned word behind the bits that remain.
  logic [BUF_W-1:0] lbuf_n [K];
  logic [BCW-1:0]   cnt_n  [K];

  always_comb begin
    for (int j = 0; j < K; j++) begin
      lbuf_n[j] = lbuf[j];
      cnt_n[j]  = cnt[j];
      if (pair_ok && (j / LANES) == int'(pi)) begin
        lbuf_n[j] = lbuf_n[j] >> c_len[j % LANES];
        cnt_n[j]  = cnt_n[j] - BCW'(c_len[j % LANES]);
      end
      if (rsp_valid && rsp_line == LIW'(j)) begin
        lbuf_n[j] = lbuf_n[j] | (BUF_W'(rsp_data) << cnt_n[j]);
        cnt_n[j]  = cnt_n[j] + BCW'(W);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      pi     <= '0;
      col    <= '0;
      fin    <= '1;   // nothing to fetch before the first strip
      for (int j = 0; j < K; j++) begin
        lbuf[j] <= '0;
        cnt[j]  <= '0;
      end
    end else if (strip_start) begin
      active <= 1'b0;
      pi     <= '0;
      col    <= '0;
      fin    <= '0;
      for (int j = 0; j < K; j++) begin
        lbuf[j] <= '0;
        cnt[j]  <= '0;
      end
    end else begin
      for (int j = 0; j < K; j++) begin
        lbuf[j] <= lbuf_n[j];
        cnt[j]  <= cnt_n[j];
        if (pair_ok && (j / LANES) == int'(pi) && col == CW'(SB - 1)) fin[j] <= 1'b1;
      end
      if (pair_ok) begin
        if (last_pair) begin
          pi <= '0;
          col <= (col == CW'(SB - 1)) ? '0 : col + 1'b1;
        end else begin
          pi <= pi + 1'b1;
        end
      end
      if (col_req_valid && col_req_ready) active <= 1'b1;
      else if (pair_ok && last_pair)      active <= 1'b0;
    end
  end

  initial assert (K % M == 0 && K % LANES == 0)
    else $error("iic_line_recomp: K must be a multiple of M and LANES");

  // A word may only arrive for a line that asked for it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rsp_valid |-> cnt[rsp_line] < BCW'(CODE_W))
    else $error("iic_line_recomp: word for a full line buffer");

endmodule
