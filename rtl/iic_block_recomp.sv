// iic_block_recomp: block recomposition of the input image compression
// (IIC) framework.
//
// Serves the vision processor's requests for K x K vision blocks. A request
// names a strip (K lines) and the sub-block column of the block's left edge,
// so a block spans D = K/n decoded n x K columns. The block keeps the last D
// decoded columns of the current strip in a buffer and first checks the
// request against it: columns already there are reused (hits), missing ones
// are asked for from the line recomposition (col_req_*), which fetches only
// the coded data it lacks. Columns of a strip are decoded left to right, so
// a request further right decodes the columns up to it; a request for
// another strip, or for a column already dropped from the buffer, starts
// the strip again: new reads are held (fetch_hold), and once no memory word
// is in flight the buffers are emptied (strip_start). Decoded
// sub-blocks arrive from the decompress core, LANES per cycle, top to
// bottom, and are written into the buffer; the finished vision block is then
// put out as a K x K array.
//
// The checking of requests against buffers follows the source design; the
// request format, the left-to-right strip order and the buffer depth are
// this design's own choices.
//
// Interface: vreq_valid/vreq_ready request handshake; vblk_valid pulses for
// one cycle with vblk[row][x], in the cycle vreq_ready is high. Requests
// must satisfy vreq_col + D <= IMG_W/n and vreq_strip < IMG_H/K.
// strip_y0 (first line of the requested strip) is vreq_strip * K, taken
// straight from the held request and sampled by the address translation at
// strip_start; its low log2(K) bits are therefore always zero.
module iic_block_recomp
  import iic_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080,
  parameter int unsigned K     = 8,
  parameter int unsigned LANES = 2,
  parameter int unsigned YW    = $clog2(IMG_H),
  parameter int unsigned SW    = $clog2(IMG_H / K),
  parameter int unsigned CW    = $clog2(IMG_W / SUB_N)
)(
  input  logic                          clk,
  input  logic                          rst_n,
  // vision processor
  input  logic                          vreq_valid,
  output logic                          vreq_ready,
  input  logic [SW-1:0]                 vreq_strip,
  input  logic [CW-1:0]                 vreq_col,
  output logic                          vblk_valid,
  output logic [K-1:0][K-1:0][PIX_W-1:0] vblk,
  // strip control
  output logic                          strip_start,
  output logic [YW-1:0]                 strip_y0,
  output logic                          fetch_hold,
  input  logic                          line_idle,
  // column requests to the line recomposition
  output logic                          col_req_valid,
  input  logic                          col_req_ready,
  // decoded sub-blocks from the decompress core
  input  logic                          dec_valid,
  input  subblk_t                       dec_pix [LANES],
  // statistics
  output logic [31:0]                   hit_cols,
  output logic [31:0]                   miss_cols,
  output logic [31:0]                   strip_starts
);

  localparam int unsigned D     = K / SUB_N;
  localparam int unsigned PAIRS = K / LANES;
  localparam int unsigned PW    = (PAIRS > 1) ? $clog2(PAIRS) : 1;
  localparam int unsigned DW    = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned XW    = CW + 1;

  typedef enum logic [1:0] {S_IDLE, S_FLUSH, S_FILL, S_OUT} state_t;
  state_t state;

  subblk_t       colbuf [D][K];
  logic          strip_ok;
  logic [SW-1:0] cur_strip;
  logic [XW-1:0] dec_issued, dec_done, need;
  logic [PW-1:0] rx_pair;
  logic          evicted;

  assign need    = XW'(vreq_col) + XW'(D);
  assign evicted = need < dec_done;  // leftmost column already overwritten

  assign col_req_valid = (state == S_FILL) && !strip_start && (dec_issued < need);
  assign vreq_ready    = (state == S_OUT);
  // No new memory reads while the current strip is being ended.
  assign fetch_hold    = (state == S_FLUSH) || strip_start;
  assign strip_y0      = YW'(vreq_strip) * YW'(K);

  function automatic logic [DW-1:0] slot(input logic [XW-1:0] c);
    return DW'(c % XW'(D));
  endfunction

  // Columns of the request already decoded and still buffered.
  function automatic logic [31:0] hits_now();
    logic [31:0] h;
    h = 0;
    for (int x = 0; x < D; x++)
      if (XW'(vreq_col) + XW'(x) < dec_done) h = h + 1;
    return h;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      strip_ok     <= 1'b0;
      cur_strip    <= '0;
      dec_issued   <= '0;
      dec_done     <= '0;
      rx_pair      <= '0;
      strip_start  <= 1'b0;
      vblk_valid   <= 1'b0;
      vblk         <= '0;
      hit_cols     <= '0;
      miss_cols    <= '0;
      strip_starts <= '0;
    end else begin
      strip_start <= 1'b0;
      vblk_valid  <= 1'b0;
      if (col_req_valid && col_req_ready) dec_issued <= dec_issued + 1'b1;
      if (dec_valid) begin
        rx_pair <= (rx_pair == PW'(PAIRS - 1)) ? '0 : rx_pair + 1'b1;
        if (rx_pair == PW'(PAIRS - 1)) dec_done <= dec_done + 1'b1;
      end
      case (state)
        S_IDLE: if (vreq_valid) begin
          if (!strip_ok || vreq_strip != cur_strip || evicted) begin
            state <= S_FLUSH;
          end else begin
            hit_cols  <= hit_cols + hits_now();
            miss_cols <= miss_cols + (32'(D) - hits_now());
            state     <= S_FILL;
          end
        end
        S_FLUSH: if (line_idle && dec_issued == dec_done && !strip_start) begin
          strip_start  <= 1'b1;
          strip_ok     <= 1'b1;
          cur_strip    <= vreq_strip;
          dec_issued   <= '0;
          dec_done     <= '0;
          rx_pair      <= '0;
          strip_starts <= strip_starts + 1;
          miss_cols    <= miss_cols + 32'(D);
          state        <= S_FILL;
        end
        S_FILL: if (!strip_start && dec_done >= need) begin
          state <= S_OUT;
          for (int r = 0; r < K; r++)
            for (int x = 0; x < K; x++)
              vblk[r][x] <= colbuf[slot(XW'(vreq_col) + XW'(x / SUB_N))][r][x % SUB_N];
          vblk_valid <= 1'b1;
        end
        S_OUT: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Decoded sub-blocks go to the slot of the column being received.
  always_ff @(posedge clk) begin
    if (dec_valid)
      for (int l = 0; l < LANES; l++)
        colbuf[slot(dec_done)][int'(rx_pair) * LANES + l] <= dec_pix[l];
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   vreq_valid |-> (XW'(vreq_col) + XW'(D) <= XW'(IMG_W / SUB_N)))
    else $error("iic_block_recomp: vision block beyond the right image edge");

endmodule
