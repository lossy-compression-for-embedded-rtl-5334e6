// Shared body of the end-to-end testbenches of iic_top (included by
// tb_iic_top and tb_iic_top_full, which set the image size and instantiate
// the design).
//
// Two frames are compressed, the first with quantization configuration 1,
// the second with 3 (a switch of configuration between frames). Every word
// the compression path writes is compared, address and data, with a
// reference encoder. The frame is then read back as vision blocks: every
// non-overlapping block of every strip, then overlapping blocks (buffer
// hits), a block to the left of the buffer (strip restart) and random
// blocks; each block is compared with the reference reconstruction. The
// memory model answers reads in order after a random latency and refuses
// some requests. Each mechanism is counted and must occur.

  import iic_pkg::*;
  import tb_iic_ref::*;

  localparam int SB = IMG_W / 4;
  localparam int NS = IMG_H / K;
  localparam int D  = K / 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  qc_t                            qc;
  logic                           in_valid;
  subblk_t                        in_pix;
  logic                           wr_valid;
  logic [AW-1:0]                  wr_addr;
  logic [W-1:0]                   wr_data;
  logic                           frame_done;
  logic [31:0]                    frame_words;
  logic                           rd_valid, rd_ready;
  logic [AW-1:0]                  rd_addr;
  logic [LIW-1:0]                 rd_line;
  logic                           rsp_valid;
  logic [W-1:0]                   rsp_data;
  logic [LIW-1:0]                 rsp_line;
  logic                           vreq_valid, vreq_ready;
  logic [SW-1:0]                  vreq_strip;
  logic [CW-1:0]                  vreq_col;
  logic                           vblk_valid;
  logic [K-1:0][K-1:0][7:0]       vblk;
  logic [31:0]                    hit_cols, miss_cols, strip_starts;
  logic                           dec_stall;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // reference frame
  int img [][];
  int rec [][];
  logic [W-1:0] exp_data [$];
  int           exp_addr [$];
  int           exp_words;
  int           cm_seen [6];

  // mechanism counters
  int n_rd_refused = 0, n_stall = 0, n_frames = 0, n_qc_switch = 0, n_restart = 0;
  int n_wr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // Reference encoding of a whole frame.
  task automatic build_frame(input int q, input int seed);
    bit bits [$];
    logic [63:0] code;
    int len, p[4], d[4], up;
    img = new[IMG_H];
    rec = new[IMG_H];
    foreach (img[y]) begin img[y] = new[IMG_W]; rec[y] = new[IMG_W]; end
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) img[y][x] = pixel(x, y, seed);
    exp_data.delete();
    exp_addr.delete();
    exp_words = 0;
    for (int y = 0; y < IMG_H; y++) begin
      logic [W-1:0] wd;
      int idx;
      bits.delete();
      for (int c = 0; c < SB; c++) begin
        for (int i = 0; i < 4; i++) p[i] = img[y][4*c+i];
        up = (y % M == 0) ? 0 : rec[y-1][4*c];
        encode(q, (y % M) == 0, p, up, code, len, d);
        cm_seen[(y % M == 0) ? int'(code[10:8]) : int'(code[2:0])]++;
        for (int i = 0; i < 4; i++) rec[y][4*c+i] = d[i];
        for (int b = 0; b < len; b++) bits.push_back(code[b]);
      end
      idx = 0;
      while (bits.size() > 0) begin
        wd = '0;
        for (int b = 0; b < W && bits.size() > 0; b++) wd[b] = bits.pop_front();
        exp_data.push_back(wd);
        exp_addr.push_back(y * LINE_WORDS + idx);
        idx++;
      end
      exp_words += idx;
    end
  endtask

  // memory model
  logic [W-1:0] mem [int];
  typedef struct { logic [W-1:0] data; logic [LIW-1:0] line; longint due; } rsp_t;
  rsp_t rq [$];

  always @(posedge clk) begin
    if (rst_n && wr_valid) begin
      mem[int'(wr_addr)] = wr_data;
      n_wr++;
      if (exp_addr.size() == 0) check(0, "unexpected memory write");
      else begin
        int ea;
        logic [W-1:0] ed;
        ea = exp_addr.pop_front();
        ed = exp_data.pop_front();
        check(int'(wr_addr) == ea && wr_data == ed,
              $sformatf("write addr %0d data %h, expected %0d %h", wr_addr, wr_data, ea, ed));
      end
    end
    if (rst_n && rd_valid && !rd_ready) n_rd_refused++;
    if (rst_n && rd_valid && rd_ready) begin
      rsp_t r;
      r.data = mem.exists(int'(rd_addr)) ? mem[int'(rd_addr)] : '0;
      r.line = rd_line;
      r.due  = cycle + 2 + longint'(int'($urandom % 6));
      rq.push_back(r);
    end
    if (rst_n && dec_stall) n_stall++;
  end

  always @(negedge clk) begin
    rd_ready <= ($urandom % 4) != 0;
    if (rq.size() > 0 && rq[0].due <= cycle) begin
      rsp_t r;
      r = rq.pop_front();
      rsp_valid <= 1'b1;
      rsp_data  <= r.data;
      rsp_line  <= r.line;
    end else begin
      rsp_valid <= 1'b0;
    end
  end

  // Feed a frame, one sub-block per cycle with occasional gaps.
  task automatic send_frame();
    for (int y = 0; y < IMG_H; y++)
      for (int c = 0; c < SB; c++) begin
        @(negedge clk);
        while (($urandom % 8) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        for (int i = 0; i < 4; i++) in_pix[i] = 8'(img[y][4*c+i]);
      end
    @(negedge clk);
    in_valid = 1'b0;
    while (!frame_done) @(negedge clk);
    check(frame_words == 32'(exp_words),
          $sformatf("frame_words %0d, expected %0d", frame_words, exp_words));
    repeat (4) @(negedge clk);
    check(exp_addr.size() == 0, "words missing from the compressed frame");
    n_frames++;
  endtask

  int last_strip = -1;

  // Request one vision block and compare it.
  task automatic get_block(input int s, input int c);
    int bad;
    int ss0;
    ss0 = int'(strip_starts);
    @(negedge clk);
    vreq_valid = 1'b1;
    vreq_strip = SW'(s);
    vreq_col   = CW'(c);
    do @(posedge clk); while (!vreq_ready);
    check(vblk_valid, "vblk_valid not with vreq_ready");
    bad = 0;
    for (int r = 0; r < K; r++)
      for (int x = 0; x < K; x++)
        if (int'(vblk[r][x]) != rec[s*K + r][4*c + x]) begin
          bad++;
          if (failures < 3) $display("  r%0d x%0d got %0d exp %0d", r, x, vblk[r][x], rec[s*K + r][4*c + x]);
        end
    check(bad == 0, $sformatf("vision block strip %0d col %0d: %0d pixels wrong", s, c, bad));
    @(negedge clk);
    vreq_valid = 1'b0;
    if (int'(strip_starts) != ss0 && last_strip == s) n_restart++;
    last_strip = s;
  endtask

  task automatic read_frame(input bit all_blocks, input int n_random);
    if (all_blocks)
      for (int s = 0; s < NS; s++)
        for (int c = 0; c + D <= SB; c += D) get_block(s, c);
    // overlapping blocks: buffered columns are reused
    for (int c = 0; c < 4 && c + D <= SB; c++) get_block(NS > 1 ? 1 : 0, c);
    // a block left of the buffer: the strip starts again
    get_block(NS > 1 ? 1 : 0, 0);
    for (int i = 0; i < n_random; i++)
      get_block(int'($urandom % NS), int'($urandom % (SB - D + 1)));
  endtask

  initial begin
    in_valid   = 1'b0;
    in_pix     = '0;
    vreq_valid = 1'b0;
    vreq_strip = '0;
    vreq_col   = '0;
    rsp_valid  = 1'b0;
    rsp_data   = '0;
    rsp_line   = '0;
    rd_ready   = 1'b0;
    qc         = 2'd1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // frame 1, QC 1
    build_frame(1, 0);
    send_frame();
    read_frame(1'b1, RANDOM_BLOCKS);

    // frame 2, QC 3
    qc = 2'd3;
    n_qc_switch++;
    last_strip = -1;
    build_frame(3, 3);
    send_frame();
    read_frame(FULL_SECOND, RANDOM_BLOCKS);

    $display("frames %0d, words written %0d, reads refused %0d, decode stall cycles %0d",
             n_frames, n_wr, n_rd_refused, n_stall);
    $display("column hits %0d, misses %0d, strip starts %0d, restarts %0d, qc switches %0d",
             hit_cols, miss_cols, strip_starts, n_restart, n_qc_switch);
    $display("coding modes seen: %0d %0d %0d %0d %0d %0d",
             cm_seen[0], cm_seen[1], cm_seen[2], cm_seen[3], cm_seen[4], cm_seen[5]);
    check(n_rd_refused > 0, "memory never refused a read");
    check(n_stall > 0, "decoder never stalled for data");
    check(hit_cols > 0, "no buffered column was reused");
    check(n_restart > 0, "no strip restart");
    check(n_qc_switch > 0, "no configuration switch");
    for (int l = 0; l <= 5; l++) check(cm_seen[l] > 0, $sformatf("coding mode %0d never used", l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
