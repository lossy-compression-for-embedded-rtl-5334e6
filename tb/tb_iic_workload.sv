// tb_iic_workload: memory traffic of iic_top on one CNN-input-sized image
// plane under each of the four quantization configurations.
//
// A 228 x 232 frame holds one 227 x 227 colour plane of a typical CNN input
// (padded to whole sub-blocks and strips). The image is a synthetic scene:
// a smooth two-way gradient with a few solid objects with hard borders and
// a little sensor noise, closer to a camera picture than the mixed test image
// of tb_iic_top. For QC 0, 1, 2 and 3 in turn the frame is compressed and
// then read back completely as non-overlapping 8 x 8 vision blocks, the way a
// feature extractor scans it. The last frame is then scanned once more with
// blocks at a 4-pixel step, each overlapping the one before by half.
//
// Checked: every memory write (address and data) and every vision block
// against the reference model in tb_iic_ref; frame_words; that every coded
// word is read back and at most one spare word per line more; that the
// compressed frame is smaller than the raw one; that the overlapping scan
// reuses buffered columns and reads memory no more than the plain one. Reported per configuration:
// words written and read against the raw frame, and the largest and mean
// pixel error against the original image, and the pixels per clock cycle
// of the read-back (the memory model answers after 2 to 7 cycles and refuses
// one read in eight).
module tb_iic_workload;
  import iic_pkg::*;
  import tb_iic_ref::*;

  localparam int IMG_W = 228;
  localparam int IMG_H = 232;
  localparam int K = 8;
  localparam int M = 8;
  localparam int W = 64;
  localparam int LINE_WORDS = iic_pkg::line_words(IMG_W, W);
  localparam int AW  = $clog2(IMG_H * LINE_WORDS);
  localparam int LIW = $clog2(K);
  localparam int SW  = $clog2(IMG_H / K);
  localparam int CW  = $clog2(IMG_W / 4);
  localparam int SB  = IMG_W / 4;
  localparam int NS  = IMG_H / K;
  localparam int D   = K / 4;
  localparam int RAW_WORDS = IMG_W * IMG_H * 8 / W;
  localparam int WATCHDOG = 2000000;

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

  iic_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .M(M), .W(W)) u_dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // Synthetic scene: gradient background, three objects, +-2 noise.
  int img [IMG_H][IMG_W];
  int rec [IMG_H][IMG_W];

  function automatic int scene(int x, int y);
    int v;
    v = 40 + (x * 120) / IMG_W + (y * 60) / IMG_H;
    if (x >= 30 && x < 90 && y >= 40 && y < 150) v = 200 - (y - 40) / 4;        // light box
    if ((x - 160) * (x - 160) + (y - 120) * (y - 120) < 45 * 45) v = 25 + (x % 7); // dark disc, texture
    if (y >= 180 && y < 200 && x >= 100) v = 235;                                // bright bar
    return clamp(v + int'($urandom % 5) - 2);
  endfunction

  // Reference encoding of the frame.
  logic [W-1:0] exp_data [$];
  int           exp_addr [$];
  int           exp_words;

  task automatic build_frame(input int q);
    bit bits [$];
    logic [63:0] code;
    int len, p[4], d[4], up;
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

  // Memory model: answers in order after 2..7 cycles, refuses some reads.
  logic [W-1:0] mem [int];
  typedef struct { logic [W-1:0] data; logic [LIW-1:0] line; longint due; } rsp_t;
  rsp_t rq [$];
  int n_rd = 0;

  always @(posedge clk) begin
    if (rst_n && wr_valid) begin
      mem[int'(wr_addr)] = wr_data;
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
    if (rst_n && rd_valid && rd_ready) begin
      rsp_t r;
      r.data = mem.exists(int'(rd_addr)) ? mem[int'(rd_addr)] : '0;
      r.line = rd_line;
      r.due  = cycle + 2 + longint'(int'($urandom % 6));
      rq.push_back(r);
      n_rd++;
    end
  end

  always @(negedge clk) begin
    rd_ready <= ($urandom % 8) != 0;
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

  task automatic send_frame();
    for (int y = 0; y < IMG_H; y++)
      for (int c = 0; c < SB; c++) begin
        @(negedge clk);
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
  endtask

  task automatic get_block(input int s, input int c);
    int bad;
    @(negedge clk);
    vreq_valid = 1'b1;
    vreq_strip = SW'(s);
    vreq_col   = CW'(c);
    do @(posedge clk); while (!vreq_ready);
    check(vblk_valid, "vblk_valid not with vreq_ready");
    bad = 0;
    for (int r = 0; r < K; r++)
      for (int x = 0; x < K; x++)
        if (int'(vblk[r][x]) != rec[s*K + r][4*c + x]) bad++;
    check(bad == 0, $sformatf("vision block strip %0d col %0d: %0d pixels wrong", s, c, bad));
    @(negedge clk);
    vreq_valid = 1'b0;
  endtask

  initial begin
    int rd0, rd_words, max_err, e;
    longint sum_err, c0, rd_cycles;
    in_valid   = 1'b0;
    in_pix     = '0;
    vreq_valid = 1'b0;
    vreq_strip = '0;
    vreq_col   = '0;
    rsp_valid  = 1'b0;
    rsp_data   = '0;
    rsp_line   = '0;
    rd_ready   = 1'b0;
    qc         = 2'd0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) img[y][x] = scene(x, y);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int q = 0; q < 4; q++) begin
      qc = qc_t'(q);
      build_frame(q);
      send_frame();
      rd0 = n_rd;
      c0  = cycle;
      for (int s = 0; s < NS; s++)
        for (int c = 0; c + D <= SB; c += D) get_block(s, c);
      rd_words = n_rd - rd0;
      rd_cycles = cycle - c0;
      check(rd_words >= exp_words && rd_words <= exp_words + IMG_H,
            $sformatf("QC %0d: %0d words read for %0d coded words", q, rd_words, exp_words));
      check(exp_words < RAW_WORDS, $sformatf("QC %0d: frame not smaller than raw", q));
      max_err = 0;
      sum_err = 0;
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          e = rec[y][x] - img[y][x];
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
          sum_err += longint'(e);
        end
      $display("QC %0d: written %0d words (%0d.%0d%% of raw %0d), read %0d words, pixel error max %0d mean %0d.%02d",
               q, exp_words, exp_words * 100 / RAW_WORDS, (exp_words * 1000 / RAW_WORDS) % 10,
               RAW_WORDS, rd_words, max_err, int'(sum_err / (IMG_W * IMG_H)),
               int'((sum_err * 100 / (IMG_W * IMG_H)) % 100));
      $display("QC %0d: frame read back in %0d cycles, %0d.%02d pixels per cycle",
               q, rd_cycles, int'(longint'(IMG_W * IMG_H) / rd_cycles),
               int'((longint'(IMG_W * IMG_H) * 100 / rd_cycles) % 100));
    end

    // Sliding scan at a 4-pixel step (the last frame, QC 3): every block
    // overlaps the one before by half, which the column buffer serves, so
    // memory is read no more than for the non-overlapping scan.
    begin
      int h0, m0;
      h0  = int'(hit_cols);
      m0  = int'(miss_cols);
      rd0 = n_rd;
      c0  = cycle;
      for (int s = 0; s < NS; s++)
        for (int c = 0; c + D <= SB; c++) get_block(s, c);
      rd_words  = n_rd - rd0;
      rd_cycles = cycle - c0;
      check(rd_words >= exp_words && rd_words <= exp_words + IMG_H,
            $sformatf("sliding scan: %0d words read for %0d coded words", rd_words, exp_words));
      check(int'(hit_cols) - h0 == NS * (SB - D),
            $sformatf("sliding scan: %0d column hits, expected %0d", int'(hit_cols) - h0, NS * (SB - D)));
      check(int'(miss_cols) - m0 == NS * SB,
            $sformatf("sliding scan: %0d columns decoded, expected %0d", int'(miss_cols) - m0, NS * SB));
      $display("sliding scan: %0d blocks, %0d column hits, %0d columns decoded, %0d words read, %0d cycles",
               NS * (SB - D + 1), int'(hit_cols) - h0, int'(miss_cols) - m0, rd_words, rd_cycles);
    end

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
endmodule
